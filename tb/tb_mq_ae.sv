// tb_mq_ae: checks the one-symbol MQ encoder step.
//
// The testbench keeps a coding run's registers and 19 context states,
// feeds random context-decision pairs one per cycle through mq_ae (with
// decisions skewed so that the probability states run deep and long
// renormalisations and carries occur), terminates with a flush, and compares
// the bytes with the buffer-based software MQ coder of tb_ref_pkg.
module tb_mq_ae;
  import ebc_pkg::*;
  import tb_ref_pkg::*;

  logic en, flush;
  mq_reg_t st_in, st_out;
  ctx_state_t cs_in, cs_out;
  cxd_t sym;
  logic [1:0] out_n;
  logic [2:0][7:0] out_byte;

  mq_ae dut (.*);

  int checks = 0, failures = 0;
  ctx_state_t cs [19];

  initial begin
    for (int rn = 0; rn < 6; rn++) begin
      sq_t syms;
      bq_t got, exp_b;
      int nsym;
      syms.delete(); got.delete();
      nsym = 200 + rn * 400;
      st_in = mq_reg_init();
      for (int i = 0; i < 19; i++) cs[i] = ctx_init(i);
      en = 0; flush = 0; sym = '0; cs_in = '0;
      for (int n = 0; n < nsym; n++) begin
        int cx, d;
        cx = (rn == 5) ? 0 : $urandom % 19;
        // per-run bias: mostly zeros, with a rare one
        d = (($urandom % 1000) < (rn * 3 + 2)) ? 1 : 0;
        if (rn == 4) d = $urandom % 2;
        syms.push_back(cx * 2 + d);
        sym = '{cx: 5'(cx), d: 1'(d)};
        cs_in = cs[cx];
        en = 1;
        #1;
        for (int i = 0; i < int'(out_n); i++) got.push_back(out_byte[i]);
        st_in = st_out;
        cs[cx] = cs_out;
        #1;
      end
      en = 0; flush = 1;
      #1;
      for (int i = 0; i < int'(out_n); i++) got.push_back(out_byte[i]);
      flush = 0;
      exp_b = mq_encode(syms);
      checks++;
      if (got.size() != exp_b.size()) begin
        failures++;
        $display("FAIL run %0d: %0d bytes, expected %0d", rn, got.size(), exp_b.size());
      end
      for (int i = 0; i < exp_b.size() && i < got.size(); i++) begin
        checks++;
        if (got[i] != exp_b[i]) begin
          failures++;
          if (failures < 10) $display("FAIL run %0d byte %0d: %02x expected %02x", rn, i, got[i], exp_b[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
