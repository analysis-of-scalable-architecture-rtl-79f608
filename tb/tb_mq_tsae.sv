// tb_mq_tsae: checks the two-symbol MQ encoder.
//
// Random context-decision pairs are coded one or two per cycle (often both
// in the same context, to exercise the forwarding of the updated context
// state), the run is then terminated with a separate flush step
// (mq_ae), and the bytes are compared with the software MQ coder.
module tb_mq_tsae;
  import ebc_pkg::*;
  import tb_ref_pkg::*;

  logic [1:0] n;
  mq_reg_t st_in, st_out, fl_out;
  ctx_state_t [1:0] cs_in, cs_out;
  cxd_t [1:0] sym;
  logic [2:0] out_n;
  logic [5:0][7:0] out_byte;
  ctx_state_t fl_cs;
  logic [1:0] fl_n;
  logic [2:0][7:0] fl_b;

  mq_tsae dut (.*);
  mq_ae u_flush (.en(1'b0), .flush(1'b1), .st_in(st_in), .cs_in('0), .sym('0),
                 .st_out(fl_out), .cs_out(fl_cs), .out_n(fl_n), .out_byte(fl_b));

  int checks = 0, failures = 0, n_two = 0, n_same = 0;
  ctx_state_t cs [19];

  initial begin
    for (int rn = 0; rn < 5; rn++) begin
      sq_t syms;
      bq_t got, exp_b;
      syms.delete(); got.delete();
      st_in = mq_reg_init();
      for (int i = 0; i < 19; i++) cs[i] = ctx_init(i);
      for (int step_ = 0; step_ < 600; step_++) begin
        int c0, c1, d0, d1;
        n  = 2'(1 + ($urandom % 2));
        c0 = $urandom % 19;
        c1 = ($urandom % 2) ? c0 : $urandom % 19;
        d0 = (($urandom % 100) < 5 + rn * 10) ? 1 : 0;
        d1 = (($urandom % 100) < 5 + rn * 10) ? 1 : 0;
        sym[0] = '{cx: 5'(c0), d: 1'(d0)};
        sym[1] = '{cx: 5'(c1), d: 1'(d1)};
        cs_in[0] = cs[c0];
        cs_in[1] = cs[c1];
        syms.push_back(c0 * 2 + d0);
        if (n == 2) begin
          syms.push_back(c1 * 2 + d1);
          n_two++;
          if (c0 == c1) n_same++;
        end
        #1;
        for (int i = 0; i < int'(out_n); i++) got.push_back(out_byte[i]);
        st_in = st_out;
        cs[c0] = cs_out[0];
        if (n == 2) cs[c1] = cs_out[1];
        #1;
      end
      n = 0;
      #1;
      for (int i = 0; i < int'(fl_n); i++) got.push_back(fl_b[i]);
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
          if (failures < 10) $display("FAIL run %0d byte %0d", rn, i);
        end
      end
    end
    checks++;
    if (n_two == 0 || n_same == 0) failures++;
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
