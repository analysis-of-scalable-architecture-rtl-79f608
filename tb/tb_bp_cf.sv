// tb_bp_cf: checks the bit-plane parallel context formation of one plane.
//
// For several random code-blocks, sub-band orientations and planes, the
// coefficients are stepped through bp_cf (with random pauses between steps)
// with their plane bit, sign and higher-plane significance.  The pairs it
// emits are sorted by coding pass and compared with the reference model's
// pairs of each pass, in order; the number of run-length coded columns is
// compared too.  The block size is reduced to 16x16 to keep the run short.
module tb_bp_cf;
  import ebc_pkg::*;
  import tb_ref_pkg::*;

  localparam int CB = 16, NC = CB * CB, NPL = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, active = 1, step = 0, in_valid = 0;
  logic in_sig = 0, in_sigp = 0, in_mu = 0, in_sign = 0;
  band_e band = BAND_LL_LH;
  cf_out_t out;
  logic rlc_used;

  bp_cf #(.CB(CB)) dut (.*);

  int checks = 0, failures = 0, total_pairs = 0;
  int unsigned mag [];
  bit sgn [];
  sq_t got [4];
  int n_rlc;

  always @(posedge clk) begin
    if (step) begin
      for (int i = 0; i < int'(out.cnt); i++)
        got[int'(out.pass)].push_back(int'(out.pair[i].cx) * 2 + int'(out.pair[i].d));
      n_rlc += rlc_used;
    end
  end

  initial begin
    mag = new[NC]; sgn = new[NC];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 9 * one; t++) begin
      int k, zero_pct;
      k = (t % 3) * 3 + 1;
      zero_pct = 40 + 15 * (t % 4);
      band = band_e'(t % 3);
      for (int i = 0; i < NC; i++) begin
        sgn[i] = $urandom % 2;
        mag[i] = (($urandom % 100) < zero_pct) ? 0 : $urandom % (1 << NPL);
      end
      for (int p = 0; p < 4; p++) got[p].delete();
      n_rlc = 0;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int n = 0; n < NC + 8; n++) begin
        int me;
        me = -1;
        if (n < NC) begin
          int s, x, r;
          s = n / (4 * CB); x = (n / 4) % CB; r = n % 4;
          me = (4 * s + r) * CB + x;
        end
        in_valid = (me >= 0);
        in_sig   = (me >= 0) && ((mag[me] >> (k + 1)) != 0);
        in_sigp  = (me >= 0) && ((mag[me] >> (k + 2)) != 0);
        in_mu    = (me >= 0) && ((mag[me] >> k) & 1);
        in_sign  = (me >= 0) && sgn[me];
        while ($urandom % 5 == 0) @(negedge clk);
        step = 1;
        @(negedge clk);
        step = 0;
      end
      for (int p = 1; p <= 3 * one; p++) begin
        sq_t e;
        int nr;
        e = block_symbols(CB, int'(band), k, p, mag, sgn, nr);
        if (p == 3) begin
          checks++;
          if (nr != n_rlc) begin failures++; $display("FAIL run-length columns %0d expected %0d", n_rlc, nr); end
        end
        checks++;
        if (e.size() != got[p].size()) begin
          failures++;
          $display("FAIL block %0d pass %0d: %0d pairs, expected %0d", t, p, got[p].size(), e.size());
        end
        for (int i = 0; i < e.size() && i < got[p].size(); i++) begin
          checks++;
          if (e[i] != got[p][i]) begin
            failures++;
            if (failures < 10) $display("FAIL block %0d pass %0d pair %0d: %0d expected %0d", t, p, i, got[p][i], e[i]);
            break;
          end
        end
        total_pairs += e.size();
      end
    end
    $display("pairs compared: %0d", total_pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
