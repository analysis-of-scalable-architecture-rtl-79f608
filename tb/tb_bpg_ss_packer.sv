// tb_bpg_ss_packer: checks bit-plane grouping with sign scattering.
//
// Random 16x16 code-blocks (one of them all zero, one with the top plane
// used) are streamed in with random gaps; memory grants are random.  The
// testbench checks every word written against the reference grouping, the
// number of words, the interleaved addresses, and n_planes.
module tb_bpg_ss_packer;
  import tb_ref_pkg::*;

  localparam int CB = 16, NC = CB * CB, NPL = 10, W = 32, AW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, coef_valid = 0, coef_ready, coef_sign = 0, wr_req, wr_gnt = 0, done;
  logic [AW-1:0] base = '0, wr_addr;
  logic [NPL-1:0] coef_mag = '0;
  logic [W-1:0] wr_data;
  logic [3:0] n_planes;

  bpg_ss_packer #(.NPLANES(NPL), .W(W), .CB(CB), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] mem [int];
  int nwr = 0;
  always @(posedge clk) begin
    wr_gnt <= ($urandom % 4) != 0;
    if (wr_req && wr_gnt) begin mem[int'(wr_addr)] = wr_data; nwr++; end
  end

  int unsigned mag [];
  bit sgn [];

  initial begin
    mag = new[NC]; sgn = new[NC];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4 * one; t++) begin
      int top, exp_n, exp_words;
      top = (t == 0) ? 0 : ((t == 1) ? NPL : 3 + t);
      exp_n = 0;
      exp_words = 0;
      for (int i = 0; i < NC; i++) begin
        sgn[i] = $urandom % 2;
        mag[i] = (top == 0 || $urandom % 2) ? 0 : $urandom % (1 << top);
        for (int k = 0; k < NPL; k++) if ((mag[i] >> k) & 1) if (k + 1 > exp_n) exp_n = k + 1;
      end
      mem.delete();
      nwr = 0;
      @(negedge clk);
      start = 1; base = AW'(1000 * t);
      @(negedge clk);
      start = 0;
      for (int s = 0; s < CB / 4; s++)
        for (int x = 0; x < CB; x++)
          for (int r = 0; r < 4; r++) begin
            int me;
            me = (4 * s + r) * CB + x;
            while ($urandom % 6 == 0) begin coef_valid = 0; @(negedge clk); end
            coef_valid = 1; coef_mag = NPL'(mag[me]); coef_sign = sgn[me];
            #1;
            while (!coef_ready) begin @(negedge clk); #1; end
            @(negedge clk);
          end
      coef_valid = 0;
      while (!done) @(negedge clk);
      checks++;
      if (int'(n_planes) != exp_n) begin failures++; $display("FAIL n_planes %0d expected %0d", n_planes, exp_n); end
      for (int k = 0; k < NPL * one; k++) begin
        int unsigned words [$];
        words.delete();
        bpg_words(CB, NPL, W, k, mag, sgn, words);
        exp_words += words.size();
        foreach (words[i]) begin
          int a;
          a = 1000 * t + i * NPL + (NPL - 1 - k);
          checks++;
          if (!mem.exists(a) || mem[a] != words[i]) begin
            failures++;
            if (failures < 10) $display("FAIL block %0d plane %0d word %0d", t, k, i);
          end
        end
      end
      checks++;
      if (nwr != exp_words) begin failures++; $display("FAIL %0d writes, expected %0d", nwr, exp_words); end
    end
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
