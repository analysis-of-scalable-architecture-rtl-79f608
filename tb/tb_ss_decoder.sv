// tb_ss_decoder: checks the word buffer and sign-scattering decoder.
//
// A random code-block is grouped into bit-plane words by the reference
// model; the words of one plane are served on request with random delays.
// For every coefficient the testbench supplies whether it is already
// significant in a higher plane, consumes at random moments, and checks the
// magnitude bit and, where this plane holds the first 1 bit, the sign.
module tb_ss_decoder;
  import tb_ref_pkg::*;

  localparam int CB = 16, NC = CB * CB, W = 32, NPL = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, word_req, word_gnt, word_valid, sig_in, out_valid, mu, sign, consume;
  logic [W-1:0] word_data;

  ss_decoder #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned mag [];
  bit sgn [];
  int unsigned words [$];
  int widx = 0, delay = -1;

  // memory side: one word in flight, random delay
  bit gnt_ok = 0;
  always @(posedge clk) begin
    gnt_ok <= $urandom % 2;
    if (!rst_n) delay <= -1;
    else begin
      if (delay > 0) delay <= delay - 1;
      if (word_valid) begin delay <= -1; widx <= widx + 1; end
      if (word_gnt) delay <= 1 + $urandom % 5;
    end
  end
  always_comb begin
    word_gnt   = word_req && (delay < 0) && gnt_ok;
    word_valid = (delay == 0);
    word_data  = (widx < words.size()) ? words[widx] : '0;
  end

  initial begin
    mag = new[NC]; sgn = new[NC];
    consume = 0; sig_in = 0;
    for (int k = NPL - 1; k >= 0; k -= 3) begin
      for (int i = 0; i < NC; i++) begin
        sgn[i] = $urandom % 2;
        mag[i] = ($urandom % 3 == 0) ? 0 : $urandom % (1 << NPL);
      end
      bpg_words(CB, NPL, W, k, mag, sgn, words);
      rst_n = 0;
      widx = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      for (int s = 0; s < CB / 4; s++)
        for (int x = 0; x < CB; x++)
          for (int r = 0; r < 4; r++) begin
            int me;
            me = (4 * s + r) * CB + x;
            @(negedge clk);
            sig_in = (mag[me] >> (k + 1)) != 0;
            consume = 0;
            #1;
            while (!out_valid || ($urandom % 4 == 0)) begin @(negedge clk); #1; end
            checks++;
            if (mu != ((mag[me] >> k) & 1)) begin
              failures++;
              if (failures < 10) $display("FAIL plane %0d coef %0d: bit", k, me);
            end
            if (mu && !sig_in) begin
              checks++;
              if (sign != sgn[me]) begin failures++; if (failures < 10) $display("FAIL sign %0d", me); end
            end
            consume = 1;
            @(posedge clk);
            #1 consume = 0;
          end
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
