// tb_ebc_addr_gen: checks the address generator.
//
// Four coders with different planes request words at random; the bus grants
// at random and a memory model returns, in order and after a random delay, a
// word equal to the address read.  The testbench checks that every coder's
// n-th word comes from base + n*NPLANES + (NPLANES-1-plane) and reaches that
// coder, that no coder waits forever, and that a second run restarts the
// word counts.
module tb_ebc_addr_gen;
  localparam int NB = 4, NPL = 10, W = 32, AW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init = 0;
  logic [AW-1:0] base;
  logic [NB-1:0][3:0] plane;
  logic [NB-1:0] req, gnt, word_valid;
  logic [W-1:0] word_data, rd_data;
  logic rd_req, rd_gnt, rd_valid, idle;
  logic [AW-1:0] rd_addr;

  ebc_addr_gen #(.NBPC(NB), .NPLANES(NPL), .W(W), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned q_addr [$];
  int          q_time [$];
  int          cyc = 0, last_t = 0;
  int          got_n [NB];
  bit          outstanding [NB];
  bit          hold = 0;

  always @(posedge clk) cyc <= cyc + 1;
  always_comb begin
    rd_valid = q_time.size() != 0 && q_time[0] <= cyc;
    rd_data  = rd_valid ? q_addr[0] : '0;
  end
  always @(posedge clk) begin
    rd_gnt <= ($urandom % 3) != 0;
    if (rd_valid) begin void'(q_addr.pop_front()); void'(q_time.pop_front()); end
    if (rd_req && rd_gnt) begin
      int t;
      t = cyc + 1 + $urandom % 4;
      if (t < last_t) t = last_t;
      last_t = t;
      q_addr.push_back(rd_addr);
      q_time.push_back(t);
    end
  end

  // coders: request while no word is outstanding
  always @(posedge clk) begin
    for (int j = 0; j < NB; j++) begin
      if (gnt[j]) outstanding[j] <= 1;
      if (word_valid[j]) begin
        int unsigned exp_a;
        exp_a = base + got_n[j] * NPL + (NPL - 1 - plane[j]);
        checks++;
        if (word_data != exp_a) begin
          failures++;
          if (failures < 10) $display("FAIL coder %0d word %0d: addr %0d expected %0d at %0t init=%0d", j, got_n[j], word_data, exp_a, $time, init);
        end
        got_n[j] <= got_n[j] + 1;
        outstanding[j] <= 0;
      end
    end
  end
  always_comb for (int j = 0; j < NB; j++) req[j] = rst_n && !init && !hold && !outstanding[j] && (j != 3 || cyc % 2 == 0);

  initial begin
    base = 16'd100;
    plane = {4'd6, 4'd7, 4'd8, 4'd9};
    for (int j = 0; j < NB; j++) begin got_n[j] = 0; outstanding[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (400) @(posedge clk);
    for (int j = 0; j < NB; j++) begin
      checks++;
      if (got_n[j] < 20) begin failures++; $display("FAIL coder %0d starved (%0d words)", j, got_n[j]); end
    end
    // second run, other planes and base: reads drain before init
    @(negedge clk);
    hold = 1;
    @(negedge clk);
    while (!idle) @(negedge clk);
    init = 1;
    @(negedge clk);
    hold = 0;
    base = 16'd5000;
    plane = {4'd0, 4'd1, 4'd2, 4'd3};
    for (int j = 0; j < NB; j++) begin got_n[j] = 0; outstanding[j] = 0; end
    @(negedge clk);
    init = 0;
    repeat (400) @(posedge clk);
    for (int j = 0; j < NB; j++) begin
      checks++;
      if (got_n[j] < 20) begin failures++; $display("FAIL coder %0d starved in run 2", j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
