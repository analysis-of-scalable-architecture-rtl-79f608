// tb_bp_ebc: checks the bit-plane parallel coder on its own.
//
// The coder is built with three bit-plane coders and 16x16 code-blocks, so
// that a non-power-of-two coder count and multi-run blocks are exercised in
// a short run.  The memory model is preloaded with the grouped, sign-scattered
// words of random code-blocks; it grants reads at random and returns data in
// order after a random delay.  Every byte of every plane and pass stream is
// compared with the software coder, and the testbench checks that multi-run
// blocks read the state memory, that extra dispatcher cycles and two-symbol
// encoder use occur, and that no stream appears for planes outside the coded
// range.
module tb_bp_ebc;
  import ebc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NB = 3, CB = 16, NC = CB * CB, NPL = 10, W = 32, AW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, rd_req, rd_gnt = 0, rd_valid;
  logic [3:0] n_planes = '0, trunc = '0;
  band_e band = BAND_LL_LH;
  logic [AW-1:0] base = '0, rd_addr;
  logic [W-1:0] rd_data;
  bs_out_t [NB-1:0] bs;
  logic ev_extra_cycle, ev_ts_two, ev_data_stall, ev_state_read;
  logic [NB-1:0] ev_rlc;

  bp_ebc #(.NBPC(NB), .CB(CB), .NPLANES(NPL), .W(W), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // memory
  logic [W-1:0] mem [int];
  int unsigned rq_addr [$];
  int          rq_time [$];
  int          cyc = 0, last_t = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb begin
    rd_valid = (rq_time.size() != 0) && (rq_time[0] <= cyc);
    rd_data  = (rd_valid && mem.exists(int'(rq_addr[0]))) ? mem[int'(rq_addr[0])] : '0;
  end
  always @(posedge clk) begin
    rd_gnt <= ($urandom % 4) != 0;
    if (rd_valid) begin void'(rq_addr.pop_front()); void'(rq_time.pop_front()); end
    if (rd_req && rd_gnt) begin
      int t;
      t = cyc + 1 + $urandom % 3;
      if (t < last_t) t = last_t;
      last_t = t;
      rq_addr.push_back(rd_addr);
      rq_time.push_back(t);
    end
  end

  // stream capture and event counts
  bq_t got [int];
  int n_extra = 0, n_ts2 = 0, n_rlc = 0, n_state = 0;
  always @(posedge clk) begin
    for (int j = 0; j < NB; j++)
      for (int i = 0; i < 6; i++)
        if (bs[j].valid[i]) got[int'(bs[j].plane) * 4 + int'(bs[j].pass)].push_back(bs[j].byte_[i]);
    n_extra += ev_extra_cycle;
    n_ts2   += ev_ts_two;
    n_rlc   += $countones(ev_rlc);
    n_state += ev_state_read;
  end

  int unsigned mag [];
  bit          sgn [];

  task automatic run_block(input int np, input int kt, input band_e bd, input int zero_pct);
    int ref_rlc = 0, r0, s0;
    for (int i = 0; i < NC; i++) begin
      sgn[i] = $urandom % 2;
      if (np == 0 || ($urandom % 100) < zero_pct) mag[i] = 0;
      else mag[i] = $urandom % (1 << np);
    end
    if (np > 0) mag[$urandom % NC] = 1 << (np - 1);
    mem.delete();
    for (int k = 0; k < NPL * one; k++) begin
      int unsigned words [$];
      bpg_words(CB, NPL, W, k, mag, sgn, words);
      foreach (words[i]) mem[200 + i * NPL + (NPL - 1 - k)] = words[i];
    end
    got.delete();
    r0 = n_rlc; s0 = n_state;
    @(negedge clk);
    start = 1; n_planes = 4'(np); trunc = 4'(kt); band = bd; base = AW'(200);
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int k = kt; k < np; k++)
      for (int p = 1; p <= 3 * one; p++) begin
        sq_t syms;
        bq_t exp_b;
        int nr;
        if (k == np - 1 && p != 3) continue;
        syms  = block_symbols(CB, int'(bd), k, p, mag, sgn, nr);
        if (p == 3) ref_rlc += nr;
        exp_b = mq_encode(syms);
        if (!got.exists(k * 4 + p)) check(0, $sformatf("no stream for plane %0d pass %0d", k, p));
        else begin
          check(got[k * 4 + p] == exp_b,
                $sformatf("plane %0d pass %0d: %0d bytes, expected %0d", k, p,
                          got[k * 4 + p].size(), exp_b.size()));
          got.delete(k * 4 + p);
        end
      end
    check(got.size() == 0, "streams outside the coded planes");
    check(n_rlc - r0 == ref_rlc, $sformatf("%0d run-length columns, expected %0d", n_rlc - r0, ref_rlc));
    if (np - kt > NB) check(n_state - s0 > 0, "multi-run block read no state");
    $display("block N=%0d trunc=%0d: done at cycle %0d", np, kt, cyc);
  endtask

  initial begin
    mag = new[NC];
    sgn = new[NC];
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(10, 1, BAND_LL_LH, 50);   // three runs
    run_block(5, 0, BAND_HH, 70);       // two runs
    run_block(4, 2, BAND_HL, 40);       // one run, truncated
    run_block(1, 0, BAND_LL_LH, 90);    // single plane
    run_block(0, 0, BAND_LL_LH, 100);   // empty
    check(n_extra > 0, "no extra dispatcher cycle");
    check(n_ts2 > 0, "two-symbol encoder never coded two pairs");
    $display("events: extra=%0d ts2=%0d rlc=%0d state_reads=%0d", n_extra, n_ts2, n_rlc, n_state);
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
