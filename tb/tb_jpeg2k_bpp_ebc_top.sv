// tb_jpeg2k_bpp_ebc_top: end-to-end test of the coding path at its default
// size (64x64 code-blocks, ten magnitude planes, four bit-plane coders).
//
// Several code-blocks of random coefficients go through the top: packing
// into external memory, then bit-plane parallel coding.  The external memory
// is modelled here with random write/read grants and a random in-order read
// latency.  Checked against tb_ref_pkg:
//  * every memory word the grouping/scattering stage wrote, and their number;
//  * n_planes;
//  * the byte stream of every coded (plane, pass), byte for byte;
//  * the number of run-length coded columns;
//  * the cycle budget: one scan step per cycle apart from counted stalls.
// It also counts that each mechanism happened: multi-run blocks (state
// memory read back), truncated planes, two-symbol encoder use, extra
// dispatcher cycles, run-length coding, memory stalls.
module tb_jpeg2k_bpp_ebc_top;
  import ebc_pkg::*;
  import tb_ref_pkg::*;

  localparam int CB = 64, NPL = 10, NB = 4, W = 32, AW = 16;
  localparam int NC = CB * CB;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cb_start = 0;
  logic [AW-1:0] base = '0;
  band_e band = BAND_LL_LH;
  logic [3:0] trunc = '0;
  logic cb_busy, cb_done;
  logic [3:0] n_planes;
  logic coef_valid = 0, coef_ready, coef_sign = 0;
  logic [NPL-1:0] coef_mag = '0;
  logic mem_wr_req, mem_wr_gnt, mem_rd_req, mem_rd_gnt, mem_rd_valid;
  logic [AW-1:0] mem_wr_addr, mem_rd_addr;
  logic [W-1:0] mem_wr_data, mem_rd_data;
  bs_out_t [NB-1:0] bs;
  logic ev_extra_cycle, ev_ts_two, ev_data_stall, ev_state_read;
  logic [NB-1:0] ev_rlc;

  jpeg2k_bpp_ebc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- external memory model ----
  logic [W-1:0] mem [1 << AW];
  int wr_count = 0;
  int unsigned rq_addr [$];
  longint      rq_time [$];
  longint      cyc = 0;
  longint      last_ready = 0;
  int          gnt_pct = 70;

  always @(posedge clk) cyc <= cyc + 1;

  always_comb begin
    mem_rd_valid = (rq_time.size() != 0) && (rq_time[0] <= cyc);
    mem_rd_data  = mem_rd_valid ? mem[rq_addr[0]] : '0;
  end

  always @(posedge clk) begin
    mem_wr_gnt <= ($urandom % 100) < gnt_pct;
    mem_rd_gnt <= ($urandom % 100) < gnt_pct;
    if (mem_rd_valid) begin void'(rq_addr.pop_front()); void'(rq_time.pop_front()); end
    if (mem_wr_req && mem_wr_gnt) begin mem[mem_wr_addr] <= mem_wr_data; wr_count++; end
    if (mem_rd_req && mem_rd_gnt) begin
      longint t;
      t = cyc + 1 + longint'($urandom % 3);
      if (t < last_ready) t = last_ready;
      last_ready = t;
      rq_addr.push_back(mem_rd_addr);
      rq_time.push_back(t);
    end
  end

  // ---- byte capture ----
  bq_t got [int];
  always @(posedge clk) begin
    for (int j = 0; j < NB; j++)
      for (int i = 0; i < 6; i++)
        if (bs[j].valid[i]) got[int'(bs[j].plane) * 4 + int'(bs[j].pass)].push_back(bs[j].byte_[i]);
  end

  // ---- event counters ----
  int n_extra = 0, n_ts2 = 0, n_rlc = 0, n_stall = 0, n_state = 0, n_cycles_code = 0;
  always @(posedge clk) begin
    n_extra += ev_extra_cycle;
    n_ts2   += ev_ts_two;
    n_rlc   += $countones(ev_rlc);
    n_stall += ev_data_stall;
    n_state += ev_state_read;
  end

  int unsigned mag [];
  bit          sgn [];
  int multi_run_blocks = 0, trunc_blocks = 0;

  task automatic run_block(input int nb_planes, input int kt, input band_e bd,
                           input int zero_pct, input int unsigned blk_base);
    int ref_rlc = 0, runs, c0, c1, e0, s0, r0, exp_words = 0;
    mag = new[NC];
    sgn = new[NC];
    for (int i = 0; i < NC; i++) begin
      sgn[i] = $urandom % 2;
      if (nb_planes == 0 || ($urandom % 100) < zero_pct) mag[i] = 0;
      else begin
        int l = 1 + ($urandom % nb_planes);
        mag[i] = (1 << (l - 1)) | ($urandom % (1 << (l - 1)));
      end
    end
    if (nb_planes > 0) mag[$urandom % NC] = (1 << (nb_planes - 1));

    got.delete();
    wr_count = 0;
    @(negedge clk);
    cb_start = 1; base = AW'(blk_base); band = bd; trunc = 4'(kt);
    @(negedge clk);
    cb_start = 0;
    for (int s = 0; s < CB / 4; s++)
      for (int x = 0; x < CB; x++)
        for (int r = 0; r < 4; r++) begin
          int me = (4 * s + r) * CB + x;
          coef_valid = 1; coef_mag = NPL'(mag[me]); coef_sign = sgn[me];
          #1;
          while (!coef_ready) begin @(negedge clk); #1; end
          @(negedge clk);
        end
    coef_valid = 0;
    $display("[%0d] block stored", cyc);
    e0 = n_extra; s0 = n_stall; r0 = n_rlc;
    wait (dut.u_ebc.busy == 1'b1 || cb_done == 1'b1);
    c0 = int'(cyc);
    while (!cb_done) @(posedge clk);
    c1 = int'(cyc);
    @(negedge clk);

    check(int'(n_planes) == nb_planes, $sformatf("n_planes %0d expected %0d", n_planes, nb_planes));

    // memory image
    for (int k = 0; k < NPL * one; k++) begin
      int unsigned words [$];
      bpg_words(CB, NPL, W, k, mag, sgn, words);
      exp_words += words.size();
      foreach (words[w_])
        check(mem[AW'(blk_base + w_ * NPL + (NPL - 1 - k))] == words[w_],
              $sformatf("memory word %0d of plane %0d", w_, k));
    end
    check(wr_count == exp_words, $sformatf("%0d words written, expected %0d", wr_count, exp_words));

    // byte streams
    for (int k = kt; k < nb_planes; k++)
      for (int p = 1; p <= 3 * one; p++) begin
        sq_t syms;
        bq_t exp_b;
        int nr;
        if (k == nb_planes - 1 && p != 3) continue;
        syms  = block_symbols(CB, int'(bd), k, p, mag, sgn, nr);
        if (p == 3) ref_rlc += nr;
        exp_b = mq_encode(syms);
        if (!got.exists(k * 4 + p)) begin
          check(0, $sformatf("no stream for plane %0d pass %0d", k, p));
        end else begin
          bq_t g = got[k * 4 + p];
          check(g.size() == exp_b.size(),
                $sformatf("plane %0d pass %0d: %0d bytes, expected %0d (%0d pairs)", k, p,
                          g.size(), exp_b.size(), syms.size()));
          for (int i = 0; i < exp_b.size() && i < g.size(); i++)
            if (g[i] != exp_b[i]) begin
              check(0, $sformatf("plane %0d pass %0d byte %0d: %02x expected %02x", k, p, i,
                                 g[i], exp_b[i]));
              break;
            end
          got.delete(k * 4 + p);
        end
      end
    check(got.size() == 0, $sformatf("%0d unexpected streams", got.size()));

    runs = (nb_planes > kt) ? (nb_planes - kt + NB - 1) / NB : 0;
    if (runs > 1) multi_run_blocks++;
    if (kt > 0) trunc_blocks++;
    // one scan step per cycle, apart from extra dispatcher cycles and data stalls
    if (runs > 0) begin
      int budget = runs * (NC + 8 + 1 + 3 * NB + 16) + (n_extra - e0) + (n_stall - s0);
      check((c1 - c0) <= budget && (c1 - c0) >= runs * (NC + 8),
            $sformatf("coding took %0d cycles, budget %0d", c1 - c0, budget));
      $display("block N=%0d trunc=%0d band=%0d: %0d runs, %0d cycles, %0d extra, %0d stall",
               nb_planes, kt, bd, runs, c1 - c0, n_extra - e0, n_stall - s0);
    end
    n_cycles_code += c1 - c0;
    check(n_rlc - r0 == ref_rlc, $sformatf("%0d run-length columns, expected %0d", n_rlc - r0, ref_rlc));
  endtask

  int rlc_before;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    rlc_before = 0;

    // {planes, truncation, band, % zero coefficients, memory grant %}
    for (int b = 0; b < 5 * one; b++) begin
      int cfg [5][5] = '{'{10, 0, 0, 70, 70},     // three runs
                         '{ 7, 3, 1, 50, 70},     // truncated, one run
                         '{ 9, 2, 2, 85, 70},     // two runs
                         '{ 6, 0, 0, 60, 30},     // slow memory
                         '{ 0, 0, 0,  0, 70}};    // empty block
      gnt_pct = cfg[b][4];
      run_block(cfg[b][0], cfg[b][1], band_e'(cfg[b][2]), cfg[b][3], 4096 * b);
    end

    check(multi_run_blocks >= 1, "no multi-run block");
    check(trunc_blocks >= 1, "no truncated block");
    check(n_state > 0, "state memory never read back");
    check(n_ts2 > 0, "two-symbol encoder never coded two pairs");
    check(n_extra > 0, "no extra dispatcher cycle");
    check(n_rlc > 0, "no run-length coded column");
    check(n_stall > 0, "no data stall");
    $display("events: extra=%0d ts2=%0d rlc=%0d stall=%0d state_reads=%0d multi=%0d trunc=%0d",
             n_extra, n_ts2, n_rlc, n_stall, n_state, multi_run_blocks, trunc_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (cyc % 2000 == 0 && $test$plusargs("dbg"))
    $display("[%0d] ebc st=%0d idx=%0d ks=%0d dec_ok=%b pd=%b valid=%b req=%b q=%0d", cyc, dut.u_ebc.st,
             dut.u_ebc.idx, dut.u_ebc.ks, dut.u_ebc.dec_ok, dut.u_ebc.pairs_done, dut.u_ebc.dec_valid,
             dut.u_ebc.dec_req, dut.u_ebc.u_ag.q_cnt);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
