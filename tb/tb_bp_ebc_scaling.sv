// tb_bp_ebc_scaling: runs the bit-plane parallel coder with 2, 5 and 7
// bit-plane coders side by side (one instance each, 16x16 code-blocks).
//
// Each instance has its own memory model (random grants, in-order reads with
// random latency) preloaded with the grouped, sign-scattered words of random
// 10-plane code-blocks, truncated at different planes so that the number of
// runs varies with the coder count.  Every byte of every plane and pass stream
// is compared with the software coder.  The testbench also measures the cycle
// overhead of the dispatcher (extra cycles per scan step) for each coder count
// and checks that each block finishes within one cycle per scan step plus the
// extra and stall cycles, flushes and drains.
module tb_bp_ebc_scaling;
  import ebc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NI = 3, CB = 16, NC = CB * CB, NPL = 10, W = 32, AW = 16;
  localparam int NBS [NI] = '{2, 5, 7};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  bit fin [NI];
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endfunction

  for (genvar gi = 0; gi < NI; gi++) begin : g_inst
    localparam int NB = NBS[gi];
    logic start = 0, busy, done, rd_req, rd_gnt = 0, rd_valid;
    logic [3:0] n_planes = '0, trunc = '0;
    band_e band = BAND_LL_LH;
    logic [AW-1:0] base = '0, rd_addr;
    logic [W-1:0] rd_data;
    bs_out_t [NB-1:0] bs;
    logic ev_extra_cycle, ev_ts_two, ev_data_stall, ev_state_read;
    logic [NB-1:0] ev_rlc;

    bp_ebc #(.NBPC(NB), .CB(CB), .NPLANES(NPL), .W(W), .AW(AW)) dut (
      .clk, .rst_n, .start, .n_planes, .trunc, .band, .base, .busy, .done,
      .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data, .bs,
      .ev_extra_cycle, .ev_ts_two, .ev_rlc, .ev_data_stall, .ev_state_read
    );

    logic [W-1:0] mem [int];
    int unsigned rq_addr [$];
    int          rq_time [$];
    int          last_t = 0;
    always_comb begin
      rd_valid = (rq_time.size() != 0) && (rq_time[0] <= cyc);
      rd_data  = (rd_valid && mem.exists(int'(rq_addr[0]))) ? mem[int'(rq_addr[0])] : '0;
    end
    always @(posedge clk) begin
      rd_gnt <= ($urandom % 5) != 0;
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

    bq_t got [int];
    int n_extra = 0, n_stall = 0, n_steps = 0;
    always @(posedge clk) begin
      for (int j = 0; j < NB; j++)
        for (int i = 0; i < 6; i++)
          if (bs[j].valid[i]) got[int'(bs[j].plane) * 4 + int'(bs[j].pass)].push_back(bs[j].byte_[i]);
      n_extra += ev_extra_cycle;
      n_stall += ev_data_stall;
    end

    int unsigned mag [];
    bit          sgn [];

    task automatic run_block(input int np, input int kt, input band_e bd);
      int e0, s0, c0, runs;
      for (int i = 0; i < NC; i++) begin
        sgn[i] = $urandom % 2;
        mag[i] = (($urandom % 100) < 50) ? 0 : $urandom % (1 << np);
      end
      mag[$urandom % NC] = 1 << (np - 1);
      mem.delete();
      for (int k = 0; k < NPL * one; k++) begin
        int unsigned words [$];
        words.delete();
        bpg_words(CB, NPL, W, k, mag, sgn, words);
        foreach (words[i]) mem[64 + i * NPL + (NPL - 1 - k)] = words[i];
      end
      got.delete();
      e0 = n_extra; s0 = n_stall;
      @(negedge clk);
      start = 1; n_planes = 4'(np); trunc = 4'(kt); band = bd; base = AW'(64);
      c0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      runs = (np - kt + NB - 1) / NB;
      n_steps += runs * (NC + 8);
      check(cyc - c0 <= runs * (NC + 8 + 3 * NB + 16) + (n_extra - e0) + (n_stall - s0),
            $sformatf("NBPC=%0d: block took %0d cycles", NB, cyc - c0));
      for (int k = kt; k < np; k++)
        for (int p = 1; p <= 3 * one; p++) begin
          sq_t syms;
          int nr;
          if (k == np - 1 && p != 3) continue;
          syms = block_symbols(CB, int'(bd), k, p, mag, sgn, nr);
          check(got.exists(k * 4 + p) && got[k * 4 + p] == mq_encode(syms),
                $sformatf("NBPC=%0d plane %0d pass %0d stream", NB, k, p));
          got.delete(k * 4 + p);
        end
      check(got.size() == 0, $sformatf("NBPC=%0d: streams outside the coded planes", NB));
    endtask

    initial begin
      mag = new[NC];
      sgn = new[NC];
      wait (rst_n);
      run_block(10, 0, BAND_LL_LH);
      run_block(10, 3, BAND_HL);
      run_block(8, 2, BAND_HH);
      $display("NBPC=%0d: %0d scan steps, %0d extra dispatcher cycles (%0d.%0d%%), %0d data stalls",
               NB, n_steps, n_extra, 100 * n_extra / n_steps, (1000 * n_extra / n_steps) % 10, n_stall);
      check(n_extra * 5 < n_steps, $sformatf("NBPC=%0d: dispatcher overhead above 20%%", NB));
      fin[gi] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
