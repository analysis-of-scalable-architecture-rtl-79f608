// bp_ebc: the bit-plane parallel embedded block coder.
//
// NBPC bit-plane coders (BPC) code NBPC magnitude bit-planes of a code-block
// at the same time.  Each BPC is a word buffer with sign-scattering decoder
// (ss_decoder), a context formation unit (bp_cf) and access to the
// arithmetic encoders through the dispatcher (ebc_ae_bank).  BPC 0, the base
// BPC, codes the highest plane of a run; BPC j codes the plane j below it.
// All BPCs step through the coefficients together, one coefficient per
// cycle: for the coefficient in hand, each BPC hands "significant so far"
// and the sign to the BPC below, so a plane knows the significance of every
// coefficient above it without waiting.
//
// A code-block with n_planes effective planes, truncated at plane trunc
// (planes trunc..n_planes-1 are coded, as chosen by a rate-distortion stage
// ahead of the coder), takes ceil((n_planes-trunc)/NBPC) runs.  Before a
// second or later run, the state memory supplies each coefficient's
// significance, first-refinement state and sign left by the last plane of the
// previous run.  After each run every coded plane's three pass coders are
// terminated.  This run structure, the shared state and the
// TSAE/AE/dispatcher arrangement follow the description; the controller's
// sequencing (init, CB*CB+8 scan steps, flush, wait for reads) is this
// design's.
//
// Timing: a scan step takes one cycle unless a BPC lacks data (a memory word
// not yet returned) or the dispatcher needs an extra cycle for a BPC holding
// more pairs than the encoders take.  start (with the block parameters) is
// taken in IDLE; done pulses when the block is finished.  bs[j] carries the
// bytes of the plane coded by BPC j, tagged with plane and pass.  The ev_*
// outputs pulse on the events they name, for monitoring.
module bp_ebc
  import ebc_pkg::*;
#(
  parameter int unsigned NBPC    = 4,
  parameter int unsigned CB      = 64,
  parameter int unsigned NPLANES = 10,
  parameter int unsigned W       = 32,
  parameter int unsigned AW      = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [3:0]           n_planes,
  input  logic [3:0]           trunc,
  input  band_e                band,
  input  logic [AW-1:0]        base,
  output logic                 busy,
  output logic                 done,
  // external memory read bus
  output logic                 rd_req,
  output logic [AW-1:0]        rd_addr,
  input  logic                 rd_gnt,
  input  logic                 rd_valid,
  input  logic [W-1:0]         rd_data,
  // byte streams
  output bs_out_t [NBPC-1:0]   bs,
  // events
  output logic                 ev_extra_cycle,
  output logic                 ev_ts_two,
  output logic [NBPC-1:0]      ev_rlc,        // per BPC: a run-length coded column starts
  output logic                 ev_data_stall,
  output logic                 ev_state_read
);

  localparam int unsigned NC  = CB * CB;
  localparam int unsigned NS  = NC + 8;
  localparam int unsigned IXW = $clog2(NS + 1);
  localparam int unsigned MAW = $clog2(NC);
  localparam int unsigned JW  = (NBPC > 1) ? $clog2(NBPC) : 1;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_STREAM, S_FLUSH, S_WAIT, S_DONE} st_e;
  st_e st;

  logic [3:0]      n_r, t_r;
  band_e           band_r;
  logic [AW-1:0]   base_r;
  logic signed [5:0] ks;           // top plane of the current run
  logic [IXW-1:0]  idx;            // scan step
  logic [JW-1:0]   fj;
  logic [1:0]      fp;

  logic [NBPC-1:0]      active;
  logic [NBPC-1:0][3:0] plane;
  logic                 first_run, last_run;

  always_comb begin
    for (int j = 0; j < NBPC; j++) begin
      plane[j]  = 4'(int'(ks) - j);
      active[j] = (int'(ks) - j >= int'(t_r)) && (int'(ks) - j >= 0);
    end
  end
  assign first_run = (int'(ks) == int'(n_r) - 1);
  assign last_run  = (int'(ks) - int'(NBPC) < int'(t_r));

  // ---- state memory ----
  coef_state_t smem_rd, smem_wr;
  logic        smem_we;
  logic [MAW-1:0] smem_ra;
  logic        step;
  logic        coef_valid;

  assign coef_valid = (idx < IXW'(NC));
  assign smem_ra    = (st == S_INIT) ? '0 : ((step && coef_valid) ? MAW'(idx + IXW'(1)) : MAW'(idx));

  ebc_state_mem #(.DEPTH(NC)) u_smem (
    .clk(clk), .rd_en(1'b1), .rd_addr(smem_ra), .rd_data(smem_rd),
    .wr_en(smem_we), .wr_addr(MAW'(idx)), .wr_data(smem_wr)
  );

  // ---- coder chain ----
  coef_state_t [NBPC:0]  chain;
  logic [NBPC-1:0]       dec_valid, dec_mu, dec_sign, dec_req, dec_gnt, dec_wvalid;
  logic [W-1:0]          dec_wdata;
  cf_out_t [NBPC-1:0]    cf;
  logic [NBPC-1:0]       rlc_used;
  logic                  dec_ok, pairs_done;
  logic                  run_init;

  assign run_init = (st == S_INIT);
  assign chain[0] = first_run ? '0 : smem_rd;

  for (genvar j = 0; j < int'(NBPC); j++) begin : g_bpc
    always_comb begin
      if (active[j]) begin
        chain[j+1].sig  = chain[j].sig | dec_mu[j];
        chain[j+1].sigp = chain[j].sig;
        chain[j+1].sign = chain[j].sig ? chain[j].sign : (dec_mu[j] & dec_sign[j]);
      end else begin
        chain[j+1] = chain[j];
      end
    end

    ss_decoder #(.W(W)) u_ss (
      .clk(clk), .rst_n(rst_n), .clear(run_init || !active[j] || st == S_IDLE),
      .word_req(dec_req[j]), .word_gnt(dec_gnt[j]),
      .word_valid(dec_wvalid[j]), .word_data(dec_wdata),
      .sig_in(chain[j].sig), .out_valid(dec_valid[j]), .mu(dec_mu[j]), .sign(dec_sign[j]),
      .consume(step && coef_valid && active[j])
    );

    bp_cf #(.CB(CB)) u_cf (
      .clk(clk), .rst_n(rst_n), .clear(run_init), .active(active[j]), .band(band_r),
      .step(step), .in_valid(coef_valid),
      .in_sig(chain[j].sig), .in_sigp(chain[j].sigp), .in_mu(dec_mu[j]),
      .in_sign(chain[j].sig ? chain[j].sign : dec_sign[j]),
      .out(cf[j]), .rlc_used(rlc_used[j])
    );
  end

  always_comb begin
    dec_ok = 1'b1;
    for (int j = 0; j < NBPC; j++)
      if (active[j] && !dec_valid[j]) dec_ok = 1'b0;
  end

  assign step    = (st == S_STREAM) && pairs_done && (dec_ok || !coef_valid);
  assign smem_we = step && coef_valid && !last_run;
  assign smem_wr = chain[NBPC];

  // ---- memory access ----
  logic ag_idle;
  ebc_addr_gen #(.NBPC(NBPC), .NPLANES(NPLANES), .W(W), .AW(AW)) u_ag (
    .clk(clk), .rst_n(rst_n), .init(run_init), .base(base_r), .plane(plane),
    .req(dec_req), .gnt(dec_gnt), .word_valid(dec_wvalid), .word_data(dec_wdata),
    .rd_req(rd_req), .rd_addr(rd_addr), .rd_gnt(rd_gnt), .rd_valid(rd_valid),
    .rd_data(rd_data), .idle(ag_idle)
  );

  // ---- arithmetic encoders ----
  logic ts_two;
  logic fl_en;
  assign fl_en = (st == S_FLUSH) && active[fj] &&
                 !((fp != 2'd2) && (plane[fj] == n_r - 4'd1));

  // Pairs reach the encoders only while scanning.
  cf_out_t [NBPC-1:0] cf_g;
  assign cf_g = (st == S_STREAM) ? cf : '0;

  ebc_ae_bank #(.NBPC(NBPC)) u_bank (
    .clk(clk), .rst_n(rst_n), .init(run_init), .plane(plane), .cf(cf_g),
    .step(step), .pairs_done(pairs_done),
    .flush_en(fl_en), .flush_j(fj), .flush_p(pass_e'(fp + 2'd1)),
    .bs(bs), .ts_two(ts_two)
  );

  // ---- control ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      n_r    <= '0;
      t_r    <= '0;
      band_r <= BAND_LL_LH;
      base_r <= '0;
      ks     <= '0;
      idx    <= '0;
      fj     <= '0;
      fp     <= '0;
    end else begin
      case (st)
        S_IDLE: if (start) begin
          n_r    <= n_planes;
          t_r    <= trunc;
          band_r <= band;
          base_r <= base;
          ks     <= $signed({2'b0, n_planes}) - 6'sd1;
          st     <= (n_planes > trunc) ? S_INIT : S_DONE;
        end
        S_INIT: begin
          idx <= '0;
          st  <= S_STREAM;
        end
        S_STREAM: if (step) begin
          if (idx == IXW'(NS - 1)) begin
            st <= S_FLUSH;
            fj <= '0;
            fp <= '0;
          end else begin
            idx <= idx + IXW'(1);
          end
        end
        S_FLUSH: begin
          if (fp == 2'd2) begin
            fp <= '0;
            if (fj == JW'(NBPC - 1)) st <= S_WAIT;
            else fj <= fj + JW'(1);
          end else begin
            fp <= fp + 2'd1;
          end
        end
        S_WAIT: if (ag_idle) begin
          if (last_run) st <= S_DONE;
          else begin
            ks <= ks - 6'(NBPC);
            st <= S_INIT;
          end
        end
        default: st <= S_IDLE;   // S_DONE
      endcase
    end
  end

  assign busy = (st != S_IDLE);
  assign done = (st == S_DONE);

  assign ev_extra_cycle = (st == S_STREAM) && !pairs_done;
  assign ev_ts_two      = ts_two;
  assign ev_rlc         = step ? rlc_used : '0;
  assign ev_data_stall  = (st == S_STREAM) && coef_valid && !dec_ok;
  assign ev_state_read  = step && coef_valid && !first_run;

endmodule
