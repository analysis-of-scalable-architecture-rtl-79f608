// ebc_ae_bank: the arithmetic-encoder side of the bit-plane parallel EBC:
// the dispatcher, one two-symbol encoder (TSAE), NBPC-1 one-symbol encoders
// (AE), and the pass-coder registers they work on.
//
// Every bit-plane coder (BPC) owns three MQ pass coders, one per coding
// pass, because the parallel mode terminates the coder at the end of each pass
// and resets the probability models for each pass; a pass coder is the A, C, CT
// and B registers plus 19 context states.  The encoders themselves hold no
// state: each cycle the dispatcher decides which BPC each encoder serves, the
// encoder reads that BPC's pass coder of the current pass, and the result is
// written back.  Keeping the pass coders here and the encoders stateless is this
// design's way of letting the dispatcher move any BPC's pairs to the TSAE.
//
// Timing: cf[j] is the pair bundle of BPC j for the current scan step.  The
// bank keeps how many pairs of the step are already coded; pairs_done says
// that this cycle codes the last of them.  The step advances on step (from the
// controller), which clears the counts.  init resets all pass coders at the start
// of a run.  flush_en terminates pass coder (flush_j, flush_p) in one cycle; the
// controller flushes only while no pairs are pending.  bs[j] carries the bytes
// of BPC j produced in the cycle.
module ebc_ae_bank
  import ebc_pkg::*;
#(
  parameter int unsigned NBPC = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          init,
  input  logic [NBPC-1:0][3:0]          plane,
  input  cf_out_t [NBPC-1:0]            cf,
  input  logic                          step,
  output logic                          pairs_done,
  input  logic                          flush_en,
  input  logic [((NBPC > 1) ? $clog2(NBPC) : 1)-1:0]     flush_j,
  input  pass_e                         flush_p,
  output bs_out_t [NBPC-1:0]            bs,
  output logic                          ts_two      // the TSAE coded two pairs
);

  localparam int unsigned SW = (NBPC > 1) ? $clog2(NBPC) : 1;

  mq_reg_t    st  [NBPC][3];
  ctx_state_t cs  [NBPC][3][NUM_CTX];
  logic [2:0] done [NBPC];

  // Pairs left and the next two of each BPC.
  logic [NBPC-1:0][2:0] rem;
  cxd_t [NBPC-1:0][1:0] nxt2;
  logic [NBPC-1:0][1:0] pidx;   // pass coder index = pass - 1

  always_comb begin
    for (int j = 0; j < NBPC; j++) begin
      rem[j]  = (cf[j].cnt > done[j]) ? cf[j].cnt - done[j] : 3'd0;
      nxt2[j][0] = cf[j].pair[done[j][1:0]];
      nxt2[j][1] = cf[j].pair[done[j][1:0] + 2'd1];
      pidx[j] = (cf[j].pass == PASS_NONE) ? 2'd0 : 2'(cf[j].pass) - 2'd1;
    end
  end

  logic [SW-1:0]            ts_src;
  logic [1:0]               ts_n;
  logic [NBPC-1:0][1:0]     take;
  logic [NBPC-1:0][SW-1:0]  unit_of;

  ebc_dispatcher #(.NBPC(NBPC)) u_dp (
    .rem(rem), .ts_src(ts_src), .ts_n(ts_n), .take(take), .unit_of(unit_of),
    .step_done(pairs_done)
  );

  // ---- TSAE ----
  mq_reg_t          ts_st_in, ts_st_out;
  ctx_state_t [1:0] ts_cs_in, ts_cs_out;
  cxd_t [1:0]       ts_sym;
  logic [2:0]       ts_on;
  logic [5:0][7:0]  ts_ob;

  always_comb begin
    ts_sym      = nxt2[ts_src];
    ts_st_in    = st[ts_src][pidx[ts_src]];
    ts_cs_in[0] = cs[ts_src][pidx[ts_src]][ts_sym[0].cx];
    ts_cs_in[1] = cs[ts_src][pidx[ts_src]][ts_sym[1].cx];
  end

  mq_tsae u_tsae (
    .n(ts_n), .st_in(ts_st_in), .cs_in(ts_cs_in), .sym(ts_sym),
    .st_out(ts_st_out), .cs_out(ts_cs_out), .out_n(ts_on), .out_byte(ts_ob)
  );

  assign ts_two = (ts_n == 2'd2);

  // ---- one-symbol AEs: AE u serves BPC u (u < ts_src) or u+1 ----
  mq_reg_t          ae_st_in  [NBPC-1];
  mq_reg_t          ae_st_out [NBPC-1];
  ctx_state_t       ae_cs_in  [NBPC-1];
  ctx_state_t       ae_cs_out [NBPC-1];
  cxd_t             ae_sym    [NBPC-1];
  logic             ae_en     [NBPC-1];
  logic [1:0]       ae_on     [NBPC-1];
  logic [2:0][7:0]  ae_ob     [NBPC-1];
  logic [SW-1:0]    ae_src    [NBPC-1];

  for (genvar u = 0; u < int'(NBPC) - 1; u++) begin : g_ae
    assign ae_src[u] = (SW'(u) < ts_src) ? SW'(u) : SW'(u + 1);
    always_comb begin
      ae_sym[u]   = nxt2[ae_src[u]][0];
      ae_en[u]    = (take[ae_src[u]] != 2'd0);
      ae_st_in[u] = st[ae_src[u]][pidx[ae_src[u]]];
      ae_cs_in[u] = cs[ae_src[u]][pidx[ae_src[u]]][ae_sym[u].cx];
    end
    mq_ae u_ae (
      .en(ae_en[u]), .flush(1'b0), .st_in(ae_st_in[u]), .cs_in(ae_cs_in[u]),
      .sym(ae_sym[u]), .st_out(ae_st_out[u]), .cs_out(ae_cs_out[u]),
      .out_n(ae_on[u]), .out_byte(ae_ob[u])
    );
  end

  // ---- terminating encoder used at the end of a run ----
  mq_reg_t         fl_st_out;
  ctx_state_t      fl_cs_unused;
  logic [1:0]      fl_on;
  logic [2:0][7:0] fl_ob;
  logic [1:0]      fl_pidx;

  assign fl_pidx = (flush_p == PASS_NONE) ? 2'd0 : 2'(flush_p) - 2'd1;

  mq_ae u_flush (
    .en(1'b0), .flush(1'b1), .st_in(st[flush_j][fl_pidx]), .cs_in('0), .sym('0),
    .st_out(fl_st_out), .cs_out(fl_cs_unused), .out_n(fl_on), .out_byte(fl_ob)
  );

  // ---- byte outputs ----
  always_comb begin
    for (int j = 0; j < NBPC; j++) begin
      bs[j] = '0;
      bs[j].plane = plane[j];
      bs[j].pass  = cf[j].pass;
      if (flush_en && SW'(j) == flush_j) begin
        bs[j].pass = flush_p;
        for (int i = 0; i < 3; i++)
          if (i < int'(fl_on)) begin bs[j].valid[i] = 1'b1; bs[j].byte_[i] = fl_ob[i]; end
      end else if (unit_of[j] == '0) begin
        if (SW'(j) == ts_src)
          for (int i = 0; i < 6; i++)
            if (i < int'(ts_on)) begin bs[j].valid[i] = 1'b1; bs[j].byte_[i] = ts_ob[i]; end
      end else begin
        for (int i = 0; i < 3; i++)
          if (i < int'(ae_on[unit_of[j] - SW'(1)])) begin
            bs[j].valid[i] = 1'b1;
            bs[j].byte_[i] = ae_ob[unit_of[j] - SW'(1)][i];
          end
      end
    end
  end

  // ---- pass coder write-back ----
  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      for (int j = 0; j < NBPC; j++) begin
        done[j] <= '0;
        for (int p = 0; p < 3; p++) begin
          st[j][p] <= mq_reg_init();
          for (int x = 0; x < NUM_CTX; x++) cs[j][p][x] <= ctx_init(x);
        end
      end
    end else begin
      for (int j = 0; j < NBPC; j++)
        done[j] <= step ? 3'd0 : done[j] + {1'b0, take[j]};
      if (flush_en)
        st[flush_j][fl_pidx] <= fl_st_out;
      if (ts_n != 2'd0) begin
        st[ts_src][pidx[ts_src]] <= ts_st_out;
        cs[ts_src][pidx[ts_src]][ts_sym[0].cx] <= ts_cs_out[0];
        if (ts_n == 2'd2)
          cs[ts_src][pidx[ts_src]][ts_sym[1].cx] <= ts_cs_out[1];
      end
      for (int u = 0; u < int'(NBPC) - 1; u++) begin
        if (ae_en[u]) begin
          st[ae_src[u]][pidx[ae_src[u]]] <= ae_st_out[u];
          cs[ae_src[u]][pidx[ae_src[u]]][ae_sym[u].cx] <= ae_cs_out[u];
        end
      end
    end
  end

endmodule
