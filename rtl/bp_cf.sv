// bp_cf: bit-plane parallel context formation ("CF") for one magnitude
// bit-plane k.
//
// Coefficients of a CB x CB code-block arrive one per scan step in the JPEG
// 2000 order (four-row stripes, column by column, top to bottom in a column).
// For each coefficient the unit gets its magnitude bit mu (bit k), its sign,
// and whether it was already significant before plane k (sig) and before the
// plane above (sigp); those come from the coders of the higher planes in the
// same cycle, so every plane of the run sees a coefficient at the same time
// and no plane waits for another.
//
// The coding pass of the coefficient C follows the contribution rules of the
// description.  A neighbour scanned after C contributes when it was
// significant before plane k; a neighbour scanned before C contributes also
// when it became significant in pass 1 of plane k.  C is in pass 2 when it is
// itself significant, in pass 3 when no neighbour contributes, otherwise in
// pass 1.  Neighbours in the next stripe count as insignificant (the parallel,
// stripe-causal mode); d1 of the first row of a stripe lies in the previous
// stripe and counts as scanned before.  Contexts of passes 1 and 2 use these
// contributions.  For cleanup (pass 3) contexts, a neighbour scanned before C
// also counts when its plane-k bit is 1, since it was coded in pass 1 or earlier
// in the cleanup; a neighbour scanned after C counts only when it was
// significant before plane k (this design's reading: a later neighbour that
// becomes significant in pass 1 of the same plane is not seen, so a decoder
// must apply the same rule).  Run-length coding of a column in the cleanup
// pass follows the standard: run context 17, two uniform symbols (context
// 18) giving the first row with a 1, then its sign.
//
// To see the neighbours that follow C, the unit works two columns behind the
// input: the step that delivers row r of column x+2 codes row r of column x.
// A 3-bit-per-column line buffer keeps the last row of the previous stripe.
// CB*CB + 8 steps code a code-block; in the last eight, in_valid is low.
//
// Interface: clear starts a code-block run; step advances one scan step (the
// inputs must then be valid).  out holds the 0, 1, 2 or 4 pairs of the current
// step, combinationally from registers, and stays stable until step.
module bp_cf
  import ebc_pkg::*;
#(
  parameter int unsigned CB = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    active,       // this plane is coded in the current run
  input  band_e   band,
  input  logic    step,
  input  logic    in_valid,
  input  logic    in_sig,
  input  logic    in_sigp,
  input  logic    in_mu,
  input  logic    in_sign,
  output cf_out_t out,
  output logic    rlc_used     // current step starts a run-length coded column
);

  localparam int unsigned CW = $clog2(CB);
  localparam int unsigned SW = (CB / 4 > 1) ? $clog2(CB / 4 + 1) : 1;

  typedef struct packed {
    logic sig;
    logic sigp;
    logic mu;
    logic sign;
    logic p1;     // became significant in pass 1 of this plane
  } ent_t;

  typedef struct packed {
    logic s1;     // contribution for pass 1 / pass decision
    logic sf;     // contribution for cleanup contexts
    logic sg;     // sign
  } nb_t;

  ent_t [3:0] prv, cur, nxt, inc;
  nb_t        lb [CB];
  nb_t        lb_old;

  logic [1:0]    in_row;
  logic [CW-1:0] in_col;
  logic [SW-1:0] in_stripe;
  logic [3:0]    warm;          // counts the first 8 steps
  logic          rlc_mode;
  logic [2:0]    rlc_row;       // first row with a 1, 4 = none

  // Position of the coefficient coded in this step.
  logic [1:0]    r;
  logic [CW-1:0] cx;
  logic [SW-1:0] ps;
  logic          proc_valid;
  logic          has_prev, has_next, has_up;

  assign r          = in_row;
  assign cx         = in_col - CW'(2);
  assign ps         = (in_col >= CW'(2)) ? in_stripe : in_stripe - SW'(1);
  assign proc_valid = (warm == 4'd8);
  assign has_prev   = (cx != '0);
  assign has_next   = (cx != CW'(CB - 1));
  assign has_up     = (ps != '0);

  function automatic nb_t before_nb(input ent_t e);
    nb_t n;
    n.s1 = e.sig | (e.mu & e.p1);
    n.sf = e.sig | e.mu;
    n.sg = e.sign;
    return n;
  endfunction

  function automatic nb_t after_nb(input ent_t e);
    nb_t n;
    n.s1 = e.sig;
    n.sf = e.sig;
    n.sg = e.sign;
    return n;
  endfunction

  ent_t c;
  nb_t  h0, h1, v0, v1, d0, d1, d2, d3;
  pass_e pass;
  logic  rlc_start;
  logic  rlc_hit;
  logic [1:0] rlc_first;
  logic  skip;
  logic [1:0] hs1, vs1, hsf, vsf;
  logic [2:0] ds1, dsf;
  logic [5:0] sc1, scf;

  always_comb begin
    c  = cur[r];
    h0 = has_prev ? before_nb(prv[r]) : '0;
    h1 = has_next ? after_nb(nxt[r]) : '0;
    if (r != 2'd0) begin
      v0 = before_nb(cur[r - 2'd1]);
      d0 = has_prev ? before_nb(prv[r - 2'd1]) : '0;
      d1 = has_next ? after_nb(nxt[r - 2'd1]) : '0;
    end else begin
      v0 = has_up ? lb[cx] : '0;
      d0 = (has_up && has_prev) ? lb_old : '0;
      d1 = (has_up && has_next) ? lb[cx + CW'(1)] : '0;
    end
    if (r != 2'd3) begin
      v1 = after_nb(cur[r + 2'd1]);
      d2 = has_prev ? before_nb(prv[r + 2'd1]) : '0;
      d3 = has_next ? after_nb(nxt[r + 2'd1]) : '0;
    end else begin
      v1 = '0;
      d2 = '0;
      d3 = '0;
    end

    hs1 = {1'b0, h0.s1} + {1'b0, h1.s1};
    vs1 = {1'b0, v0.s1} + {1'b0, v1.s1};
    ds1 = {2'b0, d0.s1} + {2'b0, d1.s1} + {2'b0, d2.s1} + {2'b0, d3.s1};
    hsf = {1'b0, h0.sf} + {1'b0, h1.sf};
    vsf = {1'b0, v0.sf} + {1'b0, v1.sf};
    dsf = {2'b0, d0.sf} + {2'b0, d1.sf} + {2'b0, d2.sf} + {2'b0, d3.sf};
    sc1 = sc_context(h0.s1, h0.sg, h1.s1, h1.sg, v0.s1, v0.sg, v1.s1, v1.sg);
    scf = sc_context(h0.sf, h0.sg, h1.sf, h1.sg, v0.sf, v0.sg, v1.sf, v1.sg);

    // Pass decision (pass 2 / pass 3 / pass 1).
    if (c.sig)                                  pass = PASS_MRP;
    else if (hs1 == 2'd0 && vs1 == 2'd0 && ds1 == 3'd0) pass = PASS_CUP;
    else                                        pass = PASS_SPP;

    // Run-length mode: at the top of a column whose four coefficients are
    // insignificant and have no significant neighbour.
    rlc_start = (r == 2'd0) &&
                !(cur[0].sig | cur[1].sig | cur[2].sig | cur[3].sig) &&
                !(has_prev && (before_nb(prv[0]).sf | before_nb(prv[1]).sf |
                               before_nb(prv[2]).sf | before_nb(prv[3]).sf)) &&
                !(has_next && (nxt[0].sig | nxt[1].sig | nxt[2].sig | nxt[3].sig)) &&
                !(has_up && (lb[cx].sf | (has_prev && lb_old.sf) |
                             (has_next && lb[cx + CW'(1)].sf)));
    rlc_hit   = cur[0].mu | cur[1].mu | cur[2].mu | cur[3].mu;
    rlc_first = cur[0].mu ? 2'd0 : (cur[1].mu ? 2'd1 : (cur[2].mu ? 2'd2 : 2'd3));
    skip      = (r != 2'd0) && rlc_mode && (rlc_row == 3'd4 || {1'b0, r} <= rlc_row);

    out = '0;
    if (proc_valid && active) begin
      if (rlc_start) begin
        out.pass = PASS_CUP;
        out.pair[0] = '{cx: CX_RL, d: rlc_hit};
        if (rlc_hit) begin
          out.cnt = 3'd4;
          out.pair[1] = '{cx: CX_UNI, d: rlc_first[1]};
          out.pair[2] = '{cx: CX_UNI, d: rlc_first[0]};
          out.pair[3] = '{cx: CX_SC0, d: cur[rlc_first].sign};
        end else begin
          out.cnt = 3'd1;
        end
      end else if (!skip) begin
        out.pass = pass;
        case (pass)
          PASS_MRP: begin
            out.cnt = 3'd1;
            out.pair[0] = '{cx: mr_context(c.sig & ~c.sigp,
                                           (hs1 != 0) || (vs1 != 0) || (ds1 != 0)),
                            d: c.mu};
          end
          PASS_SPP: begin
            out.pair[0] = '{cx: zc_context(band, hs1, vs1, ds1), d: c.mu};
            out.pair[1] = '{cx: sc1[4:0], d: c.sign ^ sc1[5]};
            out.cnt = c.mu ? 3'd2 : 3'd1;
          end
          default: begin
            out.pair[0] = '{cx: zc_context(band, hsf, vsf, dsf), d: c.mu};
            out.pair[1] = '{cx: scf[4:0], d: c.sign ^ scf[5]};
            out.cnt = c.mu ? 3'd2 : 3'd1;
          end
        endcase
      end
    end
  end

  assign rlc_used = proc_valid && active && rlc_start;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      prv       <= '0;
      cur       <= '0;
      nxt       <= '0;
      inc       <= '0;
      lb_old    <= '0;
      in_row    <= '0;
      in_col    <= '0;
      in_stripe <= '0;
      warm      <= '0;
      rlc_mode  <= 1'b0;
      rlc_row   <= 3'd4;
    end else if (step) begin
      ent_t       newc, upd;
      ent_t [3:0] cur_u;
      newc = in_valid ? '{sig: in_sig, sigp: in_sigp, mu: in_mu, sign: in_sign, p1: 1'b0}
                      : '0;
      cur_u = cur;
      upd = cur[r];
      upd.p1 = proc_valid && !rlc_start && !skip && (pass == PASS_SPP);
      cur_u[r] = upd;
      cur[r] <= upd;

      if (r == 2'd0) begin
        rlc_mode <= proc_valid && rlc_start;
        rlc_row  <= rlc_hit ? {1'b0, rlc_first} : 3'd4;
      end

      if (r == 2'd3) begin
        if (proc_valid) begin
          lb[cx]  <= before_nb(cur_u[3]);
          lb_old  <= lb[cx];
        end
        prv <= cur_u;
        cur <= nxt;
        nxt <= inc;
        nxt[3] <= newc;
      end else begin
        inc[r] <= newc;
      end

      in_row <= in_row + 2'd1;
      if (r == 2'd3) begin
        in_col <= in_col + CW'(1);
        if (in_col == CW'(CB - 1)) in_stripe <= in_stripe + SW'(1);
      end
      if (warm != 4'd8) warm <= warm + 4'd1;
    end
  end

endmodule
