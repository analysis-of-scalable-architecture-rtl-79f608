// ebc_pkg: types, constants and table functions shared by the bit-plane
// parallel embedded block coder (EBC).
//
// The coder works on code-blocks of CB x CB sign-magnitude coefficients,
// scanned column by column inside stripes of four rows.  Each bit-plane coder
// (BPC) turns one magnitude bit-plane into context-decision pairs which are
// arithmetic coded by an MQ coder.  The coding-pass numbering (1 = significance
// propagation, 2 = magnitude refinement, 3 = cleanup), the 64x64 code-block,
// the ten magnitude bit-planes and the four-BPC configuration follow the
// design description.  The context labels, the zero-coding / sign-coding /
// refinement context tables and the MQ probability table are the ones of the
// JPEG 2000 standard (ITU-T T.800 Annex C and D); the description refers to the
// standard for them and does not reprint them.
//
// Context labels used throughout: 0..8 zero coding, 9..13 sign coding,
// 14..16 magnitude refinement, 17 run-length, 18 uniform.
package ebc_pkg;

  localparam int unsigned NUM_CTX = 19;
  localparam logic [4:0] CX_RL  = 5'd17;
  localparam logic [4:0] CX_UNI = 5'd18;
  localparam logic [4:0] CX_SC0 = 5'd9;

  // Coding pass numbers as used in the description.
  typedef enum logic [1:0] {
    PASS_NONE = 2'd0,
    PASS_SPP  = 2'd1,   // pass 1: significance propagation
    PASS_MRP  = 2'd2,   // pass 2: magnitude refinement
    PASS_CUP  = 2'd3    // pass 3: cleanup
  } pass_e;

  // Sub-band orientation selects the zero-coding table.
  typedef enum logic [1:0] {
    BAND_LL_LH = 2'd0,
    BAND_HL    = 2'd1,
    BAND_HH    = 2'd2
  } band_e;

  // One context-decision pair.
  typedef struct packed {
    logic [4:0] cx;
    logic       d;
  } cxd_t;

  // Adaptive probability state of one context.
  typedef struct packed {
    logic [5:0] idx;
    logic       mps;
  } ctx_state_t;

  // MQ coder registers of one pass coder (one pass of one bit-plane).
  typedef struct packed {
    logic [15:0] a;
    logic [31:0] c;
    logic [3:0]  ct;
    logic [7:0]  b;
    logic        started;  // the first byte slot is a placeholder, not output
  } mq_reg_t;

  // Per-coefficient information handed from one BPC to the next lower one
  // and kept in the state memory between runs.
  typedef struct packed {
    logic sig;      // significant before the current bit-plane
    logic sigp;     // significant before the bit-plane above it
    logic sign;     // sign, valid once significant
  } coef_state_t;

  // Context-decision pairs a bit-plane coder produced for one scan step.
  typedef struct packed {
    logic [2:0]   cnt;      // 0, 1, 2 or 4
    pass_e        pass;
    cxd_t [3:0]   pair;     // pair[0] is coded first
  } cf_out_t;

  // Up to six bytes a pass coder produced in one cycle (two symbols of
  // the two-symbol encoder, up to three bytes each).
  typedef struct packed {
    logic [5:0]       valid;  // valid[i] qualifies byte_[i]; bytes are in order
    logic [5:0][7:0]  byte_;
    logic [3:0]       plane;
    pass_e            pass;
  } bs_out_t;

  function automatic mq_reg_t mq_reg_init();
    mq_reg_t r;
    r.a = 16'h8000;
    r.c = '0;
    r.ct = 4'd12;
    r.b = '0;
    r.started = 1'b0;
    return r;
  endfunction

  // Initial context states after a reset of the probability models.
  function automatic ctx_state_t ctx_init(input int unsigned cx);
    ctx_state_t s;
    s.mps = 1'b0;
    if (cx == 0)            s.idx = 6'd4;
    else if (cx == 17)      s.idx = 6'd3;
    else if (cx == 18)      s.idx = 6'd46;
    else                    s.idx = 6'd0;
    return s;
  endfunction

  // MQ probability estimation table: {Qe, NMPS, NLPS, SWITCH}.
  typedef struct packed {
    logic [15:0] qe;
    logic [5:0]  nmps;
    logic [5:0]  nlps;
    logic        sw;
  } qe_row_t;

  function automatic qe_row_t qe_row(input logic [5:0] i);
    qe_row_t r;
    case (i)
      6'd0 : r = '{16'h5601, 6'd1 , 6'd1 , 1'b1};
      6'd1 : r = '{16'h3401, 6'd2 , 6'd6 , 1'b0};
      6'd2 : r = '{16'h1801, 6'd3 , 6'd9 , 1'b0};
      6'd3 : r = '{16'h0AC1, 6'd4 , 6'd12, 1'b0};
      6'd4 : r = '{16'h0521, 6'd5 , 6'd29, 1'b0};
      6'd5 : r = '{16'h0221, 6'd38, 6'd33, 1'b0};
      6'd6 : r = '{16'h5601, 6'd7 , 6'd6 , 1'b1};
      6'd7 : r = '{16'h5401, 6'd8 , 6'd14, 1'b0};
      6'd8 : r = '{16'h4801, 6'd9 , 6'd14, 1'b0};
      6'd9 : r = '{16'h3801, 6'd10, 6'd14, 1'b0};
      6'd10: r = '{16'h3001, 6'd11, 6'd17, 1'b0};
      6'd11: r = '{16'h2401, 6'd12, 6'd18, 1'b0};
      6'd12: r = '{16'h1C01, 6'd13, 6'd20, 1'b0};
      6'd13: r = '{16'h1601, 6'd29, 6'd21, 1'b0};
      6'd14: r = '{16'h5601, 6'd15, 6'd14, 1'b1};
      6'd15: r = '{16'h5401, 6'd16, 6'd14, 1'b0};
      6'd16: r = '{16'h5101, 6'd17, 6'd15, 1'b0};
      6'd17: r = '{16'h4801, 6'd18, 6'd16, 1'b0};
      6'd18: r = '{16'h3801, 6'd19, 6'd17, 1'b0};
      6'd19: r = '{16'h3401, 6'd20, 6'd18, 1'b0};
      6'd20: r = '{16'h3001, 6'd21, 6'd19, 1'b0};
      6'd21: r = '{16'h2801, 6'd22, 6'd19, 1'b0};
      6'd22: r = '{16'h2401, 6'd23, 6'd20, 1'b0};
      6'd23: r = '{16'h2201, 6'd24, 6'd21, 1'b0};
      6'd24: r = '{16'h1C01, 6'd25, 6'd22, 1'b0};
      6'd25: r = '{16'h1801, 6'd26, 6'd23, 1'b0};
      6'd26: r = '{16'h1601, 6'd27, 6'd24, 1'b0};
      6'd27: r = '{16'h1401, 6'd28, 6'd25, 1'b0};
      6'd28: r = '{16'h1201, 6'd29, 6'd26, 1'b0};
      6'd29: r = '{16'h1101, 6'd30, 6'd27, 1'b0};
      6'd30: r = '{16'h0AC1, 6'd31, 6'd28, 1'b0};
      6'd31: r = '{16'h09C1, 6'd32, 6'd29, 1'b0};
      6'd32: r = '{16'h08A1, 6'd33, 6'd30, 1'b0};
      6'd33: r = '{16'h0521, 6'd34, 6'd31, 1'b0};
      6'd34: r = '{16'h0441, 6'd35, 6'd32, 1'b0};
      6'd35: r = '{16'h02A1, 6'd36, 6'd33, 1'b0};
      6'd36: r = '{16'h0221, 6'd37, 6'd34, 1'b0};
      6'd37: r = '{16'h0141, 6'd38, 6'd35, 1'b0};
      6'd38: r = '{16'h0111, 6'd39, 6'd36, 1'b0};
      6'd39: r = '{16'h0085, 6'd40, 6'd37, 1'b0};
      6'd40: r = '{16'h0049, 6'd41, 6'd38, 1'b0};
      6'd41: r = '{16'h0025, 6'd42, 6'd39, 1'b0};
      6'd42: r = '{16'h0015, 6'd43, 6'd40, 1'b0};
      6'd43: r = '{16'h0009, 6'd44, 6'd41, 1'b0};
      6'd44: r = '{16'h0005, 6'd45, 6'd42, 1'b0};
      6'd45: r = '{16'h0001, 6'd45, 6'd43, 1'b0};
      default: r = '{16'h5601, 6'd46, 6'd46, 1'b0};
    endcase
    return r;
  endfunction

  // Zero-coding context from the number of significant horizontal (0..2),
  // vertical (0..2) and diagonal (0..4) neighbours.
  function automatic logic [4:0] zc_context(input band_e band, input logic [1:0] h_in,
                                            input logic [1:0] v_in, input logic [2:0] d);
    logic [1:0] h, v;
    logic [2:0] hv;
    logic [4:0] cx;
    if (band == BAND_HL) begin h = v_in; v = h_in; end
    else                 begin h = h_in; v = v_in; end
    hv = {1'b0, h} + {1'b0, v};
    if (band == BAND_HH) begin
      if (d >= 3)                cx = 5'd8;
      else if (d == 2)           cx = (hv >= 1) ? 5'd7 : 5'd6;
      else if (d == 1)           cx = (hv >= 2) ? 5'd5 : ((hv == 1) ? 5'd4 : 5'd3);
      else                       cx = (hv >= 2) ? 5'd2 : ((hv == 1) ? 5'd1 : 5'd0);
    end else begin
      if (h == 2)                cx = 5'd8;
      else if (h == 1)           cx = (v >= 1) ? 5'd7 : ((d >= 1) ? 5'd6 : 5'd5);
      else if (v == 2)           cx = 5'd4;
      else if (v == 1)           cx = 5'd3;
      else                       cx = (d >= 2) ? 5'd2 : ((d == 1) ? 5'd1 : 5'd0);
    end
    return cx;
  endfunction

  // Sign-coding context and the bit the sign is XORed with.  Each neighbour
  // contributes +1 (significant, positive), -1 (significant, negative) or 0.
  // Returns {xor_bit, context}.
  function automatic logic [5:0] sc_context(input logic h0s, input logic h0n,
                                            input logic h1s, input logic h1n,
                                            input logic v0s, input logic v0n,
                                            input logic v1s, input logic v1n);
    int hc, vc;
    logic [4:0] cx;
    logic       x;
    hc = (h0s ? (h0n ? -1 : 1) : 0) + (h1s ? (h1n ? -1 : 1) : 0);
    vc = (v0s ? (v0n ? -1 : 1) : 0) + (v1s ? (v1n ? -1 : 1) : 0);
    if (hc > 1)  hc = 1;
    if (hc < -1) hc = -1;
    if (vc > 1)  vc = 1;
    if (vc < -1) vc = -1;
    x = 1'b0;
    if (hc == 1) begin
      cx = (vc == 1) ? 5'd13 : ((vc == 0) ? 5'd12 : 5'd11);
    end else if (hc == 0) begin
      cx = (vc == 0) ? 5'd9 : 5'd10;
      x  = (vc == -1);
    end else begin
      cx = (vc == 1) ? 5'd11 : ((vc == 0) ? 5'd12 : 5'd13);
      x  = 1'b1;
    end
    return {x, cx};
  endfunction

  // Magnitude-refinement context.
  function automatic logic [4:0] mr_context(input logic first_ref, input logic any_nb);
    if (!first_ref) return 5'd16;
    return any_nb ? 5'd15 : 5'd14;
  endfunction

endpackage
