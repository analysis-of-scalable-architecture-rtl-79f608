// mq_tsae: two-symbol arithmetic encoder (the "TSAE").
//
// Codes up to two context-decision pairs of the same pass coder in one
// cycle by chaining two one-symbol MQ steps: the second step starts from the
// registers the first one produced.  When both pairs use the same context,
// the second step sees the probability state the first step left behind.
// The description gives the unit's purpose (a bit-plane coder that produced
// two or four pairs is served by it); building it from two chained one-symbol
// steps is this design's choice.
//
// n = 0, 1 or 2 pairs are coded (sym[0] first).  The caller writes cs_out[0]
// back to context sym[0].cx and then cs_out[1] to sym[1].cx.  Up to six output
// bytes, in order, are returned in out_byte with out_n the count.
module mq_tsae
  import ebc_pkg::*;
(
  input  logic [1:0]        n,
  input  mq_reg_t           st_in,
  input  ctx_state_t [1:0]  cs_in,    // states of contexts sym[0].cx, sym[1].cx
  input  cxd_t [1:0]        sym,
  output mq_reg_t           st_out,
  output ctx_state_t [1:0]  cs_out,
  output logic [2:0]        out_n,
  output logic [5:0][7:0]   out_byte
);

  mq_reg_t         st_mid;
  ctx_state_t      cs1_sel;
  logic [1:0]      n0, n1;
  logic [2:0][7:0] b0, b1;

  mq_ae u_first (
    .en(n != 2'd0), .flush(1'b0), .st_in(st_in), .cs_in(cs_in[0]), .sym(sym[0]),
    .st_out(st_mid), .cs_out(cs_out[0]), .out_n(n0), .out_byte(b0)
  );

  // Forward the updated state when both pairs use the same context.
  assign cs1_sel = (sym[1].cx == sym[0].cx) ? cs_out[0] : cs_in[1];

  mq_ae u_second (
    .en(n == 2'd2), .flush(1'b0), .st_in(st_mid), .cs_in(cs1_sel), .sym(sym[1]),
    .st_out(st_out), .cs_out(cs_out[1]), .out_n(n1), .out_byte(b1)
  );

  always_comb begin
    out_byte = '0;
    for (int i = 0; i < 3; i++)
      if (i < int'(n0)) out_byte[i] = b0[i];
    for (int i = 0; i < 3; i++)
      if (i < int'(n1)) out_byte[int'(n0) + i] = b1[i];
    out_n = {1'b0, n0} + {1'b0, n1};
  end

endmodule
