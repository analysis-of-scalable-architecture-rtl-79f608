// mq_ae: one-symbol arithmetic encoder (the "AE" of the bit-plane parallel
// EBC).
//
// A purely combinational MQ coding step.  The pass-coder registers
// (A, C, CT, B) and the probability state of the context being coded come in,
// the updated values go out, and the caller stores them; this lets one AE
// serve whichever bit-plane coder the dispatcher assigns to it in a cycle.
// The step follows the MQ coder of JPEG 2000: interval subtraction,
// conditional exchange, probability-state transition, then renormalisation
// with byte output and carry handling, done as at most three shift
// segments (a shift count from the leading zeros of A, cut where CT runs out).
//
// With flush=1 the pass coder is terminated instead (the standard FLUSH
// procedure: set bits, two byte-outs, final byte unless it is 0xFF); the
// description terminates the coder at the end of every coding pass.
//
// Output bytes: a step or a flush yields up to three bytes, in
// out_byte[0..n-1] with out_n the count.  The first byte slot of a pass coder is a
// placeholder of the MQ procedure and is never output.
module mq_ae
  import ebc_pkg::*;
(
  input  logic         en,       // code sym (ignored when flush=1)
  input  logic         flush,    // terminate the pass coder
  input  mq_reg_t      st_in,
  input  ctx_state_t   cs_in,    // state of context sym.cx
  input  cxd_t         sym,
  output mq_reg_t      st_out,
  output ctx_state_t   cs_out,
  output logic [1:0]   out_n,
  output logic [2:0][7:0] out_byte
);

  // Coder registers together with the bytes output so far in this cycle.
  typedef struct packed {
    mq_reg_t         r;
    logic [1:0]      n;
    logic [2:0][7:0] ob;
  } acc_t;

  // BYTEOUT of the MQ coder: finishes byte B (unless it is the placeholder)
  // and starts the next one, propagating a carry from C into B.
  function automatic acc_t byte_out(input acc_t x);
    acc_t y;
    y = x;
    if (y.r.b != 8'hFF && y.r.c >= 32'h0800_0000) begin
      y.r.b = y.r.b + 8'd1;             // carry into the byte being finished
      y.r.c = y.r.c & 32'h07FF_FFFF;
    end
    if (y.r.started) begin y.ob[y.n] = y.r.b; y.n = y.n + 2'd1; end
    y.r.started = 1'b1;
    if (y.r.b == 8'hFF) begin
      y.r.b = y.r.c[27:20]; y.r.c = y.r.c & 32'h000F_FFFF; y.r.ct = 4'd7;
    end else begin
      y.r.b = y.r.c[26:19]; y.r.c = y.r.c & 32'h0007_FFFF; y.r.ct = 4'd8;
    end
    return y;
  endfunction

  // Number of leading zeros of A (A is never zero here).
  function automatic logic [3:0] lzc16(input logic [15:0] a);
    logic [3:0] z;
    z = 4'd0;
    for (int i = 0; i < 16; i++)
      if (a[i]) z = 4'(15 - i);
    return z;
  endfunction

  always_comb begin
    acc_t       x;
    ctx_state_t cs;
    qe_row_t    q;
    logic       renorm;
    logic [31:0] tempc;
    logic [3:0] s, sh;

    x.r  = st_in;
    x.n  = '0;
    x.ob = '0;
    cs = cs_in;
    q  = qe_row(cs_in.idx);
    renorm = 1'b0;
    tempc = '0;
    s = '0;
    sh = '0;

    if (flush) begin
      // SETBITS, then two byte-outs and the last byte unless it is 0xFF.
      tempc = x.r.c + {16'h0, x.r.a};
      x.r.c = x.r.c | 32'h0000_FFFF;
      if (x.r.c >= tempc) x.r.c = x.r.c - 32'h0000_8000;
      x.r.c = x.r.c << x.r.ct;
      x = byte_out(x);
      x.r.c = x.r.c << x.r.ct;
      x = byte_out(x);
      if (x.r.b != 8'hFF) begin x.ob[x.n] = x.r.b; x.n = x.n + 2'd1; end
    end else if (en) begin
      x.r.a = x.r.a - q.qe;
      if (sym.d == cs_in.mps) begin
        if (x.r.a[15] == 1'b0) begin
          if (x.r.a < q.qe) x.r.a = q.qe;
          else            x.r.c = x.r.c + {16'h0, q.qe};
          cs.idx = q.nmps;
          renorm = 1'b1;
        end else begin
          x.r.c = x.r.c + {16'h0, q.qe};
        end
      end else begin
        if (x.r.a < q.qe) x.r.c = x.r.c + {16'h0, q.qe};
        else            x.r.a = q.qe;
        if (q.sw) cs.mps = ~cs_in.mps;
        cs.idx = q.nlps;
        renorm = 1'b1;
      end
      // Renormalisation: shift A left until its MSB is set.  CT is at least 1
      // and at least 7 after a byte-out, so 15 shifts need at most three
      // segments, each ending in a byte-out when CT reaches zero.
      if (renorm) s = lzc16(x.r.a);
      for (int seg = 0; seg < 3; seg++) begin
        sh = (s < x.r.ct) ? s : x.r.ct;
        x.r.a  = x.r.a << sh;
        x.r.c  = x.r.c << sh;
        x.r.ct = x.r.ct - sh;
        s    = s - sh;
        if (x.r.ct == 4'd0) x = byte_out(x);
      end
    end

    st_out   = x.r;
    cs_out   = cs;
    out_n    = x.n;
    out_byte = x.ob;
  end

endmodule
