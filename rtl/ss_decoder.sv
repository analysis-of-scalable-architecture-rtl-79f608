// ss_decoder: word buffer and sign-scattering decoder ("Buf" + "SS_s") of one
// bit-plane coder.
//
// The bit-plane words of one magnitude bit-plane arrive from external memory
// in scan order, first bit in the word's most significant position.  After
// sign scattering, a coefficient occupies one bit in this plane, or two when
// the plane holds its first 1 bit: then the sign follows the magnitude bit.
// Whether a coefficient already became significant in a higher plane
// (sig_in) comes combinationally from the coder of the plane above, or from
// the state memory, for the same coefficient in the same cycle.  That rule is
// the decoding rule of the description; the 2W-bit buffer, the one
// outstanding word request and the MSB-first bit order are this design's
// choices.
//
// Timing: out_valid says the current coefficient's bits are present;
// consume (only with out_valid) removes them at the clock edge.  A word is
// requested (word_req) while the buffer has room for one more word and none is
// in flight; word_gnt says the request went out, and the word comes back later
// on word_valid.  clear empties the buffer at the start of a run.
module ss_decoder #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  output logic         word_req,
  input  logic         word_gnt,
  input  logic         word_valid,
  input  logic [W-1:0] word_data,
  input  logic         sig_in,
  output logic         out_valid,
  output logic         mu,
  output logic         sign,
  input  logic         consume
);

  localparam int unsigned CW = $clog2(2 * W + 1);

  logic [2*W-1:0] bits;
  logic [CW-1:0]  count;
  logic           pending;

  logic [1:0]     used;
  logic [CW-1:0]  cnt_after;
  logic [2*W-1:0] bits_after;

  assign mu        = bits[2*W-1];
  assign sign      = bits[2*W-2];
  assign out_valid = (count >= CW'(2)) ||
                     ((count == CW'(1)) && (sig_in || !bits[2*W-1]));
  assign word_req  = !pending && (count <= CW'(W)) && !clear;
  assign used      = !consume ? 2'd0 : ((mu && !sig_in) ? 2'd2 : 2'd1);
  assign cnt_after = count - CW'(used);
  assign bits_after = bits << used;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bits    <= '0;
      count   <= '0;
      pending <= 1'b0;
    end else if (clear) begin
      bits    <= '0;
      count   <= '0;
      pending <= 1'b0;
    end else begin
      if (word_valid) begin
        bits  <= bits_after | ({word_data, {W{1'b0}}} >> cnt_after);
        count <= cnt_after + CW'(W);
      end else begin
        bits  <= bits_after;
        count <= cnt_after;
      end
      if (word_gnt)        pending <= 1'b1;
      else if (word_valid) pending <= 1'b0;
    end
  end

  // A word must never overflow the buffer, and bits are only taken when present.
  assert property (@(posedge clk) disable iff (!rst_n) word_valid |-> (cnt_after <= CW'(W)));
  assert property (@(posedge clk) disable iff (!rst_n) consume |-> out_valid);

endmodule
