// ebc_state_mem: the EBC state memory.
//
// Holds, for every coefficient of a code-block, the three state bits the
// description lists: the sign, the significance state and the first-refinement
// state (stored here as "significant before the plane above", from which
// first refinement follows).  It is needed only when a code-block has more
// effective bit-planes than there are bit-plane coders, so that the block is
// coded in several runs: the last coder of one run writes the state of each
// coefficient and the first coder of the next run reads it back.  For a 64x64
// code-block that is 4096 x 3 bits = 1.5 KB, the size given in the description.
//
// One synchronous read port (data one cycle after the address) and one write
// port, both in scan order; the read port returns the old value on a same-address
// collision.  No reset: the controller never reads an entry it has not written
// during the current code-block.
module ebc_state_mem
  import ebc_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output coef_state_t   rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  coef_state_t   wr_data
);

  coef_state_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
