// ebc_addr_gen: address generator ("AG") fetching bit-plane words for the
// bit-plane coders from external memory.
//
// In external memory the words of a code-block are stored plane-interleaved
// (bit-plane grouping): word w of magnitude plane k is at
//   base + w*NPLANES + (NPLANES-1-k),
// so the first word of the MSB plane is followed by the first word of the next
// lower plane, and so on.  Each coder reads its own plane sequentially; planes
// below the truncation point are never addressed.  The layout follows the
// description; the round-robin choice among coders, the one-request-per-cycle
// bus and in-order read data are this design's choices.
//
// Bus: rd_req/rd_addr is a request, accepted in a cycle with rd_gnt.  Read data
// returns later, in request order, on rd_valid/rd_data; a small queue of
// coder numbers routes it back.  init (start of a run) clears the word
// counters; idle says no read is in flight.  init may only be raised while
// idle, because it also empties the routing queue.  word_data is rd_data
// itself: the returning word goes to all coders and word_valid selects one.
module ebc_addr_gen #(
  parameter int unsigned NBPC    = 4,
  parameter int unsigned NPLANES = 10,
  parameter int unsigned W       = 32,
  parameter int unsigned AW      = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic [AW-1:0]            base,
  input  logic [NBPC-1:0][3:0]     plane,
  input  logic [NBPC-1:0]          req,       // from the coders' word buffers
  output logic [NBPC-1:0]          gnt,       // request of coder j went out
  output logic [NBPC-1:0]          word_valid,
  output logic [W-1:0]             word_data,
  output logic                     rd_req,
  output logic [AW-1:0]            rd_addr,
  input  logic                     rd_gnt,
  input  logic                     rd_valid,
  input  logic [W-1:0]             rd_data,
  output logic                     idle       // no read in flight
);

  localparam int unsigned IW = (NBPC > 1) ? $clog2(NBPC) : 1;
  localparam int unsigned QD = NBPC;
  localparam int unsigned QW = (QD > 1) ? $clog2(QD) : 1;

  logic [NBPC-1:0][AW-1:0] wcnt;
  logic [IW-1:0]           last;      // coder served most recently
  logic [IW-1:0]           sel;
  logic                    any;

  logic [IW-1:0] q [QD];
  logic [QW:0]   q_cnt;
  logic [QW-1:0] q_wr, q_rd;

  // Round robin: first requester after the last one served.
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int i = int'(NBPC); i >= 1; i--) begin
      logic [IW-1:0] j;
      j = IW'((int'(last) + i) % int'(NBPC));
      if (req[j]) begin sel = j; any = 1'b1; end
    end
  end

  assign rd_req  = any && (q_cnt != (QW+1)'(QD));
  assign rd_addr = base + AW'(wcnt[sel] * NPLANES) + AW'(NPLANES - 1) - AW'(plane[sel]);

  always_comb begin
    gnt = '0;
    if (rd_req && rd_gnt) gnt[sel] = 1'b1;
    word_valid = '0;
    if (rd_valid) word_valid[q[q_rd]] = 1'b1;
  end
  assign word_data = rd_data;
  assign idle      = (q_cnt == '0);

  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      wcnt  <= '0;
      last  <= IW'(NBPC - 1);
      q_cnt <= '0;
      q_wr  <= '0;
      q_rd  <= '0;
    end else begin
      if (rd_req && rd_gnt) begin
        wcnt[sel] <= wcnt[sel] + AW'(1);
        last      <= sel;
        q[q_wr]   <= sel;
        q_wr      <= (q_wr == QW'(QD - 1)) ? '0 : q_wr + QW'(1);
      end
      if (rd_valid)
        q_rd <= (q_rd == QW'(QD - 1)) ? '0 : q_rd + QW'(1);
      q_cnt <= q_cnt + (QW+1)'(rd_req && rd_gnt) - (QW+1)'(rd_valid);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n || init) rd_valid |-> (q_cnt != '0));

endmodule
