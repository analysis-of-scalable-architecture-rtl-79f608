// ebc_dispatcher: the dispatcher ("DP") between the context formation units
// and the arithmetic encoders.
//
// Each cycle every bit-plane coder (BPC) may still hold 0, 1, 2 or 4
// context-decision pairs of its current scan step.  The encoders available are
// one two-symbol encoder (TSAE) and NBPC-1 one-symbol encoders (AE).  The
// dispatcher gives the TSAE to the lowest-numbered BPC holding two or more
// pairs (or, if none does, to the lowest-numbered BPC holding one) and gives
// every other BPC one AE, so each BPC codes one pair per cycle and one BPC
// codes two.  When pairs are left over, the scan step needs an extra cycle:
// step_done is low and the caller keeps the step.  The description states
// that a BPC producing 2 or 4 pairs is sent to the TSAE, the others to AEs, and
// that an extra cycle follows when the pairs cannot all be consumed; the
// lowest-index priority is this design's choice.
//
// Purely combinational.  ae_src[u] names the BPC served by AE u.
module ebc_dispatcher #(
  parameter int unsigned NBPC = 4
) (
  input  logic [NBPC-1:0][2:0]              rem,       // pairs left per BPC
  output logic [((NBPC > 1) ? $clog2(NBPC) : 1)-1:0]         ts_src,    // BPC served by the TSAE
  output logic [1:0]                        ts_n,      // pairs the TSAE codes
  output logic [NBPC-1:0][1:0]              take,      // pairs coded per BPC
  output logic [NBPC-1:0][((NBPC > 1) ? $clog2(NBPC) : 1)-1:0] unit_of, // 0 = TSAE, u+1 = AE u
  output logic                              step_done  // nothing left after this cycle
);

  localparam int unsigned SW = (NBPC > 1) ? $clog2(NBPC) : 1;

  always_comb begin
    logic found2, found1;
    int   sel;
    sel = 0;
    found2 = 1'b0;
    found1 = 1'b0;
    for (int j = NBPC - 1; j >= 0; j--)
      if (rem[j] >= 3'd2) begin found2 = 1'b1; sel = j; end
    if (!found2)
      for (int j = NBPC - 1; j >= 0; j--)
        if (rem[j] != 3'd0) begin found1 = 1'b1; sel = j; end

    ts_src = SW'(sel);
    ts_n   = found2 ? 2'd2 : (found1 ? 2'd1 : 2'd0);
    step_done = 1'b1;
    for (int j = 0; j < NBPC; j++) begin
      if (j == sel) begin
        take[j]    = ts_n;
        unit_of[j] = '0;
      end else begin
        take[j]    = (rem[j] != 3'd0) ? 2'd1 : 2'd0;
        unit_of[j] = (j < sel) ? SW'(j + 1) : SW'(j);
      end
      if (rem[j] > {1'b0, take[j]}) step_done = 1'b0;
    end
  end

endmodule
