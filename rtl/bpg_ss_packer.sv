// bpg_ss_packer: bit-plane grouping with sign scattering ("BPG & SS"), the
// stage between the wavelet transform and external memory.
//
// Coefficients of one code-block arrive in EBC scan order as sign and
// NPLANES-bit magnitude.  Every magnitude plane k collects its bits in its own
// W-bit word: the coefficient's bit k, followed by its sign when bit k is the
// coefficient's first 1 bit (its most significant set bit).  A zero
// coefficient therefore stores its sign nowhere, and every other coefficient
// stores it exactly once.  A full word is written to memory at
//   base + w*NPLANES + (NPLANES-1-k)   (w = word number within plane k),
// which interleaves the planes word by word starting from the MSB plane.  At
// the end of the block, partly filled words are written with zero padding.
// Grouping, scattering and interleaving follow the description; the MSB-first
// bit order in a word, the pending-word register per plane, the MSB-plane-first
// write priority and the write handshake are this design's choices.
//
// Interface: start (with base) begins a block; coefficients are taken when
// coef_valid and coef_ready are both high.  wr_req/wr_addr/wr_data is
// accepted with wr_gnt.  done pulses when the last word is written, with
// n_planes, the number of magnitude planes up to the highest 1 bit in the
// block, valid from then until the next start.
module bpg_ss_packer #(
  parameter int unsigned NPLANES = 10,
  parameter int unsigned W       = 32,
  parameter int unsigned CB      = 64,
  parameter int unsigned AW      = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [AW-1:0]       base,
  input  logic                coef_valid,
  output logic                coef_ready,
  input  logic                coef_sign,      // 1 = negative
  input  logic [NPLANES-1:0]  coef_mag,
  output logic                wr_req,
  output logic [AW-1:0]       wr_addr,
  output logic [W-1:0]        wr_data,
  input  logic                wr_gnt,
  output logic                done,
  output logic [3:0]          n_planes
);

  localparam int unsigned NC  = CB * CB;
  localparam int unsigned CNW = $clog2(NC + 1);
  localparam int unsigned FW  = $clog2(W + 1);
  localparam int unsigned KW  = $clog2(NPLANES);

  typedef enum logic [1:0] {P_IDLE, P_RUN, P_FLUSH, P_DONE} pst_e;
  pst_e st;

  logic [W-1:0]       acc    [NPLANES];
  logic [FW-1:0]      fill   [NPLANES];
  logic [W-1:0]       pend   [NPLANES];
  logic [NPLANES-1:0] pend_v;
  logic [AW-1:0]      wcnt   [NPLANES];
  logic [CNW-1:0]     ncoef;
  logic [NPLANES-1:0] mag_or;
  logic [AW-1:0]      base_r;

  // Write arbiter: highest plane with a pending word.
  logic [KW-1:0] wsel;
  logic          wany;
  always_comb begin
    wsel = '0;
    wany = 1'b0;
    for (int k = 0; k < int'(NPLANES); k++)
      if (pend_v[k]) begin wsel = KW'(k); wany = 1'b1; end
  end
  assign wr_req  = wany;
  assign wr_data = pend[wsel];
  assign wr_addr = base_r + AW'(wcnt[wsel] * NPLANES) + AW'(NPLANES - 1) - AW'(wsel);

  always_comb begin
    coef_ready = (st == P_RUN);
    for (int k = 0; k < int'(NPLANES); k++)
      if (pend_v[k] && fill[k] >= FW'(W - 2)) coef_ready = 1'b0;
  end

  logic take;
  assign take = coef_valid && coef_ready;

  logic all_empty;
  always_comb begin
    all_empty = (pend_v == '0);
    for (int k = 0; k < int'(NPLANES); k++)
      if (fill[k] != '0) all_empty = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= P_IDLE;
      pend_v <= '0;
      ncoef  <= '0;
      mag_or <= '0;
      base_r <= '0;
      for (int k = 0; k < int'(NPLANES); k++) begin
        acc[k]  <= '0;
        fill[k] <= '0;
        wcnt[k] <= '0;
        pend[k] <= '0;
      end
    end else begin
      logic [NPLANES-1:0] pv;
      pv = pend_v;
      if (wany && wr_gnt) begin
        pv[wsel] = 1'b0;
        wcnt[wsel] <= wcnt[wsel] + AW'(1);
      end

      case (st)
        P_IDLE: if (start) begin
          st     <= P_RUN;
          base_r <= base;
          ncoef  <= '0;
          mag_or <= '0;
          for (int k = 0; k < int'(NPLANES); k++) begin
            acc[k]  <= '0;
            fill[k] <= '0;
            wcnt[k] <= '0;
          end
        end
        P_RUN: if (take) begin
          mag_or <= mag_or | coef_mag;
          for (int k = 0; k < int'(NPLANES); k++) begin
            logic          first1;
            logic [1:0]    nb;
            logic [W+1:0]  ext;
            logic [FW:0]   nf;
            first1 = coef_mag[k] && ((coef_mag >> (k + 1)) == '0);
            nb     = first1 ? 2'd2 : 2'd1;
            ext    = {acc[k], 2'b00} | ({coef_mag[k], first1 & coef_sign, {W{1'b0}}} >> fill[k]);
            nf     = {1'b0, fill[k]} + {{(FW-1){1'b0}}, nb};
            if (nf >= (FW+1)'(W)) begin
              pend[k] <= ext[W+1:2];
              pv[k]    = 1'b1;
              acc[k]  <= {ext[1:0], {(W-2){1'b0}}};
              fill[k] <= FW'(nf - (FW+1)'(W));
            end else begin
              acc[k]  <= ext[W+1:2];
              fill[k] <= FW'(nf);
            end
          end
          ncoef <= ncoef + CNW'(1);
          if (ncoef == CNW'(NC - 1)) st <= P_FLUSH;
        end
        P_FLUSH: begin
          for (int k = 0; k < int'(NPLANES); k++)
            if (fill[k] != '0 && !pv[k]) begin
              pend[k] <= acc[k];
              pv[k]    = 1'b1;
              acc[k]  <= '0;
              fill[k] <= '0;
            end
          if (all_empty) st <= P_DONE;
        end
        default: st <= P_IDLE;   // P_DONE
      endcase
      pend_v <= pv;
    end
  end

  assign done = (st == P_DONE);

  always_comb begin
    n_planes = '0;
    for (int k = 0; k < int'(NPLANES); k++)
      if (mag_or[k]) n_planes = 4'(k + 1);
  end

endmodule
