// jpeg2k_bpp_ebc_top: JPEG 2000 tier-1 coding path with a bit-plane parallel
// embedded block coder.
//
// One code-block at a time: the wavelet coefficients of the block enter in
// scan order and the bit-plane grouping / sign scattering stage writes them
// to external memory as plane-interleaved bit-plane words.  When the block is
// stored, the bit-plane parallel EBC codes planes trunc..n_planes-1, reading
// only the words of those planes, and emits one arithmetic-coded byte stream
// per coded plane and coding pass.  The wavelet transform, the pre-compression
// rate-distortion optimisation that picks trunc, and the external memory are
// outside this module; their signals are ports.  Sequencing one block through
// packing and then coding (no overlap between blocks) is this design's choice.
//
// Interface: cb_start (with base, band, trunc) starts a block; coefficients
// are taken with coef_valid && coef_ready.  The memory has a write port
// (mem_wr_*) and a read port (mem_rd_*); each request is accepted with its
// grant and read data returns in order on mem_rd_valid.  cb_done pulses when the
// block's streams are complete.  bs[j] is the byte output of bit-plane coder j.
module jpeg2k_bpp_ebc_top
  import ebc_pkg::*;
#(
  parameter int unsigned NBPC    = 4,
  parameter int unsigned CB      = 64,
  parameter int unsigned NPLANES = 10,
  parameter int unsigned W       = 32,
  parameter int unsigned AW      = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // block control; trunc comes from the rate-distortion stage
  input  logic                cb_start,
  input  logic [AW-1:0]       base,
  input  band_e               band,
  input  logic [3:0]          trunc,
  output logic                cb_busy,
  output logic                cb_done,
  output logic [3:0]          n_planes,
  // coefficients from the wavelet transform
  input  logic                coef_valid,
  output logic                coef_ready,
  input  logic                coef_sign,
  input  logic [NPLANES-1:0]  coef_mag,
  // external memory
  output logic                mem_wr_req,
  output logic [AW-1:0]       mem_wr_addr,
  output logic [W-1:0]        mem_wr_data,
  input  logic                mem_wr_gnt,
  output logic                mem_rd_req,
  output logic [AW-1:0]       mem_rd_addr,
  input  logic                mem_rd_gnt,
  input  logic                mem_rd_valid,
  input  logic [W-1:0]        mem_rd_data,
  // byte streams
  output bs_out_t [NBPC-1:0]  bs,
  // events
  output logic                ev_extra_cycle,
  output logic                ev_ts_two,
  output logic [NBPC-1:0]     ev_rlc,
  output logic                ev_data_stall,
  output logic                ev_state_read
);

  typedef enum logic [1:0] {T_IDLE, T_PACK, T_CODE} tst_e;
  tst_e st;

  logic [AW-1:0] base_r;
  band_e         band_r;
  logic [3:0]    trunc_r;
  logic          pk_done, ebc_start, ebc_busy, ebc_done;

  bpg_ss_packer #(.NPLANES(NPLANES), .W(W), .CB(CB), .AW(AW)) u_bpg_ss (
    .clk(clk), .rst_n(rst_n), .start(cb_start && st == T_IDLE), .base(base),
    .coef_valid(coef_valid), .coef_ready(coef_ready), .coef_sign(coef_sign),
    .coef_mag(coef_mag), .wr_req(mem_wr_req), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .wr_gnt(mem_wr_gnt), .done(pk_done), .n_planes(n_planes)
  );

  assign ebc_start = (st == T_PACK) && pk_done;

  bp_ebc #(.NBPC(NBPC), .CB(CB), .NPLANES(NPLANES), .W(W), .AW(AW)) u_ebc (
    .clk(clk), .rst_n(rst_n), .start(ebc_start), .n_planes(n_planes), .trunc(trunc_r),
    .band(band_r), .base(base_r), .busy(ebc_busy), .done(ebc_done),
    .rd_req(mem_rd_req), .rd_addr(mem_rd_addr), .rd_gnt(mem_rd_gnt),
    .rd_valid(mem_rd_valid), .rd_data(mem_rd_data), .bs(bs),
    .ev_extra_cycle(ev_extra_cycle), .ev_ts_two(ev_ts_two), .ev_rlc(ev_rlc),
    .ev_data_stall(ev_data_stall), .ev_state_read(ev_state_read)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= T_IDLE;
      base_r  <= '0;
      band_r  <= BAND_LL_LH;
      trunc_r <= '0;
    end else begin
      case (st)
        T_IDLE: if (cb_start) begin
          st      <= T_PACK;
          base_r  <= base;
          band_r  <= band;
          trunc_r <= trunc;
        end
        T_PACK: if (pk_done) st <= T_CODE;
        default: if (ebc_done) st <= T_IDLE;   // T_CODE
      endcase
    end
  end

  assign cb_busy = (st != T_IDLE) || ebc_busy;
  assign cb_done = ebc_done;

endmodule
