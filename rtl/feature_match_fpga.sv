// feature_match_fpga: FPGA side of a CPU-FPGA feature matcher for large
// aerial images.
//
// The host streams an image strip (IMG_W = 2048 pixels per line) and, later,
// query feature vectors over PCIe. tlp_rx unpacks memory-write TLPs into
// 32-bit words and steers them by one address bit: image words go through
// pixel_unpack to corner_detector, which reports corner coordinates in real
// time; query words go through query_deser to hd_matcher, which compares
// each 512-bit query with up to 2048 reference vectors (128 per clock) held
// in on-chip SRAM and returns the best distance with its index and the
// second-best distance, for the host's ratio test. Both kinds of result are
// also sent back to host memory as memory-write TLPs by tlp_tx; the plain
// corner_* and m_* outputs show the same results for observation. The
// reference vectors
// arrive on ref_wr_* from the external DDR3 memory controller, which is not
// part of this design, and so are the PCIe hard IP and the host.
//
// frame_start is a one-clock pulse meaning "the next pixel starts a new
// strip"; img_h is the number of rows of the strip; n_ref the number of valid
// reference vectors. These plain configuration inputs are this design's
// choice.
module feature_match_fpga
  import fm_pkg::*;
#(
  parameter int IMG_W  = 2048,
  parameter int N_HD   = 128,
  parameter int DEPTH  = 16,
  parameter int CH_BIT = 20,
  localparam int WA_W  = $clog2(DEPTH) + $clog2(N_HD) + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // PCIe receive stream
  input  logic              rx_st_valid,
  input  logic [63:0]       rx_st_data,
  input  logic              rx_st_sop,
  input  logic              rx_st_eop,
  output logic              rx_st_ready,
  // corner detection
  input  logic              frame_start,
  input  coord_t            img_h,
  output logic              corner_valid,
  output coord_t            corner_x,
  output coord_t            corner_y,
  // reference vectors from the DDR3 controller
  input  logic              ref_wr_en,
  input  logic [WA_W-1:0]   ref_wr_addr,
  input  logic [127:0]      ref_wr_data,
  input  logic [11:0]       n_ref,
  // matching results
  output logic              m_valid,
  output hd_t               m_best,
  output logic [10:0]       m_idx,
  output hd_t               m_second,
  // PCIe transmit stream (results back to host memory)
  output logic              tx_st_valid,
  output logic [63:0]       tx_st_data,
  output logic              tx_st_sop,
  output logic              tx_st_eop,
  input  logic              tx_st_ready,
  output logic [1:0]        tx_overflow
);
  logic        dw_valid, dw_ready, dw_ch;
  logic [31:0] dw;

  tlp_rx #(.CH_BIT(CH_BIT)) u_rx (
    .clk, .rst_n, .rx_st_valid, .rx_st_data, .rx_st_sop, .rx_st_eop, .rx_st_ready,
    .dw_valid, .dw_ready, .dw, .dw_ch);

  logic pu_ready, qd_ready;
  assign dw_ready = dw_ch ? qd_ready : pu_ready;

  // ---------------- image path ----------------
  logic   pix_valid, fs_pend;
  pixel_t pix;

  pixel_unpack u_unpack (
    .clk, .rst_n, .dw_valid(dw_valid && !dw_ch), .dw_ready(pu_ready), .dw,
    .pix_valid, .pix);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           fs_pend <= 1'b0;
    else if (frame_start) fs_pend <= 1'b1;
    else if (pix_valid)   fs_pend <= 1'b0;
  end

  corner_detector #(.IMG_W(IMG_W)) u_det (
    .clk, .rst_n, .frame_start(fs_pend || frame_start), .img_h,
    .pix_valid, .pix, .corner_valid, .corner_x, .corner_y);

  // ---------------- matching path ----------------
  logic                 q_valid, q_ready;
  logic [FEATURE_BITS-1:0] q;

  query_deser #(.FEAT_BITS(FEATURE_BITS), .DW_BITS(32)) u_qd (
    .clk, .rst_n, .dw_valid(dw_valid && dw_ch), .dw_ready(qd_ready), .dw,
    .q_valid, .q_ready, .q);

  hd_matcher #(.N_HD(N_HD), .DEPTH(DEPTH), .FEAT_BITS(FEATURE_BITS), .WR_BITS(128)) u_match (
    .clk, .rst_n, .ref_wr_en, .ref_wr_addr, .ref_wr_data, .n_ref,
    .q_valid, .q_ready, .q, .m_valid, .m_best, .m_idx, .m_second);

  // ---------------- results back to the host ----------------
  tlp_tx u_tx (
    .clk, .rst_n,
    .c_valid(corner_valid), .c_data({corner_y, corner_x}),
    .m_valid, .m_data({1'b0, m_second, m_idx, m_best}),
    .tx_st_valid, .tx_st_data, .tx_st_sop, .tx_st_eop, .tx_st_ready,
    .overflow(tx_overflow));
endmodule
