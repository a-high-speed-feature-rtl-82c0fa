// ref_sram: on-chip store of the reference image's feature vectors.
//
// DEPTH blocks of N_HD vectors of FEAT_BITS bits (default 16 x 128 x 512 =
// 1 Mbit, 2048 vectors). The read side returns one whole block, N_HD vectors
// side by side (vector v in bits [v*FEAT_BITS +: FEAT_BITS]), one clock after
// rd_en/rd_addr, so all Hamming-distance calculators are fed in the same
// clock. The write side takes the WR_BITS-wide read data of the external
// DDR3 memory: wr_addr = {block, vector, part}, part 0 holding the vector's
// lowest WR_BITS bits. Contents are not reset.
module ref_sram
  import fm_pkg::*;
#(
  parameter int N_HD      = 128,
  parameter int DEPTH     = 16,
  parameter int FEAT_BITS = 512,
  parameter int WR_BITS   = 128,
  localparam int PARTS    = FEAT_BITS / WR_BITS,
  localparam int WA_W     = $clog2(DEPTH) + $clog2(N_HD) + $clog2(PARTS),
  localparam int RA_W     = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [WA_W-1:0]           wr_addr,
  input  logic [WR_BITS-1:0]        wr_data,
  input  logic                      rd_en,
  input  logic [RA_W-1:0]           rd_addr,
  output logic [N_HD*FEAT_BITS-1:0] rd_data
);
  localparam int PW = $clog2(PARTS);
  localparam int VW = $clog2(N_HD);

  logic [N_HD*PARTS-1:0][WR_BITS-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[wr_addr[WA_W-1 -: RA_W]][wr_addr[VW+PW-1:0]] <= wr_data;
    if (rd_en)
      rd_data <= mem[rd_addr];
  end
endmodule
