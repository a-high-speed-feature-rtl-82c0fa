// grad_avg: pre-processing kernel applied to one 3x3 patch.
//
// gy is the sum of the bottom row minus the sum of the top row, gx the sum of
// the right column minus the sum of the left column (row/column sums of 3,
// then one subtraction, as in the pre-processing stage of the detector);
// gmag = |gx| + |gy| is the gradient used by sub-detector C1. avg is the mean
// of the 8 neighbours of the centre: the 8 pixels are summed and the divide
// by 8 is done by dropping the 3 low bits. The sign convention (gradient
// points toward brighter pixels) and the exclusion of the centre pixel from
// the average are this design's reading of the kernels.
//
// Purely combinational; p[r][c] is row r (0 = top), column c (0 = left).
module grad_avg
  import fm_pkg::*;
(
  input  pixel_t p [3][3],
  output grad_t  gx,
  output grad_t  gy,
  output gmag_t  gmag,
  output pixel_t avg
);
  logic [9:0]  row0, row2, col0, col2;
  logic [10:0] nsum;
  grad_t       ax, ay;

  always_comb begin
    row0 = 10'(p[0][0]) + 10'(p[0][1]) + 10'(p[0][2]);
    row2 = 10'(p[2][0]) + 10'(p[2][1]) + 10'(p[2][2]);
    col0 = 10'(p[0][0]) + 10'(p[1][0]) + 10'(p[2][0]);
    col2 = 10'(p[0][2]) + 10'(p[1][2]) + 10'(p[2][2]);
    gy   = grad_t'({1'b0, row2}) - grad_t'({1'b0, row0});
    gx   = grad_t'({1'b0, col2}) - grad_t'({1'b0, col0});
    ax   = gx[10] ? -gx : gx;
    ay   = gy[10] ? -gy : gy;
    gmag = gmag_t'(ax) + gmag_t'(ay);
    nsum = 11'(row0) + 11'(row2) + 11'(p[1][0]) + 11'(p[1][2]);
    avg  = nsum[10:3];
  end
endmodule
