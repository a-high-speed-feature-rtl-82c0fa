// dir_map: maps a gradient to an integer step (Dx, Dy) with |Dx|+|Dy| = 2.
//
// Comparators replace the division of the mapping rule:
//   |Dx|=0,|Dy|=2 if 2|gx| <  |gy|
//   |Dx|=1,|Dy|=1 if |gy| <= 2|gx| < 3|gy|
//   |Dx|=2,|Dy|=0 if 2|gx| >= 3|gy|
// The signs of Dx and Dy follow gx and gy (a zero component counts as
// positive, a choice of this design). dir is the step as one of 8 directions
// 45 degrees apart: (2,0)=0, (1,1)=1, (0,2)=2, (-1,1)=3, (-2,0)=4, (-1,-1)=5,
// (0,-2)=6, (1,-1)=7; ring pixel 2*dir of fm_pkg lies in that direction.
// Purely combinational.
module dir_map
  import fm_pkg::*;
(
  input  grad_t gx,
  input  grad_t gy,
  output step_t dx,
  output step_t dy,
  output dir_t  dir
);
  logic [11:0] ax2, ay1, ay3;
  logic [1:0]  mx, my;
  logic        sx, sy;

  always_comb begin
    ax2 = 12'(gx[10] ? -gx : gx) << 1;
    ay1 = 12'(gy[10] ? -gy : gy);
    ay3 = ay1 + (ay1 << 1);
    sx  = gx[10];
    sy  = gy[10];
    if (ax2 < ay1)      begin mx = 2'd0; my = 2'd2; end
    else if (ax2 < ay3) begin mx = 2'd1; my = 2'd1; end
    else                begin mx = 2'd2; my = 2'd0; end
    dx = sx ? -step_t'({1'b0, mx}) : step_t'({1'b0, mx});
    dy = sy ? -step_t'({1'b0, my}) : step_t'({1'b0, my});
    unique case ({mx, sx, sy})
      {2'd2, 1'b0, 1'b0}, {2'd2, 1'b0, 1'b1}: dir = 3'd0;
      {2'd2, 1'b1, 1'b0}, {2'd2, 1'b1, 1'b1}: dir = 3'd4;
      {2'd0, 1'b0, 1'b0}, {2'd0, 1'b1, 1'b0}: dir = 3'd2;
      {2'd0, 1'b0, 1'b1}, {2'd0, 1'b1, 1'b1}: dir = 3'd6;
      {2'd1, 1'b0, 1'b0}: dir = 3'd1;
      {2'd1, 1'b1, 1'b0}: dir = 3'd3;
      {2'd1, 1'b1, 1'b1}: dir = 3'd5;
      default:            dir = 3'd7;
    endcase
  end
endmodule
