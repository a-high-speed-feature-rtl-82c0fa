// c3_direction: sub-detector C3, gradient-direction change.
//
// The gradient directions at p4 and p'4 must both differ from the centre's
// gradient direction by more than D3 (20 degrees). No angle is computed: for
// centre gradient u and neighbour gradient v the test is
//   dot(u,v) <= 0   or   256*|crs(u,v)| > TAN_D3_Q8 * dot(u,v)
// with TAN_D3_Q8 = round(256*tan(20 deg)) = 93. A zero neighbour gradient
// (p4 in a flat area, as happens beside a sharp corner) gives dot = 0 and
// counts as a change. Using cross and dot products for the vector comparison
// is this design's choice. Combinational.
module c3_direction
  import fm_pkg::*;
#(
  parameter int unsigned TAN_D3_Q8 = 93
) (
  input  grad_t g0x, g0y,
  input  grad_t gax, gay,
  input  grad_t gbx, gby,
  output logic  pass
);
  function automatic logic turned(grad_t ux, grad_t uy, grad_t vx, grad_t vy);
    logic signed [23:0] dot, crs;
    logic signed [33:0] lhs, rhs;
    dot   = 24'(ux) * 24'(vx) + 24'(uy) * 24'(vy);
    crs = 24'(ux) * 24'(vy) - 24'(uy) * 24'(vx);
    lhs   = (crs < 0) ? -(34'(crs) <<< 8) : (34'(crs) <<< 8);
    rhs   = 34'(dot) * 34'(TAN_D3_Q8);
    return (dot <= 0) || (lhs > rhs);
  endfunction

  always_comb pass = turned(g0x, g0y, gax, gay) && turned(g0x, g0y, gbx, gby);
endmodule
