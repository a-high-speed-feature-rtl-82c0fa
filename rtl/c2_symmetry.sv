// c2_symmetry: sub-detector C2, symmetry test and grey-change measure.
//
// avg_a and avg_b are the local averages at p4 and p'4, the two points on the
// line perpendicular to the centre's gradient. Symmetry holds when
// |avg_a - avg_b| < D2 = K2 * avg_c, with K2 (0.05 to 0.2) as a fixed-point
// parameter in units of 1/256 (default 32 = 0.125, a value picked from that
// range). grad_m is the grey change (|c-a| + |c-b|) / 2, the halving done by
// one right shift; it is the score that the 5x5 suppression (nms_5x5)
// compares. Combinational.
module c2_symmetry
  import fm_pkg::*;
#(
  parameter int unsigned K2_Q8 = 32
) (
  input  pixel_t avg_c,
  input  pixel_t avg_a,
  input  pixel_t avg_b,
  output logic   sym,
  output pixel_t grad_m
);
  function automatic logic [7:0] absdiff(pixel_t a, pixel_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  logic [8:0] s;
  always_comb begin
    sym    = (20'(absdiff(avg_a, avg_b)) << 8) < 20'(K2_Q8) * 20'(avg_c);
    s      = 9'(absdiff(avg_c, avg_a)) + 9'(absdiff(avg_c, avg_b));
    grad_m = s[8:1];
  end
endmodule
