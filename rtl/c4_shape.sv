// c4_shape: sub-detector C4, corner shape.
//
// The 16 ring pixels (radius-3 circle, index k at k*22.5 degrees) are coded
// 1 when brighter than thr (the centre's local average) and 0 otherwise. The
// code is rotated so that bit 0 is P0, the ring pixel in the gradient
// direction (ring index 2*dir), and bit 8 is P'0, the opposite one. The shape
// passes when P0 is 1, P'0 is 0 and the ring holds exactly one run of 1s and
// one run of 0s (two transitions around the circle): a connected set of 1s
// around P0 and a connected set of 0s around P'0. The binarising threshold
// is this design's choice. Combinational.
module c4_shape
  import fm_pkg::*;
(
  input  pixel_t ring [RING_N],
  input  pixel_t thr,
  input  dir_t   dir,
  output logic   pass
);
  logic [15:0] code, rot;
  logic [4:0]  trans;

  always_comb begin
    for (int k = 0; k < RING_N; k++) code[k] = ring[k] > thr;
    for (int k = 0; k < RING_N; k++) rot[k] = code[(k + 2 * int'(dir)) % RING_N];
    trans = '0;
    for (int k = 0; k < RING_N; k++) trans += 5'(rot[k] ^ rot[(k + 1) % RING_N]);
    pass = rot[0] && !rot[8] && (trans == 5'd2);
  end
endmodule
