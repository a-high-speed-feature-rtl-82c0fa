// hd_calc: one Hamming-distance calculator.
//
// XORs two FEAT_BITS-bit binary feature vectors and counts the 1 bits of the
// result (bit accumulator). Combinational; the matcher registers its output.
module hd_calc
  import fm_pkg::*;
#(
  parameter int FEAT_BITS = 512
) (
  input  logic [FEAT_BITS-1:0]           a,
  input  logic [FEAT_BITS-1:0]           b,
  output logic [$clog2(FEAT_BITS+1)-1:0] hd
);
  logic [FEAT_BITS-1:0] x;
  always_comb begin
    x  = a ^ b;
    hd = '0;
    for (int i = 0; i < FEAT_BITS; i++) hd += x[i];
  end
endmodule
