// c1_background: sub-detector C1, background rejection.
//
// A pixel passes when its gradient |gx|+|gy| is not below D1 = K1 * avg,
// where avg is the local average grey level. K1 is an empirical constant
// between 1.0 and 1.5; here it is a fixed-point parameter in units of 1/16
// (default 20 = 1.25, a value picked from that range). The compare is done as
// 16*gmag >= K1_Q4*avg, so no division is needed. Combinational.
module c1_background
  import fm_pkg::*;
#(
  parameter int unsigned K1_Q4 = 20
) (
  input  gmag_t  gmag,
  input  pixel_t avg,
  output logic   pass
);
  always_comb pass = (20'(gmag) << 4) >= 20'(K1_Q4) * 20'(avg);
endmodule
