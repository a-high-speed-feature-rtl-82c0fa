// corner_eval: the four sub-detectors applied side by side to one window.
//
// Takes the 11x11 matrix around a candidate pixel P (the centre, [5][5]) and
// evaluates, in two register stages:
//   stage 1: gradient and 8-neighbour average at P and at the 16 ring pixels
//            (grad_avg), the integer step / direction of P's gradient
//            (dir_map), and selection of p4 and p'4, the ring pixels at +-90
//            degrees from the gradient direction;
//   stage 2: C1 (c1_background), C2 symmetry and grey change (c2_symmetry),
//            C3 (c3_direction) and C4 (c4_shape).
// The outputs are the score for the 5x5 suppression (the grey change when
// symmetry holds, else 0) and pass = C1 & C3 & C4. This is the parallel
// structure: every test runs on every pixel and the results are combined.
// Only a 9x9 part of the matrix is used (ring radius 3 plus the 3x3 kernels).
// Latency 2 clocks from in_valid to out_valid; the coordinates travel along.
module corner_eval
  import fm_pkg::*;
#(
  parameter int unsigned K1_Q4     = 20,
  parameter int unsigned K2_Q8     = 32,
  parameter int unsigned TAN_D3_Q8 = 93
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  pixel_t             win [11][11],
  input  logic signed [16:0] in_x,
  input  logic signed [16:0] in_y,
  output logic               out_valid,
  output pixel_t             out_score,
  output logic               out_pass,
  output logic signed [16:0] out_x,
  output logic signed [16:0] out_y,
  // individual test results of the pixel at the output, for observation
  output logic [3:0]         out_tests
);
  localparam int C = 5;

  // ---------------- stage 1 ----------------
  pixel_t pc [3][3];
  pixel_t pr [RING_N][3][3];
  grad_t  gx0, gy0, rgx [RING_N], rgy [RING_N];
  gmag_t  gm0, rgm [RING_N];
  pixel_t av0, rav [RING_N];
  pixel_t rpix [RING_N];
  step_t  sdx, sdy;
  dir_t   dir0;

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        pc[r][c] = win[C-1+r][C-1+c];
        for (int k = 0; k < RING_N; k++)
          pr[k][r][c] = win[C+ring_dy(k)-1+r][C+ring_dx(k)-1+c];
      end
    for (int k = 0; k < RING_N; k++) rpix[k] = win[C+ring_dy(k)][C+ring_dx(k)];
  end

  grad_avg u_gc (.p(pc), .gx(gx0), .gy(gy0), .gmag(gm0), .avg(av0));
  for (genvar k = 0; k < RING_N; k++) begin : g_ring
    grad_avg u_gr (.p(pr[k]), .gx(rgx[k]), .gy(rgy[k]), .gmag(rgm[k]), .avg(rav[k]));
  end
  dir_map u_dir (.gx(gx0), .gy(gy0), .dx(sdx), .dy(sdy), .dir(dir0));

  logic   s1_valid;
  grad_t  s1_gx, s1_gy, s1_gax, s1_gay, s1_gbx, s1_gby;
  gmag_t  s1_gm;
  pixel_t s1_av, s1_ava, s1_avb;
  pixel_t s1_ring [RING_N];
  dir_t   s1_dir;
  logic signed [16:0] s1_x, s1_y;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      automatic int ia = (2 * int'(dir0) + 4) % RING_N;
      automatic int ib = (2 * int'(dir0) + 12) % RING_N;
      s1_gx  <= gx0;      s1_gy  <= gy0;   s1_gm <= gm0; s1_av <= av0;
      s1_gax <= rgx[ia];  s1_gay <= rgy[ia]; s1_ava <= rav[ia];
      s1_gbx <= rgx[ib];  s1_gby <= rgy[ib]; s1_avb <= rav[ib];
      s1_ring <= rpix;
      s1_dir <= dir0;
      s1_x   <= in_x;     s1_y   <= in_y;
    end
  end

  // ---------------- stage 2 ----------------
  logic   c1, sym, c3, c4;
  pixel_t gmv;

  c1_background #(.K1_Q4(K1_Q4)) u_c1 (.gmag(s1_gm), .avg(s1_av), .pass(c1));
  c2_symmetry #(.K2_Q8(K2_Q8)) u_c2 (.avg_c(s1_av), .avg_a(s1_ava), .avg_b(s1_avb),
                                    .sym(sym), .grad_m(gmv));
  c3_direction #(.TAN_D3_Q8(TAN_D3_Q8)) u_c3 (.g0x(s1_gx), .g0y(s1_gy),
                                             .gax(s1_gax), .gay(s1_gay),
                                             .gbx(s1_gbx), .gby(s1_gby), .pass(c3));
  c4_shape u_c4 (.ring(s1_ring), .thr(s1_av), .dir(s1_dir), .pass(c4));

  always_ff @(posedge clk) begin
    if (s1_valid) begin
      out_score <= sym ? gmv : '0;
      out_pass  <= c1 && c3 && c4;
      out_tests <= {c4, c3, sym, c1};
      out_x     <= s1_x;
      out_y     <= s1_y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= in_valid;
      out_valid <= s1_valid;
    end
  end
endmodule
