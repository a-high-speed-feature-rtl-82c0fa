// corner_detector: parallel-structure corner detector for image strips of
// IMG_W pixels per line.
//
// Pixels stream in raster order, one per pix_valid, with no back-pressure;
// frame_start marks the first pixel of a strip. shift_ram_window builds the
// 11x11 matrix, corner_eval runs sub-detectors C1..C4 on its centre, and
// nms_5x5 keeps the local maxima of the grey change. A corner is reported as
// (corner_x, corner_y) with a one-clock corner_valid pulse once its window
// and its suppression neighbourhood have arrived: 5 clocks after the pixel 8
// lines and 7 pixels after it is accepted (1 clock matrix, 2 sub-detector
// stages, 1 clock suppression matrix, 1 clock decision).
//
// Pixels closer than MARGIN (6 = ring radius 3 + kernel radius 1 + 2 for the
// 5x5 suppression) to a border of the strip never become corners, and rows at
// or below img_h - MARGIN are ignored, so the host follows the last row of a
// strip with at least 7 further rows (any content, e.g. the next strip) to
// flush it. Both rules are this design's choices.
module corner_detector
  import fm_pkg::*;
#(
  parameter int          IMG_W     = 2048,
  parameter int          MARGIN    = 6,
  parameter int unsigned K1_Q4     = 20,
  parameter int unsigned K2_Q8     = 32,
  parameter int unsigned TAN_D3_Q8 = 93
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   frame_start,
  input  coord_t img_h,
  input  logic   pix_valid,
  input  pixel_t pix,
  output logic   corner_valid,
  output coord_t corner_x,
  output coord_t corner_y
);
  pixel_t win [11][11];
  logic   win_valid;
  logic signed [16:0] cx, cy;

  shift_ram_window #(.IMG_W(IMG_W), .LINES(11)) u_win (
    .clk, .rst_n, .in_valid(pix_valid), .in_pix(pix), .win, .win_valid);

  // Coordinates of the matrix centre: 6 lines and 5 pixels behind the input.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx <= 17'(IMG_W - 6);
      cy <= -17'sd7;
    end else if (pix_valid) begin
      if (frame_start) begin
        cx <= 17'(IMG_W - 5);
        cy <= -17'sd7;
      end else if (cx == 17'(IMG_W - 1)) begin
        cx <= '0;
        cy <= cy + 17'sd1;
      end else begin
        cx <= cx + 17'sd1;
      end
    end
  end

  logic               e_valid, e_pass;
  pixel_t             e_score;
  logic signed [16:0] e_x, e_y;
  logic [3:0]         e_tests;

  corner_eval #(.K1_Q4(K1_Q4), .K2_Q8(K2_Q8), .TAN_D3_Q8(TAN_D3_Q8)) u_eval (
    .clk, .rst_n, .in_valid(win_valid), .win, .in_x(cx), .in_y(cy),
    .out_valid(e_valid), .out_score(e_score), .out_pass(e_pass),
    .out_x(e_x), .out_y(e_y), .out_tests(e_tests));

  logic               n_valid;
  logic signed [16:0] n_x, n_y;

  nms_5x5 #(.IMG_W(IMG_W)) u_nms (
    .clk, .rst_n, .in_valid(e_valid), .in_score(e_score), .in_pass(e_pass),
    .in_x(e_x), .in_y(e_y), .out_valid(n_valid), .out_x(n_x), .out_y(n_y));

  always_comb begin
    corner_valid = n_valid
                && n_x >= 17'(MARGIN) && n_x <= 17'(IMG_W - 1 - MARGIN)
                && n_y >= 17'(MARGIN) && n_y <= 17'({1'b0, img_h}) - 17'(MARGIN + 1);
    corner_x = n_x[15:0];
    corner_y = n_y[15:0];
  end
endmodule
