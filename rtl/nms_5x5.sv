// nms_5x5: 5x5 non-maximum suppression of the grey-change score (the
// suppression half of sub-detector C2).
//
// Scored pixels arrive in raster order, one per in_valid, together with a
// pass flag (the other sub-detectors) and their coordinates. Four line
// memories of IMG_W entries and a 5x5 register matrix (bottom row fed by the
// live stream) give each pixel its 5x5 neighbourhood, two lines and two
// pixels after it arrived. A pixel survives when its score is non-zero and
// its pass flag is set, its score is above the scores of the 12 neighbours
// that precede it in raster order and not below those of the 12 that follow
// it (so a plateau keeps only its first pixel). The tie rule is this design's
// choice.
//
// out_valid pulses one clock after the matrix update that centres the
// surviving pixel; out_x/out_y are its coordinates (signed, may lie outside
// the image at the borders: the caller discards those).
module nms_5x5
  import fm_pkg::*;
#(
  parameter int IMG_W = 2048
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  pixel_t             in_score,
  input  logic               in_pass,
  input  logic signed [16:0] in_x,
  input  logic signed [16:0] in_y,
  output logic               out_valid,
  output logic signed [16:0] out_x,
  output logic signed [16:0] out_y
);
  localparam int AW = $clog2(IMG_W);
  typedef struct packed { logic pass; pixel_t score; } cell_t;

  cell_t         mem [4][IMG_W];
  cell_t         tap [4];
  cell_t         win [5][5];
  logic [AW-1:0] ptr;
  logic          w_valid;
  logic signed [16:0] w_x, w_y;

  always_comb
    for (int k = 0; k < 4; k++) tap[k] = mem[k][ptr];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem[0][ptr] <= '{pass: in_pass, score: in_score};
      for (int k = 1; k < 4; k++) mem[k][ptr] <= tap[k-1];
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 4; c++) win[r][c] <= win[r][c+1];
      for (int r = 0; r < 4; r++) win[r][4] <= tap[3-r];
      win[4][4] <= '{pass: in_pass, score: in_score};
      // centre of the matrix is two lines and two pixels behind the input
      if (in_x >= 2) begin
        w_x <= in_x - 17'sd2;
        w_y <= in_y - 17'sd2;
      end else begin
        w_x <= in_x - 17'sd2 + 17'(IMG_W);
        w_y <= in_y - 17'sd3;
      end
    end
  end

  logic is_max;
  always_comb begin
    is_max = win[2][2].pass && (win[2][2].score != '0);
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        if (r < 2 || (r == 2 && c < 2)) begin
          if (win[r][c].score >= win[2][2].score) is_max = 1'b0;
        end else if (r > 2 || (r == 2 && c > 2)) begin
          if (win[r][c].score > win[2][2].score) is_max = 1'b0;
        end
      end
  end

  always_ff @(posedge clk) begin
    if (w_valid) begin
      out_x <= w_x;
      out_y <= w_y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      w_valid   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      w_valid   <= in_valid;
      out_valid <= w_valid && is_max;
      if (in_valid) ptr <= (ptr == AW'(IMG_W - 1)) ? '0 : ptr + 1'b1;
    end
  end
endmodule
