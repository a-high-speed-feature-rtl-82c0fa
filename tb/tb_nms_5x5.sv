// tb_nms_5x5: random small scores (many ties) and pass flags on a 16 x 20
// grid; every surviving interior pixel must match a direct 5x5 search with
// the raster-order tie rule, and no interior survivor may be missing.
module tb_nms_5x5;
  import fm_pkg::*;
  localparam int W = 16, H = 32;
  logic   clk = 0, rst_n = 0, in_valid = 0, in_pass, out_valid;
  pixel_t in_score;
  logic signed [16:0] in_x, in_y, out_x, out_y;
  int checks = 0, failures = 0;
  int sc [H][W];
  bit ps [H][W];
  bit expct [H][W];
  bit seen [H][W];
  int n_exp = 0;

  nms_5x5 #(.IMG_W(W)) dut (.clk, .rst_n, .in_valid, .in_score, .in_pass, .in_x, .in_y,
                           .out_valid, .out_x, .out_y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && out_x >= 2 && out_x < W - 2 && out_y >= 2 && out_y < H - 2) begin
      checks++;
      seen[out_y][out_x] = 1;
      if (!expct[out_y][out_x]) begin
        failures++;
        if (failures < 5) $display("unexpected (%0d,%0d) sc=%0d ps=%0b", out_x, out_y, sc[out_y][out_x], ps[out_y][out_x]);
      end
    end
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        sc[y][x] = ($urandom_range(3) == 0) ? 6 : $urandom_range(30);
        ps[y][x] = $urandom_range(3) != 0;
        seen[y][x] = 0;
      end
    for (int y = 2; y < H - 2; y++)
      for (int x = 2; x < W - 2; x++) begin
        automatic bit ok = ps[y][x] && sc[y][x] != 0;
        for (int j = -2; j <= 2; j++)
          for (int i = -2; i <= 2; i++)
            if (j < 0 || (j == 0 && i < 0)) begin
              if (sc[y + j][x + i] >= sc[y][x]) ok = 0;
            end else if (j > 0 || (j == 0 && i > 0)) begin
              if (sc[y + j][x + i] > sc[y][x]) ok = 0;
            end
        expct[y][x] = ok;
        if (ok) n_exp++;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if ($urandom_range(4) == 0) begin
          @(negedge clk); in_valid = 0; @(posedge clk);
        end
        @(negedge clk);
        in_valid = 1; in_score = pixel_t'(sc[y][x]); in_pass = ps[y][x];
        in_x = 17'(x); in_y = 17'(y);
        @(posedge clk);
      end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    for (int y = 2; y < H - 2; y++)
      for (int x = 2; x < W - 2; x++)
        if (expct[y][x] && (++checks > 0) && !seen[y][x]) begin
          failures++;
          if (failures < 10) $display("missing (%0d,%0d)", x, y);
        end
    checks++;
    if (n_exp < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
