// tb_shift_ram_window: streams random pixels with random gaps into a
// 16-pixel-wide line-buffer chain and compares every matrix position with the
// pixel the stream model says it must hold.
module tb_shift_ram_window;
  import fm_pkg::*;
  localparam int W = 16, L = 11;
  logic   clk = 0, rst_n = 0, in_valid = 0, win_valid;
  pixel_t in_pix;
  pixel_t win [L][L];
  int checks = 0, failures = 0;
  pixel_t stream[$];

  shift_ram_window #(.IMG_W(W), .LINES(L)) dut (.clk, .rst_n, .in_valid, .in_pix, .win, .win_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 12 * W * 4; n++) begin
      while ($urandom_range(3) == 0) begin
        @(negedge clk); in_valid = 0;
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 1;
      in_pix   = pixel_t'($urandom);
      stream.push_back(in_pix);
      @(posedge clk);
      #1;
      // after pixel n: win[r][c] = stream[n - (L-r)*W - (L-1-c)]
      if (!win_valid) begin failures++; $display("win_valid missing"); end
      if (n >= L * W + L) begin
        checks++;
        for (int r = 0; r < L; r++)
          for (int c = 0; c < L; c++)
            if (win[r][c] != stream[n - (L - r) * W - (L - 1 - c)]) begin
              failures++;
              if (failures < 5) $display("n=%0d win[%0d][%0d]=%0h", n, r, c, win[r][c]);
            end
      end
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (win_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
