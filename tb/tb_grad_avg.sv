// tb_grad_avg: random 3x3 patches against directly computed row/column-sum
// gradients and the 8-neighbour average.
module tb_grad_avg;
  import fm_pkg::*;
  pixel_t p [3][3];
  grad_t  gx, gy;
  gmag_t  gmag;
  pixel_t avg;
  int checks = 0, failures = 0;

  grad_avg dut (.p, .gx, .gy, .gmag, .avg);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int ex, ey, s;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          p[r][c] = (n < 10) ? ((n % 2) ? 8'hFF : 8'h00) ^ ((r == 2) ? 8'hFF : 8'h00)
                             : pixel_t'($urandom);
      #1;
      ex = int'(p[0][2]) + int'(p[1][2]) + int'(p[2][2]) - int'(p[0][0]) - int'(p[1][0]) - int'(p[2][0]);
      ey = int'(p[2][0]) + int'(p[2][1]) + int'(p[2][2]) - int'(p[0][0]) - int'(p[0][1]) - int'(p[0][2]);
      s  = 0;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) if (r != 1 || c != 1) s += int'(p[r][c]);
      checks++;
      if (int'(gx) != ex || int'(gy) != ey || int'(gmag) != (ex < 0 ? -ex : ex) + (ey < 0 ? -ey : ey)
          || int'(avg) != s / 8) begin
        failures++;
        if (failures < 5) $display("mismatch gx %0d/%0d gy %0d/%0d avg %0d/%0d", gx, ex, gy, ey, avg, s / 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
