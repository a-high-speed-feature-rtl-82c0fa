// tb_c1_background: C1 decision against gradient >= 1.25 * average in real
// arithmetic, with exhaustive averages and random gradients.
module tb_c1_background;
  import fm_pkg::*;
  gmag_t  gmag;
  pixel_t avg;
  logic   pass;
  int checks = 0, failures = 0;

  c1_background dut (.gmag, .avg, .pass);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int k = 0; k < 12; k++) begin
        automatic int g = (k < 4) ? (a * 5) / 4 - 2 + k : $urandom_range(1530);
        if (g < 0) g = 0;
        gmag = gmag_t'(g); avg = pixel_t'(a);
        #1;
        checks++;
        if (pass !== (real'(g) >= 1.25 * real'(a))) begin
          failures++;
          if (failures < 5) $display("g=%0d a=%0d pass=%0b", g, a, pass);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
