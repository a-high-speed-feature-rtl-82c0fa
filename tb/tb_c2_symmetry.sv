// tb_c2_symmetry: symmetry decision |a-b| < 0.125*c and grey change
// floor((|c-a|+|c-b|)/2) against directly computed values.
module tb_c2_symmetry;
  import fm_pkg::*;
  pixel_t avg_c, avg_a, avg_b, grad_m;
  logic   sym;
  int checks = 0, failures = 0;

  c2_symmetry dut (.avg_c, .avg_a, .avg_b, .sym, .grad_m);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      automatic int c = $urandom_range(255), a = $urandom_range(255), b;
      int dab, em;
      b = (n % 2) ? $urandom_range(255) : a + $urandom_range(40) - 20;
      if (b < 0) b = 0;
      if (b > 255) b = 255;
      avg_c = pixel_t'(c); avg_a = pixel_t'(a); avg_b = pixel_t'(b);
      #1;
      dab = (a > b) ? a - b : b - a;
      em  = (((c > a) ? c - a : a - c) + ((c > b) ? c - b : b - c)) / 2;
      checks++;
      if (sym !== (real'(dab) < 0.125 * real'(c)) || int'(grad_m) != em) begin
        failures++;
        if (failures < 5) $display("c=%0d a=%0d b=%0d sym=%0b gm=%0d want %0d", c, a, b, sym, grad_m, em);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
