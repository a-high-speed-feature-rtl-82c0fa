// tb_c4_shape: C4 decision on rings built from one bright arc (sometimes
// with a flipped pixel), against a direct count of circular runs.
module tb_c4_shape;
  import fm_pkg::*;
  pixel_t ring [RING_N];
  pixel_t thr;
  dir_t   dir;
  logic   pass;
  int checks = 0, failures = 0, n_pass = 0;

  c4_shape dut (.ring, .thr, .dir, .pass);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      bit b[16];
      automatic int start = $urandom_range(15), len = $urandom_range(16), d = $urandom_range(7);
      automatic int runs1 = 0;
      bit exp;
      for (int k = 0; k < 16; k++) b[k] = 0;
      for (int k = 0; k < len; k++) b[(start + k) % 16] = 1;
      if (n % 4 == 0) b[$urandom_range(15)] ^= 1;
      thr = pixel_t'(60 + $urandom_range(100));
      for (int k = 0; k < 16; k++)
        ring[k] = b[k] ? pixel_t'(int'(thr) + 1 + $urandom_range(254 - int'(thr)))
                       : pixel_t'($urandom_range(int'(thr)));
      dir = dir_t'(d);
      #1;
      for (int k = 0; k < 16; k++) if (b[k] && !b[(k + 15) % 16]) runs1++;
      exp = (runs1 == 1) && b[(2 * d) % 16] && !b[(2 * d + 8) % 16];
      checks++;
      if (exp) n_pass++;
      if (pass !== exp) begin
        failures++;
        if (failures < 5) $display("n=%0d dir=%0d pass=%0b exp=%0b", n, d, pass, exp);
      end
    end
    checks++;
    if (n_pass < 100) begin failures++; $display("only %0d shapes passed", n_pass); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
