// tb_c3_direction: C3 decision against angles computed with $atan2: both
// neighbour gradients must be turned by more than atan(93/256) (about 20
// degrees) from the centre gradient; zero vectors count as turned.
module tb_c3_direction;
  import fm_pkg::*;
  grad_t g0x, g0y, gax, gay, gbx, gby;
  logic  pass;
  int checks = 0, failures = 0;

  c3_direction dut (.g0x, .g0y, .gax, .gay, .gbx, .gby, .pass);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ang(int ux, int uy, int vx, int vy);
    real a;
    if ((ux == 0 && uy == 0) || (vx == 0 && vy == 0)) return 3.0;
    a = $atan2(real'(ux * vy - uy * vx), real'(ux * vx + uy * vy));
    return a < 0 ? -a : a;
  endfunction

  function automatic int rnd();
    return $urandom_range(1530) - 765;
  endfunction

  initial begin
    real thr = $atan(93.0 / 256.0);
    int skipped = 0;
    for (int n = 0; n < 6000; n++) begin
      automatic int ux = rnd(), uy = rnd(), ax, ay, bx, by;
      real ra, rb, t;
      // neighbours: the centre vector turned by a random angle and scaled
      t  = (real'($urandom_range(1000)) / 1000.0 - 0.5) * ((n % 3 == 0) ? 6.3 : 1.2);
      ax = int'((ux * $cos(t) - uy * $sin(t)) * 0.7);
      ay = int'((ux * $sin(t) + uy * $cos(t)) * 0.7);
      t  = (real'($urandom_range(1000)) / 1000.0 - 0.5) * 1.2;
      bx = int'((ux * $cos(t) - uy * $sin(t)) * 0.5);
      by = int'((ux * $sin(t) + uy * $cos(t)) * 0.5);
      if (n % 50 == 0) begin ax = 0; ay = 0; end
      ra = ang(ux, uy, ax, ay);
      rb = ang(ux, uy, bx, by);
      if ((ra > thr - 1e-6 && ra < thr + 1e-6) || (rb > thr - 1e-6 && rb < thr + 1e-6)) begin
        skipped++;
        continue;
      end
      g0x = grad_t'(ux); g0y = grad_t'(uy); gax = grad_t'(ax); gay = grad_t'(ay);
      gbx = grad_t'(bx); gby = grad_t'(by);
      #1;
      checks++;
      if (pass !== (ra > thr && rb > thr)) begin
        failures++;
        if (failures < 5) $display("u=(%0d,%0d) a=(%0d,%0d) b=(%0d,%0d) pass=%0b", ux, uy, ax, ay, bx, by, pass);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
