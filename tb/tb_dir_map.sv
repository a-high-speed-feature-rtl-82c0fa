// tb_dir_map: integer-step mapping against the rule evaluated in real
// arithmetic, including the boundary ratios 1/2 and 3/2 and zero components.
module tb_dir_map;
  import fm_pkg::*;
  grad_t gx, gy;
  step_t dx, dy;
  dir_t  dir;
  int checks = 0, failures = 0;

  dir_map dut (.gx, .gy, .dx, .dy, .dir);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int x, int y);
    real ax, ay;
    int edx, edy, ed;
    gx = grad_t'(x); gy = grad_t'(y);
    #1;
    ax = (x < 0) ? -x : x; ay = (y < 0) ? -y : y;
    if (ax < ay / 2.0)      begin edx = 0; edy = 2; end
    else if (ax < 1.5 * ay) begin edx = 1; edy = 1; end
    else                    begin edx = 2; edy = 0; end
    if (x < 0) edx = -edx;
    if (y < 0) edy = -edy;
    // direction index from the angle of the step
    ed = int'($floor($atan2(real'(edy), real'(edx)) / (3.14159265358979 / 4.0) + 8.5)) % 8;
    checks++;
    if (int'(dx) != edx || int'(dy) != edy || int'(dir) != ed) begin
      failures++;
      if (failures < 5) $display("g=(%0d,%0d) got (%0d,%0d,%0d) want (%0d,%0d,%0d)", x, y, dx, dy, dir, edx, edy, ed);
    end
  endtask

  initial begin
    check(0, 0); check(10, 20); check(11, 20); check(9, 20); check(30, 20); check(29, 20);
    check(-30, 20); check(-10, -20); check(0, -5); check(0, 5); check(-5, 0);
    for (int n = 0; n < 4000; n++) check($urandom_range(1530) - 765, $urandom_range(1530) - 765);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
