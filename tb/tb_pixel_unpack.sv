// tb_pixel_unpack: random words with random gaps must come out as pixels,
// byte 0 first, in order; a gap-free word stream must give a pixel on every
// clock.
module tb_pixel_unpack;
  import fm_pkg::*;
  logic clk = 0, rst_n = 0, dw_valid = 0, dw_ready, pix_valid;
  logic [31:0] dw;
  pixel_t pix;
  pixel_t expq[$];
  int checks = 0, failures = 0, n_pix = 0;

  pixel_unpack dut (.clk, .rst_n, .dw_valid, .dw_ready, .dw, .pix_valid, .pix);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (pix_valid) begin
      checks++;
      n_pix++;
      if (expq.size() == 0 || pix != expq[0]) begin
        failures++;
        if (failures < 6) $display("pixel %0d = %h", n_pix, pix);
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end

  task automatic send(bit gaps);
    logic [31:0] v = $urandom;
    for (int b = 0; b < 4; b++) expq.push_back(v[8*b +: 8]);
    @(negedge clk);
    while (gaps && $urandom_range(2) == 0) begin dw_valid = 0; @(negedge clk); end
    dw_valid = 1; dw = v;
    @(posedge clk);
    while (!dw_ready) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) send(1);
    @(negedge clk); dw_valid = 0;
    repeat (8) @(posedge clk);
    begin
      automatic int p0 = n_pix;
      automatic int t0 = $time;
      for (int n = 0; n < 100; n++) send(0);
      @(negedge clk); dw_valid = 0;
      repeat (6) @(posedge clk);
      checks++;
      if (n_pix - p0 != 400 || ($time - t0) / 10 > 410) begin
        failures++;
        $display("%0d pixels in %0d clocks", n_pix - p0, ($time - t0) / 10);
      end
    end
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
