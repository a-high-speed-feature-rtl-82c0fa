// tb_corner_detector: end-to-end check of the corner detector on synthetic
// images (0x40 background, 0xC0 rectangles and triangles, salt-and-pepper
// noise) 48 pixels wide. The corner list must equal the reference model's,
// every pixel is accepted at one per clock, and each corner must come out
// 5 clocks after the pixel 8 lines + 7 pixels behind it is accepted. Two
// strips are streamed back to back to exercise frame_start.
module tb_corner_detector;
  import fm_pkg::*;
  import fm_ref_pkg::*;
  localparam int W = 48, H = 40, PAD = 8;
  logic   clk = 0, rst_n = 0, frame_start = 0, pix_valid = 0, corner_valid;
  pixel_t pix;
  coord_t img_h, corner_x, corner_y;
  int checks = 0, failures = 0;
  int got_x[$], got_y[$], got_n[$];
  int pix_count = 0, lat_first = -1;

  corner_detector #(.IMG_W(W)) dut (.clk, .rst_n, .frame_start, .img_h, .pix_valid, .pix,
                                    .corner_valid, .corner_x, .corner_y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (pix_valid) pix_count <= pix_count + 1;
    if (corner_valid) begin
      got_x.push_back(corner_x);
      got_y.push_back(corner_y);
      got_n.push_back(pix_count);
    end
  end

  task automatic run_strip(int noise_pm, int shapes);
    int ex[$], ey[$];
    int base;
    make_image(W, H, shapes, noise_pm);
    corners(ex, ey);
    got_x.delete(); got_y.delete(); got_n.delete();
    img_h = coord_t'(H);
    @(negedge clk);
    frame_start = 1;
    base = pix_count;
    for (int i = 0; i < W * (H + PAD); i++) begin
      pix_valid = 1;
      pix = (i < W * H) ? pixel_t'(img[i]) : pixel_t'($urandom);
      @(negedge clk);
      frame_start = 0;
    end
    pix_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (got_x.size() != ex.size()) begin
      failures++;
      $display("corner count %0d, reference %0d", got_x.size(), ex.size());
    end
    for (int i = 0; i < ex.size() && i < got_x.size(); i++) begin
      checks++;
      if (got_x[i] != ex[i] || got_y[i] != ey[i]) begin
        failures++;
        if (failures < 8) $display("corner %0d at (%0d,%0d), reference (%0d,%0d)", i, got_x[i], got_y[i], ex[i], ey[i]);
      end
      // latency: counted in pixels after the corner's own pixel
      checks++;
      if (got_n[i] - base - (ey[i] * W + ex[i]) != 8 * W + 7 + 5) begin
        failures++;
        if (failures < 8) $display("corner %0d latency %0d pixels", i, got_n[i] - base - (ey[i] * W + ex[i]));
      end
    end
    $display("strip: %0d corners (reference %0d)", got_x.size(), ex.size());
    checks++;
    if (ex.size() == 0) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_strip(0, 12);
    run_strip(20, 14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
