// tb_ref_sram: writes every 128-bit part of a reduced store (8 blocks of 16
// vectors) in random order, then reads every block and compares it with the
// model; also checks the one-clock read latency.
module tb_ref_sram;
  localparam int N = 16, D = 8, FB = 512, WB = 128;
  localparam int WA = $clog2(D) + $clog2(N) + 2;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [WA-1:0]       wr_addr;
  logic [WB-1:0]       wr_data;
  logic [2:0]          rd_addr;
  logic [N*FB-1:0]     rd_data;
  logic [N*FB-1:0]     model [D];
  int checks = 0, failures = 0;

  ref_sram #(.N_HD(N), .DEPTH(D), .FEAT_BITS(FB), .WR_BITS(WB)) dut (
    .clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order[$];
    for (int i = 0; i < D * N * 4; i++) order.push_back(i);
    order.shuffle();
    foreach (order[k]) begin
      automatic int a = order[k];
      automatic int blk = a / (N * 4), v = (a / 4) % N, part = a % 4;
      @(negedge clk);
      wr_en = 1; wr_addr = WA'(a);
      for (int j = 0; j < 4; j++) wr_data[j*32 +: 32] = $urandom;
      model[blk][v*FB + part*WB +: WB] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int r = 0; r < 2 * D; r++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 3'(r % D);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data != model[r % D]) begin
        failures++;
        $display("block %0d differs", r % D);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
