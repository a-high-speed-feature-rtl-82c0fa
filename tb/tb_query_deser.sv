// tb_query_deser: random 512-bit vectors sent as 16 words with random gaps,
// taken with random back-pressure; every vector must arrive intact and in
// order, and a gap-free word stream must give one vector per 16 clocks.
module tb_query_deser;
  logic clk = 0, rst_n = 0, dw_valid = 0, dw_ready, q_valid, q_ready = 0;
  logic [31:0]  dw;
  logic [511:0] q;
  logic [511:0] sent[$];
  int checks = 0, failures = 0, got = 0, stall_mode = 1;
  int last_t = -1, gaps_ok = 0;

  query_deser #(.FEAT_BITS(512), .DW_BITS(32)) dut (.clk, .rst_n, .dw_valid, .dw_ready, .dw,
                                                   .q_valid, .q_ready, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) q_ready <= stall_mode ? ($urandom_range(2) == 0) : 1'b1;

  always @(posedge clk) begin
    if (q_valid && q_ready) begin
      checks++;
      if (sent.size() == 0 || q != sent[0]) begin
        failures++;
        $display("vector %0d differs", got);
      end
      if (sent.size() > 0) void'(sent.pop_front());
      if (!stall_mode && last_t >= 0) begin
        checks++;
        if (cyc - last_t != 16) begin failures++; $display("interval %0d", cyc - last_t); end
      end
      last_t = cyc;
      got++;
    end
  end

  task automatic send(bit gaps);
    logic [511:0] v;
    for (int i = 0; i < 16; i++) v[i*32 +: 32] = $urandom;
    sent.push_back(v);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      while (gaps && $urandom_range(3) == 0) begin dw_valid = 0; @(negedge clk); end
      dw_valid = 1; dw = v[i*32 +: 32];
      @(posedge clk);
      while (!dw_ready) @(posedge clk);
    end
    @(negedge clk); dw_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) send(1);
    repeat (40) @(posedge clk);
    stall_mode = 0; last_t = -1;
    for (int i = 0; i < 10; i++) begin
      logic [511:0] v;
      for (int k = 0; k < 16; k++) v[k*32 +: 32] = $urandom;
      sent.push_back(v);
      for (int k = 0; k < 16; k++) begin
        @(negedge clk); dw_valid = 1; dw = v[k*32 +: 32];
      end
    end
    @(negedge clk); dw_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (got != 50 || sent.size() != 0) begin failures++; $display("received %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
