// tb_tlp_tx: random corner and match words, random host back-pressure. The
// TLP stream is decoded beat by beat: every TLP must be a 3-DWORD memory
// write of one DWORD, each source's words must arrive in order at addresses
// rising by 4 from its base, and a TLP takes 2 beats when address bit 2 is
// set and 3 otherwise. A final phase holds the link to overflow the corner
// FIFO: the sticky flag must rise and only the words taken before the FIFO
// filled may arrive.
module tb_tlp_tx;
  localparam logic [31:0] CB = 32'h1000_0000, MB = 32'h1010_0000;
  logic clk = 0, rst_n = 0, c_valid = 0, m_valid = 0;
  logic [31:0] c_data, m_data;
  logic tx_st_valid, tx_st_sop, tx_st_eop, tx_st_ready = 0;
  logic [63:0] tx_st_data;
  logic [1:0] overflow;
  logic [31:0] cq[$], mq[$];
  int checks = 0, failures = 0, hold = 0, n_c = 0, n_m = 0, n_two = 0, n_three = 0;
  // decoder state
  logic [63:0] beats[$];

  tlp_tx #(.FIFO_DEPTH(8), .CORNER_BASE(CB), .MATCH_BASE(MB)) dut (
    .clk, .rst_n, .c_valid, .c_data, .m_valid, .m_data,
    .tx_st_valid, .tx_st_data, .tx_st_sop, .tx_st_eop, .tx_st_ready, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) tx_st_ready <= hold ? 1'b0 : ($urandom_range(3) != 0);

  always @(posedge clk) begin
    if (c_valid && !dut.c_full) cq.push_back(c_data);
    if (m_valid && !dut.m_full) mq.push_back(m_data);
    if (tx_st_valid && tx_st_ready) begin
      if (tx_st_sop) beats.delete();
      beats.push_back(tx_st_data);
      if (tx_st_eop) begin
        automatic logic [31:0] dw0 = beats[0][31:0], a = beats[1][31:0], d;
        automatic bit unal = a[2];
        d = unal ? beats[1][63:32] : (beats.size() > 2 ? beats[2][31:0] : 32'hX);
        checks++;
        if (dw0[30:24] != 7'b10_00000 || dw0[9:0] != 10'd1 || beats.size() != (unal ? 2 : 3)) begin
          failures++;
          $display("bad TLP header %h, %0d beats", dw0, beats.size());
        end
        if (unal) n_two++; else n_three++;
        checks++;
        if (a[31:20] == CB[31:20]) begin
          if (cq.size() == 0 || d != cq[0] || a != CB + 32'(4 * n_c)) begin
            failures++;
            $display("corner word %0d: %h at %h", n_c, d, a);
          end
          if (cq.size() > 0) void'(cq.pop_front());
          n_c++;
        end else begin
          if (mq.size() == 0 || d != mq[0] || a != MB + 32'(4 * n_m)) begin
            failures++;
            $display("match word %0d: %h at %h", n_m, d, a);
          end
          if (mq.size() > 0) void'(mq.pop_front());
          n_m++;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      c_valid = ($urandom_range(15) == 0); c_data = $urandom;
      m_valid = ($urandom_range(19) == 0); m_data = $urandom;
    end
    @(negedge clk); c_valid = 0; m_valid = 0;
    repeat (200) @(posedge clk);
    checks++;
    if (overflow != 0 || cq.size() != 0 || mq.size() != 0 || n_two == 0 || n_three == 0) begin
      failures++;
      $display("overflow %b, left %0d/%0d, 2-beat %0d, 3-beat %0d", overflow, cq.size(), mq.size(), n_two, n_three);
    end
    // overflow phase
    hold = 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 14; n++) begin
      @(negedge clk); c_valid = 1; c_data = 32'hC000_0000 + n;
    end
    @(negedge clk); c_valid = 0;
    hold = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (overflow != 2'b01 || cq.size() != 0) begin
      failures++;
      $display("overflow %b, left %0d", overflow, cq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
