// tb_tlp_rx: random mix of 3-DWORD memory writes (both address alignments,
// both channels, 1..40 DWORDs), memory reads and 4-DWORD-header writes, with
// random source gaps and sink back-pressure. The payload DWORDs of the
// 3-DWORD writes, with their channel bit, must come out in order and nothing
// else; a gap-free stream with a ready sink must give one DWORD per clock.
module tb_tlp_rx;
  import fm_ref_pkg::*;
  localparam int CH = 20;
  logic clk = 0, rst_n = 0, rx_st_valid = 0, rx_st_sop = 0, rx_st_eop = 0, rx_st_ready;
  logic [63:0] rx_st_data;
  logic dw_valid, dw_ready = 0, dw_ch;
  logic [31:0] dw;
  logic [32:0] expq[$];
  int checks = 0, failures = 0, cyc = 0, n_out = 0, stall = 1, out_cycles = 0;
  int n_unal = 0, n_drop = 0;

  tlp_rx #(.CH_BIT(CH)) dut (.clk, .rst_n, .rx_st_valid, .rx_st_data, .rx_st_sop, .rx_st_eop,
                            .rx_st_ready, .dw_valid, .dw_ready, .dw, .dw_ch);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) dw_ready <= stall ? ($urandom_range(3) != 0) : 1'b1;

  always @(posedge clk) begin
    if (dw_valid && dw_ready) begin
      checks++;
      n_out++;
      if (expq.size() == 0 || {dw_ch, dw} != expq[0]) begin
        failures++;
        if (failures < 6) $display("out %0d: %0b/%h", n_out, dw_ch, dw);
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end

  task automatic drive(beat_t q[$], bit gaps);
    foreach (q[i]) begin
      @(negedge clk);
      while (gaps && $urandom_range(4) == 0) begin rx_st_valid = 0; @(negedge clk); end
      rx_st_valid = 1; rx_st_data = q[i].d; rx_st_sop = q[i].sop; rx_st_eop = q[i].eop;
      @(posedge clk);
      while (!rx_st_ready) @(posedge clk);
    end
    @(negedge clk); rx_st_valid = 0;
  endtask

  initial begin
    beat_t q[$];
    logic [31:0] pl[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic int kind = $urandom_range(9);
      automatic logic [31:0] addr = {$urandom} & 32'hFFFF_FFFC;
      pl.delete(); q.delete();
      for (int i = 0, m = 1 + $urandom_range(39); i < m; i++) pl.push_back($urandom);
      if (kind == 0) begin
        build_tlp(q, 2'b00, 5'b00000, addr, pl);
        n_drop++;
      end else if (kind == 1) begin
        build_tlp(q, 2'b11, 5'b00000, addr, pl);
        n_drop++;
      end else begin
        build_tlp(q, 2'b10, 5'b00000, addr, pl);
        if (addr[2]) n_unal++;
        foreach (pl[i]) expq.push_back({addr[CH], pl[i]});
      end
      drive(q, 1);
    end
    // throughput: long aligned and unaligned writes, no gaps, sink always ready
    stall = 0;
    repeat (10) @(posedge clk);
    pl.delete(); q.delete();
    for (int i = 0; i < 64; i++) pl.push_back($urandom);
    build_tlp(q, 2'b10, 5'b00000, 32'h0000_1000, pl);
    foreach (pl[i]) expq.push_back({1'b0, pl[i]});
    begin
      automatic int t0 = cyc, c0 = n_out;
      drive(q, 0);
      repeat (4) @(posedge clk);
      checks++;
      if (n_out - c0 != 64 || cyc - t0 > 64 + 8) begin
        failures++;
        $display("throughput: %0d words in %0d clocks", n_out - c0, cyc - t0);
      end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_unal == 0 || n_drop == 0) begin
      failures++;
      $display("left %0d, unaligned %0d, dropped %0d", expq.size(), n_unal, n_drop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
