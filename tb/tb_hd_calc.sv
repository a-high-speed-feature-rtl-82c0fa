// tb_hd_calc: Hamming distance of random and structured 512-bit vectors
// against $countones of their XOR.
module tb_hd_calc;
  logic [511:0] a, b;
  logic [9:0]   hd;
  int checks = 0, failures = 0;

  hd_calc #(.FEAT_BITS(512)) dut (.a, .b, .hd);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 16; i++) begin
        a[i*32 +: 32] = $urandom;
        b[i*32 +: 32] = (n % 3 == 0) ? a[i*32 +: 32] ^ (32'h1 << $urandom_range(31)) : $urandom;
      end
      if (n == 0) begin a = '0; b = '1; end
      if (n == 1) begin a = '1; b = '1; end
      #1;
      checks++;
      if (int'(hd) != $countones(a ^ b)) begin
        failures++;
        if (failures < 5) $display("hd %0d want %0d", hd, $countones(a ^ b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
