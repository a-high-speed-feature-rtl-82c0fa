// tb_hd_matcher: reduced matcher (8 calculators x 4 blocks = 32 vectors).
// Reference vectors are written through the 128-bit port, queries are
// built close to chosen reference vectors (and some with ties); best index,
// best and second-best distance must match a direct search over the first
// n_ref vectors. Back-to-back queries must be taken every 4 clocks and each
// result must be seen DEPTH+4 clock edges after the edge that took its query.
module tb_hd_matcher;
  import fm_pkg::*;
  localparam int N = 8, D = 4, FB = 512;
  localparam int WA = $clog2(D) + $clog2(N) + 2;
  logic clk = 0, rst_n = 0, ref_wr_en = 0, q_valid = 0, q_ready, m_valid;
  logic [WA-1:0]  ref_wr_addr;
  logic [127:0]   ref_wr_data;
  logic [11:0]    n_ref;
  logic [FB-1:0]  q;
  hd_t            m_best, m_second;
  logic [10:0]    m_idx;
  logic [FB-1:0]  refv [N*D];
  int checks = 0, failures = 0, cyc = 0;
  int exp_best[$], exp_idx[$], exp_sec[$], acc_t[$];
  int last_acc = -1, n_res = 0, b2b = 0;

  hd_matcher #(.N_HD(N), .DEPTH(D), .FEAT_BITS(FB), .WR_BITS(128)) dut (
    .clk, .rst_n, .ref_wr_en, .ref_wr_addr, .ref_wr_data, .n_ref,
    .q_valid, .q_ready, .q, .m_valid, .m_best, .m_idx, .m_second);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (q_valid && q_ready) begin
      automatic int b1 = 1023, b2 = 1023, bi = 0;
      for (int i = 0; i < N * D && i < int'(n_ref); i++) begin
        automatic int d = $countones(q ^ refv[i]);
        if (d < b1) begin b2 = b1; b1 = d; bi = i; end
        else if (d < b2) b2 = d;
      end
      exp_best.push_back(b1); exp_idx.push_back(bi); exp_sec.push_back(b2);
      if (last_acc >= 0 && last_acc == cyc - D) b2b++;
      acc_t.push_back(cyc);
      last_acc = cyc;
    end
    if (m_valid) begin
      checks += 2;
      n_res++;
      if (exp_best.size() == 0) begin failures++; end
      else begin
        if (int'(m_best) != exp_best[0] || int'(m_idx) != exp_idx[0] || int'(m_second) != exp_sec[0]) begin
          failures++;
          if (failures < 6) $display("got %0d@%0d/%0d want %0d@%0d/%0d", m_best, m_idx, m_second,
                                     exp_best[0], exp_idx[0], exp_sec[0]);
        end
        if (cyc - acc_t[0] != D + 4) begin
          failures++;
          if (failures < 6) $display("latency %0d", cyc - acc_t[0]);
        end
        void'(exp_best.pop_front()); void'(exp_idx.pop_front());
        void'(exp_sec.pop_front()); void'(acc_t.pop_front());
      end
    end
  end

  task automatic query(int near, int flips, int dup);
    @(negedge clk);
    q_valid = 1;
    q = refv[near];
    for (int f = 0; f < flips; f++) q[$urandom_range(FB - 1)] ^= 1'b1;
    if (dup >= 0) refv[dup] = refv[near];
    @(posedge clk);
    while (!q_ready) @(posedge clk);
  endtask

  initial begin
    int back2back;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N * D; i++)
      for (int k = 0; k < 16; k++) refv[i][k*32 +: 32] = $urandom;
    // one duplicate pair to make a tie: vector 20 copies vector 5
    refv[20] = refv[5];
    for (int a = 0; a < N * D * 4; a++) begin
      @(negedge clk);
      ref_wr_en = 1; ref_wr_addr = WA'(a);
      ref_wr_data = refv[a / 4][(a % 4) * 128 +: 128];
    end
    @(negedge clk); ref_wr_en = 0;
    n_ref = 12'(N * D);
    for (int n = 0; n < 30; n++) query($urandom_range(N * D - 1), $urandom_range(60), -1);
    query(5, 0, -1);       // exact tie between 5 and 20
    query(20, 3, -1);
    @(negedge clk); q_valid = 0;
    repeat (2 * D + 6) @(negedge clk);
    n_ref = 12'(19);       // only vectors 0..18 count (changed while idle)
    for (int n = 0; n < 10; n++) query($urandom_range(N * D - 1), $urandom_range(30), -1);
    @(negedge clk); q_valid = 0;
    repeat (3 * D + 10) @(posedge clk);
    checks++;
    if (b2b < 35) begin failures++; $display("only %0d back-to-back queries", b2b); end
    checks++;
    if (n_res != 42 || exp_best.size() != 0) begin failures++; $display("results %0d", n_res); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
