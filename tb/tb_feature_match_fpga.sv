// tb_feature_match_fpga: end-to-end run of the whole design at its default
// size (2048-pixel lines, 128 Hamming-distance units, 2048 reference
// vectors).
//
// 1. A synthetic 2048 x 16 strip (plus 8 flush rows) is sent as PCIe memory
//    writes of random length and alignment, mixed with memory reads that
//    must be dropped and one query write in the middle of the image. The
//    corner list must equal the reference model's.
// 2. 2048 reference vectors (written beforehand through the DDR3-side port,
//    n_ref = 2000) are searched by about 40 queries (some closest to a vector beyond n_ref)
//    are sent in TLPs holding one to four vectors. Each result (best
//    distance and index, second-best distance) must equal a direct search.
// 3. Every result must also come back as a memory-write TLP on the transmit
//    stream, in order, at its region's next address, while the host side
//    throttles tx_st_ready at random; no result may be lost.
// Every mechanism the design has is counted and must occur: PCIe
// back-pressure, unaligned payload start, dropped TLPs, channel switch,
// rejection by each sub-detector, transmit back-pressure, both transmit
// TLP lengths, suppression by the 5x5 maximum and masking
// by n_ref. Query back-pressure at the matcher is counted but cannot occur
// here: the link delivers at most one word per clock, exactly the matcher's
// rate (tb_hd_matcher and tb_query_deser exercise it).
module tb_feature_match_fpga;
  import fm_pkg::*;
  import fm_ref_pkg::*;
  localparam int W = 2048, H = 16, PAD = 8, NREF = 2000;

  logic        clk = 0, rst_n = 0;
  logic        rx_st_valid = 0, rx_st_sop = 0, rx_st_eop = 0, rx_st_ready;
  logic [63:0] rx_st_data;
  logic        frame_start = 0, corner_valid;
  coord_t      img_h = coord_t'(H), corner_x, corner_y;
  logic        ref_wr_en = 0;
  logic [12:0] ref_wr_addr;
  logic [127:0] ref_wr_data;
  logic [11:0] n_ref = 12'd2048;
  logic        m_valid;
  hd_t         m_best, m_second;
  logic [10:0] m_idx;
  logic        tx_st_valid, tx_st_sop, tx_st_eop, tx_st_ready = 0;
  logic [63:0] tx_st_data;
  logic [1:0]  tx_overflow;
  logic [31:0] c_words[$], m_words[$], tx_c[$], tx_m[$];
  logic [31:0] tx_c_addr[$], tx_m_addr[$];
  logic [63:0] tx_beats[$];
  int n_tx_bp = 0, n_tx2 = 0, n_tx3 = 0;

  feature_match_fpga dut (
    .clk, .rst_n, .rx_st_valid, .rx_st_data, .rx_st_sop, .rx_st_eop, .rx_st_ready,
    .frame_start, .img_h, .corner_valid, .corner_x, .corner_y,
    .ref_wr_en, .ref_wr_addr, .ref_wr_data, .n_ref,
    .m_valid, .m_best, .m_idx, .m_second,
    .tx_st_valid, .tx_st_data, .tx_st_sop, .tx_st_eop, .tx_st_ready, .tx_overflow);

  int checks = 0, failures = 0;
  int got_x[$], got_y[$];
  int exp_best[$], exp_idx[$], exp_sec[$];
  logic [511:0] refv [2048];
  // mechanism counters
  int n_backpressure = 0, n_unaligned = 0, n_dropped = 0, n_chswitch = 0;
  int n_rej_c1 = 0, n_rej_sym = 0, n_rej_c3 = 0, n_rej_c4 = 0, n_cand = 0;
  int n_masked = 0, n_qstall = 0, n_results = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) tx_st_ready <= ($urandom_range(3) != 0);

  // transmit-stream decoder
  always @(posedge clk) begin
    if (corner_valid) c_words.push_back({corner_y, corner_x});
    if (m_valid) m_words.push_back({1'b0, m_second, m_idx, m_best});
    if (tx_st_valid && !tx_st_ready) n_tx_bp++;
    if (tx_st_valid && tx_st_ready) begin
      if (tx_st_sop) tx_beats.delete();
      tx_beats.push_back(tx_st_data);
      if (tx_st_eop) begin
        automatic logic [31:0] a = tx_beats[1][31:0];
        automatic logic [31:0] d = a[2] ? tx_beats[1][63:32] : tx_beats[tx_beats.size() - 1][31:0];
        if (a[2]) n_tx2++; else n_tx3++;
        if (a[31:20] == 12'h100) begin tx_c.push_back(d); tx_c_addr.push_back(a); end
        else begin tx_m.push_back(d); tx_m_addr.push_back(a); end
      end
    end
  end

  always @(posedge clk) begin
    if (rx_st_valid && !rx_st_ready) n_backpressure++;
    if (corner_valid) begin got_x.push_back(corner_x); got_y.push_back(corner_y); end
    if (dut.u_det.e_valid && dut.u_det.e_x >= 6 && dut.u_det.e_x < W - 6
        && dut.u_det.e_y >= 6 && dut.u_det.e_y < H - 6) begin
      if (!dut.u_det.e_tests[0]) n_rej_c1++;
      if (!dut.u_det.e_tests[1]) n_rej_sym++;
      if (!dut.u_det.e_tests[2]) n_rej_c3++;
      if (!dut.u_det.e_tests[3]) n_rej_c4++;
      if (dut.u_det.e_pass && dut.u_det.e_score != 0) n_cand++;
    end
    if (dut.q_valid && !dut.q_ready) n_qstall++;
    if (m_valid) begin
      checks++;
      n_results++;
      if (exp_best.size() == 0 || int'(m_best) != exp_best[0] || int'(m_idx) != exp_idx[0]
          || int'(m_second) != exp_sec[0]) begin
        failures++;
        if (failures < 6 && exp_best.size() > 0)
          $display("match %0d: %0d@%0d/%0d, want %0d@%0d/%0d", n_results, m_best, m_idx, m_second,
                   exp_best[0], exp_idx[0], exp_sec[0]);
      end
      if (exp_best.size() > 0) begin
        void'(exp_best.pop_front()); void'(exp_idx.pop_front()); void'(exp_sec.pop_front());
      end
    end
  end

  task automatic drive(beat_t q[$]);
    foreach (q[i]) begin
      @(negedge clk);
      rx_st_valid = 1; rx_st_data = q[i].d; rx_st_sop = q[i].sop; rx_st_eop = q[i].eop;
      @(posedge clk);
      while (!rx_st_ready) @(posedge clk);
    end
    @(negedge clk); rx_st_valid = 0;
  endtask

  // query vectors: close to a reference vector, expected result recorded
  function automatic logic [511:0] make_query(int near, int flips);
    logic [511:0] v = refv[near];
    int b1 = 1023, b2 = 1023, bi = 0, u1 = 1023, ui = 0;
    for (int f = 0; f < flips; f++) v[$urandom_range(511)] ^= 1'b1;
    for (int i = 0; i < 2048; i++) begin
      automatic int d = $countones(v ^ refv[i]);
      if (i < int'(n_ref)) begin
        if (d < b1) begin b2 = b1; b1 = d; bi = i; end
        else if (d < b2) b2 = d;
      end
      if (d < u1) begin u1 = d; ui = i; end
    end
    if (ui >= int'(n_ref)) n_masked++;
    exp_best.push_back(b1); exp_idx.push_back(bi); exp_sec.push_back(b2);
    return v;
  endfunction

  task automatic send_queries(int nvec, int near_lo, int near_hi);
    logic [31:0] pl[$];
    beat_t q[$];
    for (int k = 0; k < nvec; k++) begin
      automatic logic [511:0] v = make_query($urandom_range(near_hi, near_lo), $urandom_range(80));
      for (int i = 0; i < 16; i++) pl.push_back(v[i*32 +: 32]);
    end
    build_tlp(q, 2'b10, 5'b00000, 32'h0010_0000 | ($urandom_range(1) << 2), pl);
    n_chswitch++;
    drive(q);
  endtask

  initial begin
    int ex[$], ey[$];
    int total, pos;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2048; i++)
      for (int k = 0; k < 16; k++) refv[i][k*32 +: 32] = $urandom;

    // reference vectors first, so that a query may arrive during the image
    for (int a = 0; a < 2048 * 4; a++) begin
      @(negedge clk);
      ref_wr_en = 1; ref_wr_addr = 13'(a); ref_wr_data = refv[a / 4][(a % 4) * 128 +: 128];
    end
    @(negedge clk); ref_wr_en = 0;
    n_ref = 12'(NREF);

    // ---------------- phase 1: corner detection ----------------
    make_image(W, H, 220, 8);
    corners(ex, ey);
    $display("reference: %0d corners", ex.size());
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    total = W * (H + PAD) / 4;
    pos = 0;
    while (pos < total) begin
      automatic int len = 32 + $urandom_range(224);
      automatic logic [31:0] addr = 32'h0000_0000 | ($urandom_range(1) << 2);
      logic [31:0] pl[$];
      beat_t q[$];
      pl.delete();
      q.delete();
      if (len > total - pos) len = total - pos;
      for (int i = 0; i < len; i++) begin
        logic [31:0] w4;
        for (int b = 0; b < 4; b++) begin
          automatic int p = 4 * (pos + i) + b;
          w4[8*b +: 8] = (p < W * H) ? 8'(img[p]) : 8'h40;
        end
        pl.push_back(w4);
      end
      if (addr[2]) n_unaligned++;
      build_tlp(q, 2'b10, 5'b00000, addr, pl);
      drive(q);
      pos += len;
      if (pos >= total / 2 && pos - len < total / 2) send_queries(2, 0, NREF - 1);
      if ($urandom_range(5) == 0) begin
        beat_t r[$];
        r.delete();
        build_tlp(r, 2'b00, 5'b00000, 32'h0000_2000, pl);
        drive(r);
        n_dropped++;
      end
    end
    repeat (40) @(posedge clk);
    checks++;
    if (got_x.size() != ex.size()) begin
      failures++;
      $display("corners %0d, reference %0d", got_x.size(), ex.size());
    end
    for (int i = 0; i < ex.size() && i < got_x.size(); i++) begin
      checks++;
      if (got_x[i] != ex[i] || got_y[i] != ey[i]) begin
        failures++;
        if (failures < 6) $display("corner %0d (%0d,%0d) want (%0d,%0d)", i, got_x[i], got_y[i], ex[i], ey[i]);
      end
    end

    // ---------------- phase 2: matching ----------------
    for (int n = 0; n < 14; n++) send_queries(1 + $urandom_range(3), 0, NREF - 1);
    for (int n = 0; n < 2; n++) send_queries(2, NREF, 2047);
    repeat (100) @(posedge clk);
    checks++;
    if (exp_best.size() != 0) begin failures++; $display("%0d results missing", exp_best.size()); end

    // ---------------- phase 3: results returned over PCIe ----------------
    repeat (2000) @(posedge clk);
    checks++;
    if (tx_overflow != 0 || tx_c.size() != c_words.size() || tx_m.size() != m_words.size()) begin
      failures++;
      $display("transmit: overflow %b, corners %0d/%0d, matches %0d/%0d", tx_overflow,
               tx_c.size(), c_words.size(), tx_m.size(), m_words.size());
    end
    foreach (tx_c[i]) begin
      checks++;
      if (i >= c_words.size() || tx_c[i] != c_words[i] || tx_c_addr[i] != 32'h1000_0000 + 32'(4 * i)) begin
        failures++; $display("returned corner %0d: %h at %h", i, tx_c[i], tx_c_addr[i]);
      end
    end
    foreach (tx_m[i]) begin
      checks++;
      if (i >= m_words.size() || tx_m[i] != m_words[i] || tx_m_addr[i] != 32'h1010_0000 + 32'(4 * i)) begin
        failures++; $display("returned match %0d: %h at %h", i, tx_m[i], tx_m_addr[i]);
      end
    end

    // ---------------- mechanisms ----------------
    $display("corners %0d, backpressure %0d, unaligned %0d, dropped %0d, channel switches %0d",
             got_x.size(), n_backpressure, n_unaligned, n_dropped, n_chswitch);
    $display("rejected: C1 %0d, symmetry %0d, C3 %0d, C4 %0d; candidates %0d, suppressed %0d",
             n_rej_c1, n_rej_sym, n_rej_c3, n_rej_c4, n_cand, n_cand - got_x.size());
    $display("matches %0d, masked by n_ref %0d, matcher stalls %0d", n_results, n_masked, n_qstall);
    $display("transmit: back-pressure %0d, 2-beat TLPs %0d, 3-beat TLPs %0d", n_tx_bp, n_tx2, n_tx3);
    begin
      automatic int m[14] = '{n_backpressure, n_unaligned, n_dropped, n_chswitch, n_rej_c1,
                              n_rej_sym, n_rej_c3, n_rej_c4, n_cand - got_x.size(), n_masked,
                              got_x.size(), n_tx_bp, n_tx2, n_tx3};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
