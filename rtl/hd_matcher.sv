// hd_matcher: parallel Hamming-distance search of one query vector against
// the reference vectors held in ref_sram.
//
// A query is accepted on q_valid/q_ready. The matcher then reads one SRAM
// block per clock (DEPTH blocks of N_HD vectors, 16 x 128 by default) and
// compares the query with the N_HD vectors of the block in N_HD hd_calc
// units in the same clock. A two-level comparer keeps the result: level 1 is
// a tree that reduces the N_HD distances of one clock to a best distance,
// its vector index and a second-best distance; level 2 merges these block
// results over the DEPTH clocks. Vectors with index >= n_ref are ignored; a
// missing second best reads as HD_NONE (all ones). Ties go to the lower
// index.
//
// Timing: q_ready is high when idle and in the clock that issues the last
// block read, so back-to-back queries are taken every DEPTH clocks (16, the
// time a 512-bit vector needs to arrive over a 32-bit word stream). m_valid
// and the result are set at the (DEPTH+3)-th clock edge after the edge that
// accepted the query and stay for one clock.
// Pipeline: issue read -> SRAM data + query -> distances -> level-1 tree ->
// level-2 merge and output.
module hd_matcher
  import fm_pkg::*;
#(
  parameter int N_HD      = 128,
  parameter int DEPTH     = 16,
  parameter int FEAT_BITS = 512,
  parameter int WR_BITS   = 128,
  localparam int WA_W     = $clog2(DEPTH) + $clog2(N_HD) + $clog2(FEAT_BITS / WR_BITS),
  localparam int BW       = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // reference vectors from the external memory
  input  logic                 ref_wr_en,
  input  logic [WA_W-1:0]      ref_wr_addr,
  input  logic [WR_BITS-1:0]   ref_wr_data,
  input  logic [11:0]          n_ref,
  // query
  input  logic                 q_valid,
  output logic                 q_ready,
  input  logic [FEAT_BITS-1:0] q,
  // result
  output logic                 m_valid,
  output hd_t                  m_best,
  output logic [10:0]          m_idx,
  output hd_t                  m_second
);
  // ---------------- issue ----------------
  logic                 busy;
  logic [BW-1:0]        blk;
  logic [FEAT_BITS-1:0] q_reg;
  logic                 last_issue;

  assign last_issue = busy && (blk == BW'(DEPTH - 1));
  assign q_ready    = !busy || last_issue;

  always_ff @(posedge clk) begin
    if (q_valid && q_ready) q_reg <= q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      blk  <= '0;
    end else begin
      if (busy) blk <= last_issue ? '0 : blk + 1'b1;
      if (q_valid && q_ready) busy <= 1'b1;
      else if (last_issue)    busy <= 1'b0;
    end
  end

  logic [N_HD*FEAT_BITS-1:0] rd_data;

  ref_sram #(.N_HD(N_HD), .DEPTH(DEPTH), .FEAT_BITS(FEAT_BITS), .WR_BITS(WR_BITS)) u_sram (
    .clk, .wr_en(ref_wr_en), .wr_addr(ref_wr_addr), .wr_data(ref_wr_data),
    .rd_en(busy), .rd_addr(blk), .rd_data);

  // ---------------- stage 1: SRAM data and distances ----------------
  logic                 s1_valid, s1_first, s1_last;
  logic [BW-1:0]        s1_blk;
  logic [FEAT_BITS-1:0] s1_q;
  hd_t                  dists [N_HD];

  always_ff @(posedge clk) begin
    if (busy) begin
      s1_q     <= q_reg;
      s1_blk   <= blk;
      s1_first <= (blk == '0);
      s1_last  <= last_issue;
    end
  end

  for (genvar v = 0; v < N_HD; v++) begin : g_hd
    hd_calc #(.FEAT_BITS(FEAT_BITS)) u_hd (
      .a(s1_q), .b(rd_data[v*FEAT_BITS +: FEAT_BITS]), .hd(dists[v]));
  end

  // ---------------- stage 2: registered distances ----------------
  logic          s2_valid, s2_first, s2_last;
  logic [BW-1:0] s2_blk;
  hd_t           s2_dist [N_HD];

  always_ff @(posedge clk) begin
    if (s1_valid) begin
      for (int v = 0; v < N_HD; v++)
        s2_dist[v] <= (11'(s1_blk) * 11'(N_HD) + 11'(v) >= n_ref[10:0] && !n_ref[11])
                      ? HD_NONE : dists[v];
      s2_blk   <= s1_blk;
      s2_first <= s1_first;
      s2_last  <= s1_last;
    end
  end

  // ---------------- stage 3: level-1 comparer (one block) ----------------
  top2_t tree [2*N_HD];
  always_comb begin
    for (int v = 0; v < N_HD; v++)
      tree[N_HD + v] = '{best: s2_dist[v], idx: 11'(s2_blk) * 11'(N_HD) + 11'(v), second: HD_NONE};
    for (int i = N_HD - 1; i >= 1; i--) tree[i] = top2_merge(tree[2*i], tree[2*i+1]);
    tree[0] = tree[1];
  end

  logic  s3_valid, s3_first, s3_last;
  top2_t s3_top;
  always_ff @(posedge clk) begin
    if (s2_valid) begin
      s3_top   <= tree[1];
      s3_first <= s2_first;
      s3_last  <= s2_last;
    end
  end

  // ---------------- stage 4: level-2 comparer (all blocks) ----------------
  top2_t run, run_nxt;
  assign run_nxt = s3_first ? s3_top : top2_merge(run, s3_top);

  always_ff @(posedge clk) begin
    if (s3_valid) run <= run_nxt;
    if (s3_valid && s3_last) begin
      m_best   <= run_nxt.best;
      m_idx    <= run_nxt.idx;
      m_second <= run_nxt.second;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      s3_valid <= 1'b0;
      m_valid  <= 1'b0;
    end else begin
      s1_valid <= busy;
      s2_valid <= s1_valid;
      s3_valid <= s2_valid;
      m_valid  <= s3_valid && s3_last;
    end
  end
endmodule
