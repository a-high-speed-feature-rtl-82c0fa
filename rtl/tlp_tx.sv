// tlp_tx: send side of the PCIe link, 64-bit Avalon-ST.
//
// Returns results to host memory: corner coordinates ({y, x}, 16 bits each)
// and matching results ({1'b0, second-best HD, index, best HD}) are 32-bit
// words. Each word becomes one memory-write TLP with a 3-DWORD header and a
// one-DWORD payload, written to a ring of 2^WIN_BITS bytes starting at
// CORNER_BASE or MATCH_BASE; the write address advances by 4 bytes per word.
// The beat layout mirrors tlp_rx: beat 0 = {DW1, DW0}; beat 1 = {payload,
// DW2} when address bit 2 is set (2 beats), else {0, DW2} followed by
// {0, payload} (3 beats). Returning one word per TLP, the address map and the
// FIFO sizes are this design's choices; the document only says that corners
// and best/second-best distances go back to the host.
//
// Each source has a FIFO_DEPTH-word FIFO; a word arriving at a full FIFO is
// lost and sets the source's sticky overflow bit (bit 0 corners, bit 1
// matches). When both FIFOs hold data the sources alternate. tx_st_ready is
// taken with ready latency 0.
module tlp_tx
#(
  parameter int          FIFO_DEPTH  = 16,
  parameter logic [31:0] CORNER_BASE = 32'h1000_0000,
  parameter logic [31:0] MATCH_BASE  = 32'h1010_0000,
  parameter int          WIN_BITS    = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        c_valid,
  input  logic [31:0] c_data,
  input  logic        m_valid,
  input  logic [31:0] m_data,
  output logic        tx_st_valid,
  output logic [63:0] tx_st_data,
  output logic        tx_st_sop,
  output logic        tx_st_eop,
  input  logic        tx_st_ready,
  output logic [1:0]  overflow
);
  typedef enum logic [1:0] {S_IDLE, S_B0, S_B1, S_B2} state_t;

  localparam logic [31:0] DW0 = {1'b0, 2'b10, 5'b00000, 14'd0, 10'd1};
  localparam logic [31:0] DW1 = {16'h0000, 8'h00, 4'h0, 4'hF};

  logic [31:0] c_dout, m_dout;
  logic        c_full, c_empty, m_full, m_empty, c_pop, m_pop;

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_cf (
    .clk, .rst_n, .push(c_valid), .din(c_data), .pop(c_pop), .dout(c_dout),
    .full(c_full), .empty(c_empty));
  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_mf (
    .clk, .rst_n, .push(m_valid), .din(m_data), .pop(m_pop), .dout(m_dout),
    .full(m_full), .empty(m_empty));

  state_t              state;
  logic                last_m, pick_m;
  logic [31:0]         word, addr;
  logic [WIN_BITS-1:0] c_off, m_off;

  // arbitration: alternate when both have data
  always_comb begin
    pick_m = !m_empty && (c_empty || !last_m);
    c_pop  = (state == S_IDLE) && !c_empty && !pick_m;
    m_pop  = (state == S_IDLE) && pick_m;
  end

  always_comb begin
    tx_st_valid = (state != S_IDLE);
    tx_st_sop   = (state == S_B0);
    tx_st_eop   = (state == S_B2) || (state == S_B1 && addr[2]);
    unique case (state)
      S_B0:    tx_st_data = {DW1, DW0};
      S_B1:    tx_st_data = {addr[2] ? word : 32'h0, addr};
      S_B2:    tx_st_data = {32'h0, word};
      default: tx_st_data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      last_m   <= 1'b0;
      c_off    <= '0;
      m_off    <= '0;
      word     <= '0;
      addr     <= '0;
      overflow <= '0;
    end else begin
      if (c_valid && c_full) overflow[0] <= 1'b1;
      if (m_valid && m_full) overflow[1] <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (c_pop) begin
            word   <= c_dout;
            addr   <= CORNER_BASE + 32'(c_off);
            c_off  <= c_off + WIN_BITS'(4);
            last_m <= 1'b0;
            state  <= S_B0;
          end else if (m_pop) begin
            word   <= m_dout;
            addr   <= MATCH_BASE + 32'(m_off);
            m_off  <= m_off + WIN_BITS'(4);
            last_m <= 1'b1;
            state  <= S_B0;
          end
        end
        S_B0: if (tx_st_ready) state <= S_B1;
        S_B1: if (tx_st_ready) state <= addr[2] ? S_IDLE : S_B2;
        S_B2: if (tx_st_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
