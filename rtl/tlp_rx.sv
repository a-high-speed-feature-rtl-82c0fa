// tlp_rx: receive side of the PCIe link, 64-bit Avalon-ST.
//
// The host writes image pixels and query feature vectors into the FPGA with
// memory-write TLPs carrying a 3-DWORD header. On the 64-bit streaming bus a
// TLP occupies: beat 0 (rx_st_sop) = {DW1, DW0}; beat 1 = {payload 0, DW2}
// when address bit 2 is set, else {unused, DW2}; further beats carry two
// payload DWORDs each, low half first; rx_st_eop marks the last beat. DW0
// gives Fmt/Type (3-DWORD memory write: Fmt = 2'b10, Type = 5'b00000) and the
// payload length; DW2 is the address. This beat layout is the usual one of
// the Altera hard IP; the TLP-level behaviour is this design's reading.
//
// Payload DWORDs leave on dw/dw_valid/dw_ready, one per clock, each tagged
// with dw_ch = address bit CH_BIT (0: image pixels, 1: query vectors; the
// address map is this design's choice). Every 32-bit DWORD carries 4 pixels.
// Any other TLP is consumed and dropped. A two-entry buffer decouples the
// bus: rx_st_ready is high when the buffer is empty, or holds one DWORD that
// leaves in this clock, so a two-DWORD beat is taken every second clock.
// Ready latency 0 is assumed.
module tlp_rx
  import fm_pkg::*;
#(
  parameter int CH_BIT = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_st_valid,
  input  logic [63:0] rx_st_data,
  input  logic        rx_st_sop,
  input  logic        rx_st_eop,
  output logic        rx_st_ready,
  output logic        dw_valid,
  input  logic        dw_ready,
  output logic [31:0] dw,
  output logic        dw_ch
);
  typedef enum logic [1:0] {S_IDLE, S_HDR2, S_DATA} state_t;
  typedef struct packed { logic ch; logic [31:0] dw; } item_t;

  state_t      state;
  logic        is_mwr, ch;
  logic [10:0] rem;
  item_t       buf_q [2];
  logic [1:0]  cnt;

  logic        take, pop;
  logic [1:0]  npush;
  item_t       push0, push1;
  logic [10:0] rem_n;

  assign pop         = dw_valid && dw_ready;
  assign rx_st_ready = (cnt == 2'd0) || (cnt == 2'd1 && dw_ready);
  assign take        = rx_st_valid && rx_st_ready;
  assign dw_valid    = (cnt != 2'd0);
  assign dw          = buf_q[0].dw;
  assign dw_ch       = buf_q[0].ch;

  // payload DWORDs carried by the current beat
  always_comb begin
    npush = 2'd0;
    rem_n = rem;
    push0 = '{ch: ch, dw: rx_st_data[31:0]};
    push1 = '{ch: ch, dw: rx_st_data[63:32]};
    if (take && !rx_st_sop && is_mwr) begin
      if (state == S_HDR2) begin
        push0 = '{ch: rx_st_data[CH_BIT], dw: rx_st_data[63:32]};
        if (rx_st_data[2] && rem != 0) begin npush = 2'd1; rem_n = rem - 11'd1; end
      end else if (state == S_DATA) begin
        if (rem >= 11'd2)      begin npush = 2'd2; rem_n = rem - 11'd2; end
        else if (rem == 11'd1) begin npush = 2'd1; rem_n = '0; end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      is_mwr <= 1'b0;
      ch    <= 1'b0;
      rem   <= '0;
      cnt   <= '0;
    end else begin
      automatic item_t b0 = buf_q[0], b1 = buf_q[1];
      automatic logic [1:0] c = cnt;
      if (pop) begin b0 = b1; c = c - 2'd1; end
      if (npush != 2'd0) begin
        if (c == 2'd0) b0 = push0; else b1 = push0;
        c = c + 2'd1;
      end
      if (npush == 2'd2) begin b1 = push1; c = c + 2'd1; end
      buf_q[0] <= b0;
      buf_q[1] <= b1;
      cnt      <= c;
      rem      <= rem_n;
      if (take) begin
        if (rx_st_sop) begin
          is_mwr <= (rx_st_data[30:29] == 2'b10) && (rx_st_data[28:24] == 5'b00000);
          rem    <= (rx_st_data[9:0] == 10'd0) ? 11'd1024 : {1'b0, rx_st_data[9:0]};
          state  <= rx_st_eop ? S_IDLE : S_HDR2;
        end else begin
          if (state == S_HDR2) ch <= rx_st_data[CH_BIT];
          state <= rx_st_eop ? S_IDLE : S_DATA;
        end
      end
    end
  end

  // the buffer never overflows
  assert property (@(posedge clk) disable iff (!rst_n) !(cnt == 2'd2 && take && !pop));
endmodule
