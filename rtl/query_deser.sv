// query_deser: assembles one query feature vector from 32-bit words.
//
// FEAT_BITS/DW_BITS words (16 for 512-bit vectors) arrive on a valid/ready
// handshake, the first word holding bits [31:0]. When the last word is in,
// q_valid rises and the vector is held until q_ready; the next vector's
// words are accepted only after that, so at one word per clock a vector is
// delivered every 16 clocks, matching a matcher that needs 16 clocks per
// query.
module query_deser
  import fm_pkg::*;
#(
  parameter int FEAT_BITS = 512,
  parameter int DW_BITS   = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 dw_valid,
  output logic                 dw_ready,
  input  logic [DW_BITS-1:0]   dw,
  output logic                 q_valid,
  input  logic                 q_ready,
  output logic [FEAT_BITS-1:0] q
);
  localparam int N  = FEAT_BITS / DW_BITS;
  localparam int CW = $clog2(N);

  logic [CW-1:0] cnt;

  assign dw_ready = !q_valid || q_ready;

  always_ff @(posedge clk) begin
    if (dw_valid && dw_ready) q[cnt*DW_BITS +: DW_BITS] <= dw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      q_valid <= 1'b0;
    end else begin
      if (q_valid && q_ready) q_valid <= 1'b0;
      if (dw_valid && dw_ready) begin
        cnt <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
        if (cnt == CW'(N - 1)) q_valid <= 1'b1;
      end
    end
  end
endmodule
