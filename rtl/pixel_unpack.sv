// pixel_unpack: turns 32-bit payload words into a pixel stream.
//
// Each word carries 4 pixels, byte 0 first (the byte order is this design's
// choice). The block holds one word and emits one pixel per clock on
// pix_valid/pix; the next word is taken in the clock that emits the last
// pixel of the current one, so a steady word stream yields one pixel every
// clock with a word every 4 clocks. The pixel side has no back-pressure.
module pixel_unpack
  import fm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dw_valid,
  output logic        dw_ready,
  input  logic [31:0] dw,
  output logic        pix_valid,
  output pixel_t      pix
);
  logic [31:0] word;
  logic [1:0]  idx;
  logic        full;

  assign dw_ready  = !full || (idx == 2'd3);
  assign pix_valid = full;
  assign pix       = word[8*idx +: 8];

  always_ff @(posedge clk) begin
    if (dw_valid && dw_ready) word <= dw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      idx  <= '0;
    end else if (dw_valid && dw_ready) begin
      full <= 1'b1;
      idx  <= '0;
    end else if (full) begin
      idx <= idx + 2'd1;
      if (idx == 2'd3) full <= 1'b0;
    end
  end
endmodule
