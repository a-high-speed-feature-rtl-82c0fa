// shift_ram_window: line-buffer chain and sliding pixel matrix.
//
// LINES line memories of IMG_W pixels are chained like one long shift
// register: on every accepted pixel, memory k returns the pixel it stored
// IMG_W pixels earlier (its tap) and stores the tap of memory k-1 (memory 0
// stores the incoming pixel). Tap k is therefore the pixel (k+1) lines above
// the incoming one. The LINES taps feed the right-hand column of a LINES x
// LINES register matrix that shifts left on every pixel, so after pixel n
// has been accepted, win[r][c] holds stream pixel n - (LINES-r)*IMG_W -
// (LINES-1-c). With the default 11 lines of 2048 8-bit pixels the memories
// hold 180,224 bits.
//
// Interface: in_valid/in_pix, no back-pressure. win_valid pulses for one
// clock after each update of win. The memories are read combinationally at
// the write address (read before write); their contents are not reset.
module shift_ram_window
  import fm_pkg::*;
#(
  parameter int IMG_W = 2048,
  parameter int LINES = 11
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t in_pix,
  output pixel_t win [LINES][LINES],
  output logic   win_valid
);
  localparam int AW = $clog2(IMG_W);

  pixel_t        mem [LINES][IMG_W];
  pixel_t        tap [LINES];
  logic [AW-1:0] ptr;

  always_comb
    for (int k = 0; k < LINES; k++) tap[k] = mem[k][ptr];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem[0][ptr] <= in_pix;
      for (int k = 1; k < LINES; k++) mem[k][ptr] <= tap[k-1];
      for (int r = 0; r < LINES; r++) begin
        for (int c = 0; c < LINES - 1; c++) win[r][c] <= win[r][c+1];
        win[r][LINES-1] <= tap[LINES-1-r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid;
      if (in_valid) ptr <= (ptr == AW'(IMG_W - 1)) ? '0 : ptr + 1'b1;
    end
  end
endmodule
