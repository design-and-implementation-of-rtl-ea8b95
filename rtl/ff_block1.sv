// ff_block1: hold register between the input buffer and the Big Window.
//
// The BW result is only meaningful when the buffer centre is green, which
// happens every other clock (the phase swaps from one band to the next). The
// register loads the window on those clocks only, so the BW logic sees each
// valid window for two clocks and does not toggle on the invalid ones. The
// design this follows clocks these registers from a half-speed clock whose
// phase is swapped at each end of line; here the same effect comes from a
// clock enable in the single clock domain (this design's choice). The
// red-row flag of the window is held with it.
module ff_block1
  import demosaic_pkg::*;
(
  input  logic  clk,
  input  logic  en,          // buffer centre is green
  input  win7_t win_in,
  input  logic  red_row_in,  // horizontal neighbours of the centre are red
  output win7_t win_out,
  output logic  red_row_out
);
  always_ff @(posedge clk) begin
    if (en) begin
      win_out     <= win_in;
      red_row_out <= red_row_in;
    end
  end
endmodule
