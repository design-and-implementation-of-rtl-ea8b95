// ff_block2: hold register in front of the Small Window.
//
// The SW result is only meaningful when its centre is red or blue, every
// other clock. On those clocks the register loads the 3x3 Bayer window and
// the five values fetched from the line memory (centre green and the
// missing chroma at the four green neighbours); they then stay for two
// clocks. As with ff_block1, a clock enable stands in for the half-speed
// clock of the design this follows.
module ff_block2
  import demosaic_pkg::*;
(
  input  logic  clk,
  input  logic  en,          // SW centre is red or blue
  input  win3_t p_in,
  input  pix_t  g_c_in,
  input  pix_t  c_up_in,
  input  pix_t  c_left_in,
  input  pix_t  c_right_in,
  input  pix_t  c_down_in,
  output win3_t p_out,
  output pix_t  g_c_out,
  output pix_t  c_up_out,
  output pix_t  c_left_out,
  output pix_t  c_right_out,
  output pix_t  c_down_out
);
  always_ff @(posedge clk) begin
    if (en) begin
      p_out       <= p_in;
      g_c_out     <= g_c_in;
      c_up_out    <= c_up_in;
      c_left_out  <= c_left_in;
      c_right_out <= c_right_in;
      c_down_out  <= c_down_in;
    end
  end
endmodule
