// line_memory: four rotating line RAMs holding the BW results of the BW
// operating row and of the three rows above it.
//
// Each RAM stores one image row, one 16-bit word per column: {B,R} for a
// green pixel and {8'h00,G} ("0G") for a red or blue pixel. During a band the
// RAM chosen by wsel (the RAM Select counter, decoded into one write enable)
// is written through port B, while all four RAMs are read on port A at the
// same column address; the three not being written hold the rows the SW
// pass needs. When the band changes the oldest row's RAM becomes the one
// written, so the rows rotate through the RAMs.
//
// The Select Data multiplexer writes the 0G word on clocks where the pixel at
// the address is red or blue and the BR word where it is green (sel_br). As
// in the design this follows, the BR word reaches the multiplexer through a
// one-clock delay, since the BW pass produces it together with the 0G word
// of the pixel to its left, which is written first.
//
// Timing: a word written at column a can be read back from the next clock
// on; dout[i] is the word at the address of the previous clock.
module line_memory
  import demosaic_pkg::*;
#(
  parameter int unsigned DEPTH = 1024   // words per RAM = maximum image width
)(
  input  logic              clk,
  input  logic              we,       // write the selected RAM this clock
  input  logic [1:0]        wsel,     // RAM Select
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  pix_t              g_left,   // BW green of the left neighbour
  input  pix_t              r_center, // BW red of the green centre
  input  pix_t              b_center, // BW blue of the green centre
  input  logic              sel_br,   // 1: write {B,R}, 0: write {0,G}
  output word_t             dout [4]
);
  word_t br_d, wdata;
  logic [3:0] we_dec;

  always_ff @(posedge clk) br_d <= {b_center, r_center};

  always_comb begin
    wdata  = sel_br ? br_d : {8'h00, g_left};
    we_dec = we ? (4'b0001 << wsel) : 4'b0000;
  end

  for (genvar i = 0; i < 4; i++) begin : g_ram
    line_ram #(.DEPTH(DEPTH)) u_ram (
      .clk(clk), .addr_a(addr), .dout_a(dout[i]),
      .we_b(we_dec[i]), .addr_b(addr), .din_b(wdata)
    );
  end
endmodule
