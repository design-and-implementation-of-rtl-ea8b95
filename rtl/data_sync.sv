// data_sync: gathers the five line-memory values the SW pass needs and
// splits the 16-bit words into 8-bit colours.
//
// For an SW centre at column k of row m (red or blue) the values are:
// a = word k of row m-1, b = word k of row m (its BW green), c = word k of
// row m+1, x and y = words k-1 and k+1 of row m (all three green pixels, so
// these words carry B and R). The RAMs are read one column per clock, so
// they arrive in two steps:
//   order = 0 ("0G-write state"): the RAM outputs are at column k; MUX1, MUX3
//     and MUX2 pick a, b and c from the RAMs of rows m-1, m and m+1 and the
//     up/center/down registers load them;
//   order = 1 ("BR-write state"), the next clock: the RAM of row m outputs y
//     and the same output delayed by two clocks is x; MUX3 picks the pair
//     z = {x, y} and the left/right registers load it.
// Which RAM holds which row follows from rsel, the RAM being written:
// rows m-1, m, m+1 are in RAMs rsel+1, rsel+2, rsel+3 (mod 4).
//
// The design this follows uses transparent latches enabled by order and
// not order; here they are edge-triggered registers with enables (this
// design's choice), so all five values are valid together on the clock after
// order = 1. want_blue selects the B byte (centre red) or R byte (centre
// blue) of the chroma words. mid_word is the row-m word delayed by two
// clocks, used by the output selection.
module data_sync
  import demosaic_pkg::*;
(
  input  logic  clk,
  input  word_t doa [4],     // port A outputs of the four RAMs
  input  logic [1:0] rsel,   // RAM written in the band these words belong to
  input  logic  order,       // 0: a/b/c on doa now, 1: y on doa now
  input  logic  want_blue,   // SW centre is red, so the missing chroma is blue
  output pix_t  g_c,
  output pix_t  c_up,
  output pix_t  c_left,
  output pix_t  c_right,
  output pix_t  c_down,
  output word_t mid_word
);
  word_t d1 [4], d2 [4];               // two-clock delay of each RAM output
  logic [31:0] z [4];
  word_t out1, out3, out2up, out2down;
  word_t up_q, center_q, down_q, left_q, right_q;

  always_ff @(posedge clk) begin
    d1 <= doa;
    d2 <= d1;
  end

  always_comb begin
    for (int i = 0; i < 4; i++) z[i] = {d2[i], doa[i]};   // {x_i, y_i}
    out1     = doa[2'(rsel + 2'd1)];
    out3     = doa[2'(rsel + 2'd3)];
    {out2down, out2up} = z[2'(rsel + 2'd2)];
    mid_word = out2down;
  end

  always_ff @(posedge clk) begin
    if (!order) begin
      up_q     <= out1;
      center_q <= out2up;
      down_q   <= out3;
    end else begin
      left_q   <= out2down;
      right_q  <= out2up;
    end
  end

  function automatic pix_t pick(input word_t w, input logic blue);
    return blue ? w[15:8] : w[7:0];
  endfunction

  always_comb begin
    g_c     = center_q[7:0];
    c_up    = pick(up_q, want_blue);
    c_down  = pick(down_q, want_blue);
    c_left  = pick(left_q, want_blue);
    c_right = pick(right_q, want_blue);
  end
endmodule
