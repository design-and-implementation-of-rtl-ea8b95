// output_select: output data synchronisation and the RFinal/GFinal/BFinal
// multiplexers.
//
// One pixel of the SW row leaves per clock, left to right. For column k it
// combines the row's line-memory word for column k (registered here from
// mid_word, which carries it one clock early), the original Bayer sample
// (pix, from the input buffer) and the SW result:
//   green pixel (order 0): R and B from the word {B,R}, G = the sample;
//   red/blue pixel (order 1): G from the word {0,G}, the pixel's own colour
//   = the sample, the other chroma = the SW result.
// The three results are registered, together with the column's tag, so
// r/g/b, valid and eol change one clock after the column reaches this stage.
module output_select
  import demosaic_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] order_info,
  input  tag_t       tag,        // column at this stage (row = band top + 1)
  input  word_t      mid_word,   // memory word of this column, one clock early
  input  pix_t       pix,        // original Bayer sample of this column
  input  pix_t       sw_c,       // SW chroma for this column (red/blue pixels)
  output pix_t       r,
  output pix_t       g,
  output pix_t       b,
  output logic       valid,
  output logic       eol
);
  word_t word_q;
  logic  rp, order, red_row;
  pix_t  r_fin, g_fin, b_fin;

  always_ff @(posedge clk) word_q <= mid_word;

  always_comb begin
    rp      = ~tag.rpar;                       // SW row is the band's second row
    order   = ~is_green(order_info, rp, tag.col[0]);
    red_row = row_is_red(order_info, rp);
    if (!order) begin
      r_fin = word_q[7:0];
      g_fin = pix;
      b_fin = word_q[15:8];
    end else begin
      g_fin = word_q[7:0];
      r_fin = red_row ? pix  : sw_c;
      b_fin = red_row ? sw_c : pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; g <= '0; b <= '0; valid <= 1'b0; eol <= 1'b0;
    end else begin
      r <= r_fin; g <= g_fin; b <= b_fin;
      valid <= tag.valid;
      eol   <= tag.valid & tag.eol;
    end
  end
endmodule
