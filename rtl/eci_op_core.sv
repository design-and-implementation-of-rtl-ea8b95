// eci_op_core: on-line Bayer CFA demosaicking core using ECI (effective colour
// interpolation) with the ECI+OP one-pixel-pattern edge detector.
//
// Input: each clock, one column of a seven-row band of the Bayer image on
// din0..din6 (din0 = top row of the band), columns left to right with no
// gaps, starting on the first clock after reset. eol marks the last column of
// a band; the next band starts on the next clock and is the previous one
// moved down by one row. order_info gives the first two pixels of image row 0:
// 00 RG, 01 BG, 10 GR, 11 GB. A new frame starts with a reset.
// Output: one full-colour pixel (r, g, b) per clock, left to right. During
// band n (image rows n..n+6) the core emits image row n+1; valid is high for
// every emitted pixel and eol_o marks the last pixel of each row.
//
// Data path:
//   input_buffer  7x7 register window (+3x3 extension on rows 0..2)
//   ff_block1     holds the window while its centre (row n+3) is green
//   big_window    G at the four chroma neighbours, R and B at the centre
//   line_memory   four rotating line RAMs, one word per pixel of rows n..n+3
//   data_sync     fetches G and the four neighbour chroma values for SW
//   ff_block2     holds the SW inputs while the SW centre (row n+1) is R/B
//   small_window  the missing chroma at R/B pixels
//   output_select assembles R, G, B per pixel
// mem_ctrl labels every input column with a tag (column, band RAM select,
// row parity) that shifts beside the data, so every stage knows the colour
// and position of the pixel it handles even across band boundaries.
//
// Timing: the pixel of column k of row n+1 appears on r/g/b 11 clocks after
// column k of band n was on din. Image width up to MAX_WIDTH columns; the
// number of rows is unlimited. A pixel is the full ECI+OP result when its
// 9x9 neighbourhood lies inside the image (rows and columns 4 and more from
// every edge); nearer the edges the windows reach outside the band or the
// previous band and the output is not meaningful. Pad the image by four
// pixels on every side (mirroring keeps the Bayer phase if the pad is even)
// to obtain every pixel.
module eci_op_core
  import demosaic_pkg::*;
#(
  parameter int unsigned ALPHA     = 75,    // edge threshold
  parameter int unsigned MAX_WIDTH = 1024   // line RAM depth
)(
  input  logic       clk,
  input  logic       rst_n,
  input  pix_t       din0,
  input  pix_t       din1,
  input  pix_t       din2,
  input  pix_t       din3,
  input  pix_t       din4,
  input  pix_t       din5,
  input  pix_t       din6,
  input  logic       eol,
  input  logic [1:0] order_info,
  output pix_t       r,
  output pix_t       g,
  output pix_t       b,
  output logic       valid,
  output logic       eol_o
);
  // ---------------------------------------------------------------- tags
  tag_t tag_in;
  tag_t tp [10];            // tp[d]: tag of the column in buffer register d

  mem_ctrl u_ctrl (.clk(clk), .rst_n(rst_n), .eol(eol), .tag(tag_in));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < 10; d++) tp[d] <= '0;
    end else begin
      tp[0] <= tag_in;
      for (int d = 1; d < 10; d++) tp[d] <= tp[d-1];
    end
  end

  // Colour of a pixel in the band's row `off` (0..6) at the column of tag t.
  function automatic logic green_at(input tag_t t, input int off);
    return is_green(order_info, t.rpar ^ off[0], t.col[0]);
  endfunction

  // ---------------------------------------------------------------- buffer
  pix_t  din [7];
  win7_t win;
  win3_t p;

  assign din = '{din0, din1, din2, din3, din4, din5, din6};

  input_buffer u_buf (.clk(clk), .din(din), .win(win), .p(p));

  // ---------------------------------------------------------------- BW pass
  win7_t bw_win;
  logic  bw_red_row;
  pix_t  bw_gl, bw_gr, bw_gu, bw_gd, bw_r, bw_b;

  ff_block1 u_ff1 (
    .clk(clk),
    .en(tp[3].valid && green_at(tp[3], 3)),
    .win_in(win),
    .red_row_in(row_is_red(order_info, tp[3].rpar ^ 1'b1)),
    .win_out(bw_win),
    .red_row_out(bw_red_row)
  );

  big_window #(.ALPHA(ALPHA)) u_bw (
    .win(bw_win), .hor_is_red(bw_red_row),
    .g_left(bw_gl), .g_right(bw_gr), .g_up(bw_gu), .g_down(bw_gd),
    .r_center(bw_r), .b_center(bw_b)
  );

  // ---------------------------------------------------------------- memory
  word_t doa [4];

  line_memory #(.DEPTH(MAX_WIDTH)) u_mem (
    .clk(clk),
    .we(tp[5].valid),
    .wsel(tp[5].sel),
    .addr(tp[5].col[$clog2(MAX_WIDTH)-1:0]),
    .g_left(bw_gl), .r_center(bw_r), .b_center(bw_b),
    .sel_br(green_at(tp[5], 3)),
    .dout(doa)
  );

  // ---------------------------------------------------------------- SW pass
  pix_t  ds_gc, ds_cu, ds_cl, ds_cr, ds_cd;
  word_t mid_word;

  data_sync u_sync (
    .clk(clk), .doa(doa),
    .rsel(tp[6].sel),
    .order(green_at(tp[6], 1)),
    .want_blue(row_is_red(order_info, tp[8].rpar ^ 1'b1)),
    .g_c(ds_gc), .c_up(ds_cu), .c_left(ds_cl), .c_right(ds_cr), .c_down(ds_cd),
    .mid_word(mid_word)
  );

  win3_t sw_p;
  pix_t  sw_gc, sw_cu, sw_cl, sw_cr, sw_cd, sw_calc, sw_c;

  ff_block2 u_ff2 (
    .clk(clk),
    .en(tp[8].valid && !green_at(tp[8], 1)),
    .p_in(p), .g_c_in(ds_gc),
    .c_up_in(ds_cu), .c_left_in(ds_cl), .c_right_in(ds_cr), .c_down_in(ds_cd),
    .p_out(sw_p), .g_c_out(sw_gc),
    .c_up_out(sw_cu), .c_left_out(sw_cl), .c_right_out(sw_cr), .c_down_out(sw_cd)
  );

  small_window #(.ALPHA(ALPHA)) u_sw (
    .p(sw_p), .g_c(sw_gc),
    .c_up(sw_cu), .c_left(sw_cl), .c_right(sw_cr), .c_down(sw_cd),
    .c_calc(sw_calc), .c_upd(sw_c)
  );

  // ---------------------------------------------------------------- output
  output_select u_out (
    .clk(clk), .rst_n(rst_n), .order_info(order_info),
    .tag(tp[9]), .mid_word(mid_word), .pix(p[1][0]), .sw_c(sw_c),
    .r(r), .g(g), .b(b), .valid(valid), .eol(eol_o)
  );
endmodule
