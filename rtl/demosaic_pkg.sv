// demosaic_pkg: types, constants and small arithmetic helpers shared by the
// ECI+OP demosaicking core.
//
// Pixels are 8-bit unsigned samples. Intermediate colour differences
// (K = G - C) are signed 10-bit, sums of four of them signed 12-bit. Every
// estimated colour is saturated to 0..255 as soon as it is formed (the
// saturation points are this design's choice; the arithmetic itself follows
// the ECI and ECI+OP equations). Halving and quartering are arithmetic right
// shifts, i.e. rounding towards minus infinity.
//
// Bayer phase: a 2-bit orderInfo code gives the first two pixels of the first
// image row: 00 = RG, 01 = BG, 10 = GR, 11 = GB. Row parity then alternates.
package demosaic_pkg;

  localparam int unsigned PIX_W  = 8;     // colour sample width
  localparam int unsigned ADDR_W = 10;    // line RAM address width (1024 words)
  localparam int unsigned WORD_W = 16;    // line RAM word width

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic signed [9:0] kdiff_t;     // colour difference, -255..255
  typedef logic [WORD_W-1:0] word_t;      // {B,R} at G pixels, {8'h00,G} at R/B pixels

  // 7x7 Bayer window: win[row][col], row 0 = top, col 0 = leftmost image column.
  typedef pix_t win7_t [7][7];
  // 3x3 window, same orientation.
  typedef pix_t win3_t [3][3];

  // Per-column bookkeeping that travels with the data through the pipeline.
  typedef struct packed {
    logic              valid;   // column belongs to the input stream since reset
    logic              eol;     // last column of a band
    logic [ADDR_W-1:0] col;     // image column
    logic [1:0]        sel;     // index of the line RAM written during this band
    logic              rpar;    // parity of the band's first image row
  } tag_t;

  // Saturate a signed value to the 8-bit pixel range.
  function automatic pix_t sat8(input logic signed [11:0] v);
    if (v < 0)        return '0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  // True when image pixel (row parity rp, column parity cp) is green.
  function automatic logic is_green(input logic [1:0] order_info, input logic rp, input logic cp);
    // orderInfo[1] = 1 means row 0 starts with G.
    return (rp ^ cp) == ~order_info[1];
  endfunction

  // True when the non-green pixels of a row with parity rp are red.
  function automatic logic row_is_red(input logic [1:0] order_info, input logic rp);
    // orderInfo[0] = 0: row 0 carries R (RG or GR); 1: row 0 carries B.
    return rp == order_info[0];
  endfunction

endpackage
