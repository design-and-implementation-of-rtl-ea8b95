// big_window (BW): the first interpolation pass, run on a 7x7 diamond whose
// centre pixel is green.
//
// Two calculate_c units (horizontal and vertical) give the updated green
// values at the four chroma neighbours of the centre and the ECI estimates
// X_eci (the chroma found left and right of the centre) and Y_eci (the chroma
// found above and below). The ECI+OP update then runs the is_edge detector on
// the centre: I_H and I_V use the four neighbour greens just computed and the
// centre's own green sample. On a horizontal is_edge X becomes the mean of the
// two horizontal X samples and Y keeps its ECI value; on a vertical is_edge Y
// becomes the mean of the vertical Y samples and X keeps its ECI value.
//
// Outputs: the four neighbour greens (only g_left is stored by the core, the
// others are recomputed when the window moves on) and R and B at the centre.
// hor_is_red tells whether the horizontal neighbours are red (a red row).
// Combinational; the window is held by ff_block1 for two clocks.
module big_window
  import demosaic_pkg::*;
#(
  parameter int unsigned ALPHA = 75
)(
  input  win7_t win,
  input  logic  hor_is_red,
  output pix_t  g_left,
  output pix_t  g_right,
  output pix_t  g_up,
  output pix_t  g_down,
  output pix_t  r_center,
  output pix_t  b_center
);
  pix_t x_eci, y_eci, x_upd, y_upd, i_h, i_v;
  logic is_edge, horiz;
  logic [8:0] x_sum, y_sum;

  calculate_c #(.ALPHA(ALPHA), .VERTICAL(1'b0)) u_hor (
    .win(win), .g_a(g_left), .g_b(g_right), .c_calc(x_eci)
  );
  calculate_c #(.ALPHA(ALPHA), .VERTICAL(1'b1)) u_ver (
    .win(win), .g_a(g_up), .g_b(g_down), .c_calc(y_eci)
  );

  edge_detect #(.ALPHA(ALPHA)) u_det (
    .g_left(g_left), .g_right(g_right), .g_up(g_up), .g_down(g_down),
    .g_center(win[3][3]), .i_h(i_h), .i_v(i_v), .is_edge(is_edge), .horiz(horiz)
  );

  always_comb begin
    x_sum = {1'b0, win[3][2]} + {1'b0, win[3][4]};
    y_sum = {1'b0, win[2][3]} + {1'b0, win[4][3]};
    x_upd = (is_edge &&  horiz) ? x_sum[8:1] : x_eci;
    y_upd = (is_edge && !horiz) ? y_sum[8:1] : y_eci;
    r_center = hor_is_red ? x_upd : y_upd;
    b_center = hor_is_red ? y_upd : x_upd;
  end
endmodule
