// small_window (SW): the second interpolation pass, red at blue pixels and
// blue at red pixels, on a 3x3 window whose centre is red or blue.
//
// Call the missing chroma C; in the 3x3 window it sits on the four corners.
// For each green neighbour a find_kr unit forms K = G - mean(two corners
// beside it); the ECI estimate is C = G_c - mean(four K), where G_c is the
// green value the BW pass computed for the centre. Update_C_Value then runs
// the is_edge detector with the original neighbour greens and G_c: on a
// horizontal is_edge C becomes the mean of C_left and C_right, on a vertical
// is_edge the mean of C_up and C_down, these four being the C values the BW pass
// computed at the green neighbours. The input wiring follows the SW figure
// of the design; saturation and rounding are this design's choices.
//
// p[row][col] is the original Bayer 3x3 window in image orientation.
// Combinational; its inputs are held by ff_block2 for two clocks.
module small_window
  import demosaic_pkg::*;
#(
  parameter int unsigned ALPHA = 75
)(
  input  win3_t p,
  input  pix_t  g_c,      // BW green at the centre
  input  pix_t  c_up,     // BW chroma C at the four green neighbours
  input  pix_t  c_left,
  input  pix_t  c_right,
  input  pix_t  c_down,
  output pix_t  c_calc,   // ECI estimate before the update
  output pix_t  c_upd     // final C at the centre
);
  kdiff_t k_up, k_left, k_right, k_down;
  logic signed [11:0] k_sum, c_sum;
  pix_t i_h, i_v;
  logic is_edge, horiz;
  logic [8:0] h_sum, v_sum;

  find_kr u_up    (.g(p[0][1]), .c1(p[0][2]), .c2(p[0][0]), .k(k_up));
  find_kr u_left  (.g(p[1][0]), .c1(p[0][0]), .c2(p[2][0]), .k(k_left));
  find_kr u_right (.g(p[1][2]), .c1(p[0][2]), .c2(p[2][2]), .k(k_right));
  find_kr u_down  (.g(p[2][1]), .c1(p[2][2]), .c2(p[2][0]), .k(k_down));

  edge_detect #(.ALPHA(ALPHA)) u_det (
    .g_left(p[1][0]), .g_right(p[1][2]), .g_up(p[0][1]), .g_down(p[2][1]),
    .g_center(g_c), .i_h(i_h), .i_v(i_v), .is_edge(is_edge), .horiz(horiz)
  );

  always_comb begin
    k_sum  = 12'(k_up) + 12'(k_left) + 12'(k_right) + 12'(k_down);
    c_sum  = $signed({4'b0000, g_c}) - (k_sum >>> 2);
    c_calc = sat8(c_sum);
    h_sum  = {1'b0, c_left} + {1'b0, c_right};
    v_sum  = {1'b0, c_up}   + {1'b0, c_down};
    c_upd  = !is_edge ? c_calc : (horiz ? h_sum[8:1] : v_sum[8:1]);
  end
endmodule
