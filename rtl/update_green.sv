// update_green: is_edge-directed update of a green value estimated at a red or
// blue pixel (the "Update Green" box of the NG block).
//
// The ECI estimate g_calc is kept in smooth regions. On an is_edge the green
// value becomes the directional interpolator: I_H for a horizontal is_edge,
// I_V for a vertical one. Combinational.
module update_green
  import demosaic_pkg::*;
#(
  parameter int unsigned ALPHA = 75
)(
  input  pix_t g_calc,
  input  pix_t g_up,
  input  pix_t g_left,
  input  pix_t g_right,
  input  pix_t g_down,
  output pix_t g_upd
);
  pix_t i_h, i_v;
  logic is_edge, horiz;

  edge_detect #(.ALPHA(ALPHA)) u_det (
    .g_left(g_left), .g_right(g_right), .g_up(g_up), .g_down(g_down),
    .g_center(g_calc), .i_h(i_h), .i_v(i_v), .is_edge(is_edge), .horiz(horiz)
  );

  assign g_upd = !is_edge ? g_calc : (horiz ? i_h : i_v);
endmodule
