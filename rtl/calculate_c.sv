// calculate_c: one direction of the Big Window (the calculateC figure).
//
// Two NG units compute the updated green values at the two chroma neighbours
// of the green centre pixel along one axis (left/right when VERTICAL = 0,
// up/down when VERTICAL = 1). With those greens the ECI estimate of that
// chroma at the centre is C = G_center - ((G_a - C_a) + (G_b - C_b)) / 2,
// saturated to 8 bits. The edge-directed update of C needs both axes and is
// done one level up, in big_window.
//
// Input: the 7x7 Bayer window, win[row][col] in image orientation with the
// green centre at [3][3]; only the diamond |dr|+|dc| <= 3 is used.
// Combinational.
module calculate_c
  import demosaic_pkg::*;
#(
  parameter int unsigned ALPHA    = 75,
  parameter bit          VERTICAL = 1'b0
)(
  input  win7_t win,
  output pix_t  g_a,      // updated G at the left (or upper) neighbour
  output pix_t  g_b,      // updated G at the right (or lower) neighbour
  output pix_t  c_calc    // ECI chroma at the centre, before the update
);
  // Row/column step from the centre to neighbour b (neighbour a is the mirror).
  localparam int DR = VERTICAL ? 1 : 0;
  localparam int DC = VERTICAL ? 0 : 1;

  // NG unit n sits at (3+s*DR, 3+s*DC), s = -1 for n = 0 (a) and +1 for n = 1 (b).
  pix_t g_calc_unused [2];
  pix_t g_ng [2];

  for (genvar n = 0; n < 2; n++) begin : g_ng_unit
    localparam int R0 = 3 + (2*n - 1) * DR;
    localparam int C0 = 3 + (2*n - 1) * DC;
    neighbor_green #(.ALPHA(ALPHA)) u_ng (
      .g_up   (win[R0-1][C0]), .c11(win[R0-2][C0]), .c12(win[R0][C0]),
      .g_left (win[R0][C0-1]), .c21(win[R0][C0-2]), .c22(win[R0][C0]),
      .g_right(win[R0][C0+1]), .c31(win[R0][C0+2]), .c32(win[R0][C0]),
      .g_down (win[R0+1][C0]), .c41(win[R0+2][C0]), .c42(win[R0][C0]),
      .c_center(win[R0][C0]),
      .g_calc(g_calc_unused[n]),
      .g_upd (g_ng[n])
    );
  end

  kdiff_t k_a, k_b;
  logic signed [11:0] c_sum;

  find_kr u_ka (.g(g_ng[0]), .c1(win[3-DR][3-DC]), .c2(win[3-DR][3-DC]), .k(k_a));
  find_kr u_kb (.g(g_ng[1]), .c1(win[3+DR][3+DC]), .c2(win[3+DR][3+DC]), .k(k_b));

  always_comb begin
    c_sum  = $signed({4'b0000, win[3][3]}) - ((12'(k_a) + 12'(k_b)) >>> 1);
    c_calc = sat8(c_sum);
  end

  assign g_a = g_ng[0];
  assign g_b = g_ng[1];
endmodule
