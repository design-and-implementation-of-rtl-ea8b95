// neighbor_green (NG): green value at a red or blue pixel.
//
// Four find_kr units form the colour differences at the four green
// neighbours (each neighbour's chroma is the mean of the two chroma samples
// beside it, one of them the centre sample). Their mean is added to the
// centre chroma sample (ECI estimate, G = C + mean K), the result is
// saturated to 8 bits and then passed through the edge-directed update.
// The structure and the input naming (G_up with C1,1/C1,2 and so on) follow
// the NG figure of the design; saturation and floor rounding are this
// design's choices. Combinational.
module neighbor_green
  import demosaic_pkg::*;
#(
  parameter int unsigned ALPHA = 75
)(
  input  pix_t g_up,    input pix_t c11, input pix_t c12,
  input  pix_t g_left,  input pix_t c21, input pix_t c22,
  input  pix_t g_right, input pix_t c31, input pix_t c32,
  input  pix_t g_down,  input pix_t c41, input pix_t c42,
  input  pix_t c_center,
  output pix_t g_calc,     // ECI estimate before the update
  output pix_t g_upd       // updated green value
);
  kdiff_t k_up, k_left, k_right, k_down;
  logic signed [11:0] k_sum, g_sum;

  find_kr u_up    (.g(g_up),    .c1(c11), .c2(c12), .k(k_up));
  find_kr u_left  (.g(g_left),  .c1(c21), .c2(c22), .k(k_left));
  find_kr u_right (.g(g_right), .c1(c31), .c2(c32), .k(k_right));
  find_kr u_down  (.g(g_down),  .c1(c41), .c2(c42), .k(k_down));

  always_comb begin
    k_sum  = 12'(k_up) + 12'(k_left) + 12'(k_right) + 12'(k_down);
    g_sum  = $signed({4'b0000, c_center}) + (k_sum >>> 2);
    g_calc = sat8(g_sum);
  end

  update_green #(.ALPHA(ALPHA)) u_upd (
    .g_calc(g_calc), .g_up(g_up), .g_left(g_left), .g_right(g_right),
    .g_down(g_down), .g_upd(g_upd)
  );
endmodule
