// edge_detect: the ECI+OP edge detector for one pixel (the Average,
// Subtractor and Edge Detection boxes of the C-update figure of the design).
//
// I_H = (G_left + G_right) / 2 and I_V = (G_up + G_down) / 2 are the
// horizontal and vertical interpolators. An edge is reported when
// D = |I_H - I_V| is greater than the threshold ALPHA. Its direction is
// horizontal when d_H = |G_center - I_H| is smaller than d_V = |G_center - I_V|,
// vertical otherwise (ties go to vertical, this design's choice).
// Combinational.
module edge_detect
  import demosaic_pkg::*;
#(
  parameter int unsigned ALPHA = 75   // edge threshold, set by the camera maker
)(
  input  pix_t g_left,
  input  pix_t g_right,
  input  pix_t g_up,
  input  pix_t g_down,
  input  pix_t g_center,
  output pix_t i_h,
  output pix_t i_v,
  output logic is_edge,
  output logic horiz
);
  logic [8:0] sum_h, sum_v;
  logic [7:0] d, d_h, d_v;

  function automatic logic [7:0] absdiff(input pix_t u, input pix_t v);
    return (u > v) ? u - v : v - u;
  endfunction

  always_comb begin
    sum_h = {1'b0, g_left} + {1'b0, g_right};
    sum_v = {1'b0, g_up}   + {1'b0, g_down};
    i_h   = sum_h[8:1];
    i_v   = sum_v[8:1];
    d     = absdiff(i_h, i_v);
    d_h   = absdiff(g_center, i_h);
    d_v   = absdiff(g_center, i_v);
    is_edge  = 32'(d) > ALPHA;
    horiz = d_h < d_v;
  end
endmodule
