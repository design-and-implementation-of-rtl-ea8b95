// tb_ref_pkg: reference model of ECI+OP demosaicking for the testbenches.
//
// It works on a whole Bayer image held in `img` (rows 0..h-1, columns
// 0..w-1) and evaluates the equations pixel by pixel with plain integer
// arithmetic, without any of the core's windows, memories or timing:
//   ng_green(y,x)   green at a red/blue pixel: ECI estimate
//                   C + floor(sum of four K / 4), K = G - floor((C1+C2)/2),
//                   saturated, then the edge-directed update;
//   bw_rgb(y,x)     R and B at a green pixel from the neighbour greens;
//   sw_chroma(y,x)  the missing chroma at a red/blue pixel;
//   ref_rgb(y,x)    the expected output pixel.
// The edge threshold is `alpha`; the Bayer phase is `oinfo`. Counters record
// how often each path of the algorithm was taken.
package tb_ref_pkg;

  localparam int MAXH = 1000;
  localparam int MAXW = 1024;

  int img [MAXH][MAXW];
  int h, w;
  int alpha = 75;
  int oinfo = 0;

  // path counters
  int n_ng_smooth, n_ng_edge;
  int n_bw_smooth, n_bw_hor, n_bw_ver;
  int n_sw_smooth, n_sw_hor, n_sw_ver;

  function automatic int fl2(int v); return (v >= 0) ? v / 2 : -((-v + 1) / 2); endfunction
  function automatic int fl4(int v); return (v >= 0) ? v / 4 : -((-v + 3) / 4); endfunction
  function automatic int sat(int v); return (v < 0) ? 0 : (v > 255) ? 255 : v; endfunction
  function automatic int iabs(int v); return (v < 0) ? -v : v; endfunction

  function automatic bit green(int y, int x);
    bit g00 = oinfo[1];                 // row 0 starts with green
    return (((y + x) % 2) == 0) == g00;
  endfunction

  // non-green pixels of row y are red?
  function automatic bit red_row(int y);
    return ((y % 2) == 0) == (oinfo[0] == 0);
  endfunction

  // Edge decision: 0 = smooth, 1 = horizontal, 2 = vertical.
  function automatic int decide(int gl, int gr, int gu, int gd, int gc);
    int ih = (gl + gr) / 2;
    int iv = (gu + gd) / 2;
    if (iabs(ih - iv) <= alpha) return 0;
    return (iabs(gc - ih) < iabs(gc - iv)) ? 1 : 2;
  endfunction

  function automatic int ng_green(int y, int x);
    int c = img[y][x];
    int ku = img[y-1][x] - fl2(img[y-2][x] + c);
    int kd = img[y+1][x] - fl2(img[y+2][x] + c);
    int kl = img[y][x-1] - fl2(img[y][x-2] + c);
    int kr = img[y][x+1] - fl2(img[y][x+2] + c);
    int gc = sat(c + fl4(ku + kd + kl + kr));
    int dir = decide(img[y][x-1], img[y][x+1], img[y-1][x], img[y+1][x], gc);
    if (dir == 0) begin n_ng_smooth++; return gc; end
    n_ng_edge++;
    return (dir == 1) ? (img[y][x-1] + img[y][x+1]) / 2 : (img[y-1][x] + img[y+1][x]) / 2;
  endfunction

  function automatic int g_at(int y, int x);
    return green(y, x) ? img[y][x] : ng_green(y, x);
  endfunction

  // R and B at green pixel (y,x)
  function automatic void bw_rgb(int y, int x, output int r, output int b);
    int gl = ng_green(y, x-1), gr = ng_green(y, x+1);
    int gu = ng_green(y-1, x), gd = ng_green(y+1, x);
    int g  = img[y][x];
    int xe = sat(g - fl2((gl - img[y][x-1]) + (gr - img[y][x+1])));
    int ye = sat(g - fl2((gu - img[y-1][x]) + (gd - img[y+1][x])));
    int dir = decide(gl, gr, gu, gd, g);
    int xv = xe, yv = ye;
    if (dir == 1) begin xv = (img[y][x-1] + img[y][x+1]) / 2; n_bw_hor++; end
    else if (dir == 2) begin yv = (img[y-1][x] + img[y+1][x]) / 2; n_bw_ver++; end
    else n_bw_smooth++;
    if (red_row(y)) begin r = xv; b = yv; end else begin r = yv; b = xv; end
  endfunction

  // chroma "want_blue ? B : R" that the BW pass gives at green pixel (y,x)
  function automatic int bw_c(int y, int x, bit want_blue);
    int r, b;
    bw_rgb(y, x, r, b);
    return want_blue ? b : r;
  endfunction

  // missing chroma at red/blue pixel (y,x)
  function automatic int sw_chroma(int y, int x);
    bit wb = red_row(y);
    int gc = ng_green(y, x);
    int ku = img[y-1][x] - fl2(img[y-1][x-1] + img[y-1][x+1]);
    int kd = img[y+1][x] - fl2(img[y+1][x-1] + img[y+1][x+1]);
    int kl = img[y][x-1] - fl2(img[y-1][x-1] + img[y+1][x-1]);
    int kr = img[y][x+1] - fl2(img[y-1][x+1] + img[y+1][x+1]);
    int cc = sat(gc - fl4(ku + kd + kl + kr));
    int dir = decide(img[y][x-1], img[y][x+1], img[y-1][x], img[y+1][x], gc);
    if (dir == 0) begin n_sw_smooth++; return cc; end
    if (dir == 1) begin n_sw_hor++; return (bw_c(y, x-1, wb) + bw_c(y, x+1, wb)) / 2; end
    n_sw_ver++;
    return (bw_c(y-1, x, wb) + bw_c(y+1, x, wb)) / 2;
  endfunction

  function automatic void ref_rgb(int y, int x, output int r, output int g, output int b);
    if (green(y, x)) begin
      g = img[y][x];
      bw_rgb(y, x, r, b);
    end else begin
      g = ng_green(y, x);
      if (red_row(y)) begin r = img[y][x]; b = sw_chroma(y, x); end
      else            begin b = img[y][x]; r = sw_chroma(y, x); end
    end
  endfunction

  // Test image: bands of one-pixel horizontal stripes, one-pixel vertical
  // stripes, a smooth ramp and noise, repeating every 32 columns.
  function automatic void make_image(int hh, int ww, int seed);
    int s = seed;
    h = hh; w = ww;
    for (int y = 0; y < hh; y++)
      for (int x = 0; x < ww; x++) begin
        int m = (x + seed) % 32;
        s = s * 1103515245 + 12345;
        if (m < 8)       img[y][x] = (y % 2 == 0) ? 30 + (x % 3) : 220 - (x % 5);
        else if (m < 16) img[y][x] = (x % 2 == 0) ? 40 + (y % 4) : 230 - (y % 3);
        else if (m < 24) img[y][x] = 60 + (3 * x) % 120 + (2 * y) % 70;
        else             img[y][x] = (s >>> 16) & 255;
      end
  endfunction

endpackage
