// tb_neighbor_green: checks the NG unit against the reference model on
// random red/blue pixels of generated test images (stripes, ramps, noise).
// Both the smooth (ECI) result and the edge-directed update must be hit.
module tb_neighbor_green;
  import demosaic_pkg::*;
  import tb_ref_pkg::*;

  pix_t i [13];
  pix_t g_calc, g_upd;
  int checks = 0, failures = 0;

  neighbor_green dut (
    .g_up(i[0]), .c11(i[1]), .c12(i[2]),
    .g_left(i[3]), .c21(i[4]), .c22(i[5]),
    .g_right(i[6]), .c31(i[7]), .c32(i[8]),
    .g_down(i[9]), .c41(i[10]), .c42(i[11]),
    .c_center(i[12]), .g_calc(g_calc), .g_upd(g_upd)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, e1;
    for (int s = 0; s < 40; s++) begin
      make_image(20, 64, s * 13 + 1);
      if (s % 2) for (int y = 0; y < 20; y++) for (int x = 0; x < 64; x++) img[y][x] = $urandom_range(0, 255);
      for (int t = 0; t < 100; t++) begin
        automatic int y = $urandom_range(2, 17);
        automatic int x = $urandom_range(2, 61);
        if (green(y, x)) x++;
        i = '{pix_t'(img[y-1][x]), pix_t'(img[y-2][x]), pix_t'(img[y][x]),
              pix_t'(img[y][x-1]), pix_t'(img[y][x-2]), pix_t'(img[y][x]),
              pix_t'(img[y][x+1]), pix_t'(img[y][x+2]), pix_t'(img[y][x]),
              pix_t'(img[y+1][x]), pix_t'(img[y+2][x]), pix_t'(img[y][x]),
              pix_t'(img[y][x])};
        #1;
        e0 = n_ng_edge;
        e1 = ng_green(y, x);
        checks++;
        if (int'(g_upd) != e1) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) got %0d exp %0d edge=%0d", y, x, g_upd, e1, n_ng_edge - e0);
        end
      end
    end
    checks++; if (n_ng_edge == 0 || n_ng_smooth == 0) failures++;
    $display("edges %0d smooth %0d", n_ng_edge, n_ng_smooth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
