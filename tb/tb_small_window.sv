// tb_small_window: checks the SW block against the reference model. The
// five memory values are the reference model's BW results (green at the
// centre, chroma at the four green neighbours), the 3x3 window is the
// original Bayer data; random red/blue centres in all four Bayer phases.
module tb_small_window;
  import demosaic_pkg::*;
  import tb_ref_pkg::*;

  win3_t p;
  pix_t gc, cu, cl, cr, cd, c_calc, c_upd;
  int checks = 0, failures = 0;

  small_window dut (.p(p), .g_c(gc), .c_up(cu), .c_left(cl), .c_right(cr), .c_down(cd),
                    .c_calc(c_calc), .c_upd(c_upd));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 40; s++) begin
      oinfo = s % 4;
      make_image(20, 64, s * 11 + 4);
      if (s % 3 == 2) for (int y = 0; y < 20; y++) for (int x = 0; x < 64; x++) img[y][x] = $urandom_range(0, 255);
      for (int t = 0; t < 100; t++) begin
        automatic int y = $urandom_range(4, 15);
        automatic int x = $urandom_range(4, 58);
        automatic bit wb;
        automatic int e;
        if (green(y, x)) x++;
        wb = red_row(y);
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) p[r][c] = pix_t'(img[y-1+r][x-1+c]);
        gc = pix_t'(ng_green(y, x));
        cu = pix_t'(bw_c(y-1, x, wb)); cd = pix_t'(bw_c(y+1, x, wb));
        cl = pix_t'(bw_c(y, x-1, wb)); cr = pix_t'(bw_c(y, x+1, wb));
        #1;
        e = sw_chroma(y, x);
        checks++;
        if (int'(c_upd) != e) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) got %0d exp %0d", y, x, c_upd, e);
        end
      end
    end
    $display("SW paths: smooth %0d hor %0d ver %0d", n_sw_smooth, n_sw_hor, n_sw_ver);
    checks++; if (n_sw_smooth == 0 || n_sw_hor == 0 || n_sw_ver == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
