// tb_big_window: checks the BW block (neighbour greens and the updated R and
// B at the green centre) against the reference model on random green
// centres of test images in all four Bayer phases; the smooth path and both
// edge directions of the centre update must each occur.
module tb_big_window;
  import demosaic_pkg::*;
  import tb_ref_pkg::*;

  win7_t win;
  logic  hor_red;
  pix_t  gl, gr, gu, gd, rc, bc;
  int checks = 0, failures = 0;

  big_window dut (.win(win), .hor_is_red(hor_red), .g_left(gl), .g_right(gr),
                  .g_up(gu), .g_down(gd), .r_center(rc), .b_center(bc));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string n, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s got %0d exp %0d", n, got, exp); end
  endtask

  initial begin
    for (int s = 0; s < 40; s++) begin
      oinfo = s % 4;
      make_image(20, 64, s * 5 + 3);
      if (s % 3 == 2) for (int y = 0; y < 20; y++) for (int x = 0; x < 64; x++) img[y][x] = $urandom_range(0, 255);
      for (int t = 0; t < 100; t++) begin
        automatic int y = $urandom_range(3, 16);
        automatic int x = $urandom_range(3, 59);
        automatic int er, eb;
        if (!green(y, x)) x++;
        for (int r = 0; r < 7; r++) for (int c = 0; c < 7; c++) win[r][c] = pix_t'(img[y-3+r][x-3+c]);
        hor_red = red_row(y);
        #1;
        bw_rgb(y, x, er, eb);
        chk("R", rc, er); chk("B", bc, eb);
        chk("Gl", gl, ng_green(y, x-1)); chk("Gr", gr, ng_green(y, x+1));
        chk("Gu", gu, ng_green(y-1, x)); chk("Gd", gd, ng_green(y+1, x));
      end
    end
    $display("BW paths: smooth %0d hor %0d ver %0d", n_bw_smooth, n_bw_hor, n_bw_ver);
    chk("smooth seen", int'(n_bw_smooth > 0), 1);
    chk("hor seen", int'(n_bw_hor > 0), 1);
    chk("ver seen", int'(n_bw_ver > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
