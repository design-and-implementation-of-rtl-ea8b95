// tb_calculate_c: checks both orientations of calculateC against the
// reference model: the updated greens at the two neighbours and the ECI
// chroma estimate at the green centre, on random green centres of test images.
module tb_calculate_c;
  import demosaic_pkg::*;
  import tb_ref_pkg::*;

  win7_t win;
  pix_t ha, hb, hc, va, vb, vc;
  int checks = 0, failures = 0;

  calculate_c #(.VERTICAL(1'b0)) dut_h (.win(win), .g_a(ha), .g_b(hb), .c_calc(hc));
  calculate_c #(.VERTICAL(1'b1)) dut_v (.win(win), .g_a(va), .g_b(vb), .c_calc(vc));

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
    for (int s = 0; s < 30; s++) begin
      make_image(20, 64, s * 7 + 2);
      if (s % 3 == 2) for (int y = 0; y < 20; y++) for (int x = 0; x < 64; x++) img[y][x] = $urandom_range(0, 255);
      for (int t = 0; t < 100; t++) begin
        automatic int y = $urandom_range(3, 16);
        automatic int x = $urandom_range(3, 59);
        automatic int gl, gr, gu, gd, g;
        if (!green(y, x)) x++;
        for (int r = 0; r < 7; r++) for (int c = 0; c < 7; c++) win[r][c] = pix_t'(img[y-3+r][x-3+c]);
        #1;
        gl = ng_green(y, x-1); gr = ng_green(y, x+1);
        gu = ng_green(y-1, x); gd = ng_green(y+1, x);
        g  = img[y][x];
        chk("h g_a", ha, gl); chk("h g_b", hb, gr);
        chk("v g_a", va, gu); chk("v g_b", vb, gd);
        chk("h c", hc, sat(g - fl2((gl - img[y][x-1]) + (gr - img[y][x+1]))));
        chk("v c", vc, sat(g - fl2((gu - img[y-1][x]) + (gd - img[y+1][x]))));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
