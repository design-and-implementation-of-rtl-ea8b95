// tb_eci_op_core: end-to-end test of the demosaicking core at its default
// parameters (ALPHA = 75, 1024-word line RAMs).
//
// Frames are streamed as the core expects: band n = image rows n..n+6, one
// column per clock, eol on the last column, bands back to back. Every output
// pixel of rows 4..h-5 and columns 4..w-5 (those whose whole neighbourhood is
// inside the image) is compared with tb_ref_pkg. Frames: 40-column images in
// all four Bayer phases, then a 1024-column image (the full line length).
// Also checked: the first output comes 11 clocks after the first input
// column, one pixel per clock, eol_o on the last pixel of each row, the
// line RAM select takes all four values. The test fails if any algorithm
// path (smooth/edge for green, BW and SW, horizontal and vertical) or the
// band switch never happened.
module tb_eci_op_core;
  import demosaic_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, eol = 0;
  logic [1:0] order_info = 0;
  pix_t din [7];
  pix_t r, g, b;
  logic valid, eol_o;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_eol = 0;
  bit sel_seen [4];

  eci_op_core dut (
    .clk(clk), .rst_n(rst_n),
    .din0(din[0]), .din1(din[1]), .din2(din[2]), .din3(din[3]),
    .din4(din[4]), .din5(din[5]), .din6(din[6]),
    .eol(eol), .order_info(order_info),
    .r(r), .g(g), .b(b), .valid(valid), .eol_o(eol_o)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) sel_seen[dut.tp[5].sel] = 1'b1;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Stream one frame and check what comes out.
  task automatic run_frame(int hh, int ww, int oi, int seed);
    int orow, ocol, first_in, first_out, n_out;
    bit   done;
    make_image(hh, ww, seed);
    oinfo = oi;
    order_info = 2'(oi);
    rst_n = 0;
    eol = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    orow = 1; ocol = 0; first_out = -1; n_out = 0; done = 0;
    first_in = cycle;
    fork
      begin : drive
        for (int n = 0; n + 7 <= hh; n++)
          for (int x = 0; x < ww; x++) begin
            for (int k = 0; k < 7; k++) din[k] = pix_t'(img[n+k][x]);
            eol = (x == ww - 1);
            @(negedge clk);
          end
        eol = 0;
        for (int k = 0; k < 7; k++) din[k] = '0;
        repeat (20) @(negedge clk);
      end
      begin : collect
        while (!done) begin
          @(posedge clk);
          #1;
          if (valid) begin
            if (first_out < 0) first_out = cycle;
            if (orow <= hh - 6) begin
              n_out++;
              if (orow >= 4 && orow <= hh - 5 && ocol >= 4 && ocol <= ww - 5) begin
                int er, eg, eb;
                ref_rgb(orow, ocol, er, eg, eb);
                check($sformatf("R(%0d,%0d) oi=%0d", orow, ocol, oi), r, er);
                check($sformatf("G(%0d,%0d) oi=%0d", orow, ocol, oi), g, eg);
                check($sformatf("B(%0d,%0d) oi=%0d", orow, ocol, oi), b, eb);
              end
              if (eol_o) begin
                n_eol++;
                check("eol_o on last column", ocol, ww - 1);
                orow++; ocol = 0;
              end else ocol++;
            end else done = 1;
          end
        end
      end
    join
    // first input column is on din during the clock that ends at edge first_in+1
    check("latency (clocks)", first_out - first_in, 11);
    check("pixels per frame", n_out, (hh - 6) * ww);
  endtask

  initial begin
    for (int k = 0; k < 7; k++) din[k] = '0;
    run_frame(16, 40, 0, 3);
    run_frame(16, 40, 1, 7);
    run_frame(16, 40, 2, 11);
    run_frame(16, 40, 3, 20);
    run_frame(13, 1024, 2, 5);

    $display("paths: NG smooth %0d edge %0d | BW smooth %0d hor %0d ver %0d | SW smooth %0d hor %0d ver %0d | bands %0d",
             n_ng_smooth, n_ng_edge, n_bw_smooth, n_bw_hor, n_bw_ver,
             n_sw_smooth, n_sw_hor, n_sw_ver, n_eol);
    check("NG smooth path used", int'(n_ng_smooth > 0), 1);
    check("NG edge path used",   int'(n_ng_edge > 0), 1);
    check("BW smooth path used", int'(n_bw_smooth > 0), 1);
    check("BW horizontal edge",  int'(n_bw_hor > 0), 1);
    check("BW vertical edge",    int'(n_bw_ver > 0), 1);
    check("SW smooth path used", int'(n_sw_smooth > 0), 1);
    check("SW horizontal edge",  int'(n_sw_hor > 0), 1);
    check("SW vertical edge",    int'(n_sw_ver > 0), 1);
    check("band switches",       int'(n_eol > 0), 1);
    for (int i = 0; i < 4; i++) check($sformatf("RAM %0d written", i), int'(sel_seen[i]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
