// tb_workloads: runs the image sizes the core is specified for through the
// core at its default parameters and checks every interior pixel against
// tb_ref_pkg, the output rate (one pixel per clock) and the clock count per
// frame: the 10x10, 36x36 and 96x96 images used for power estimation and
// one 1000x1000 video frame. At 25 MHz the 1000x1000 frame must finish
// within 40 ms (1,000,000 clocks) for 25 frames per second.
//
// Frames are streamed as the core expects (band n = rows n..n+6, one column
// per clock, eol on the last column, bands back to back).
module tb_workloads;
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
    repeat (2000000) @(posedge clk);
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
    int t0;
    for (int k = 0; k < 7; k++) din[k] = '0;
    run_frame(10, 10, 0, 1);
    run_frame(36, 36, 1, 2);
    run_frame(96, 96, 2, 3);
    t0 = cycle;
    run_frame(1000, 1000, 3, 4);
    // frame time: bands * width clocks of input, plus pipeline tail and reset
    $display("1000x1000 frame: %0d clocks = %0d us at 25 MHz", cycle - t0, (cycle - t0) / 25);
    check("1000x1000 frame within 40 ms at 25 MHz", int'(cycle - t0 <= 1000000), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
