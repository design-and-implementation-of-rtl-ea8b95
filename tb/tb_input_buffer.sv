// tb_input_buffer: streams random columns into the buffer and checks, after
// every clock, that the 7x7 window holds the last seven columns (oldest on
// the left) and the 3x3 extension holds columns 7..9 back of rows 0..2.
module tb_input_buffer;
  import demosaic_pkg::*;

  logic clk = 0;
  pix_t din [7];
  win7_t win;
  win3_t p;
  pix_t hist [200][7];
  int checks = 0, failures = 0;

  input_buffer dut (.clk(clk), .din(din), .win(win), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int r = 0; r < 7; r++) begin din[r] = pix_t'($urandom); hist[t][r] = din[r]; end
      @(posedge clk); #1;
      if (t >= 9) begin
        for (int r = 0; r < 7; r++) for (int c = 0; c < 7; c++) begin
          checks++;
          if (win[r][c] != hist[t-6+c][r]) failures++;
        end
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
          checks++;
          if (p[r][c] != hist[t-9+c][r]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
