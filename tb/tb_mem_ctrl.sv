// tb_mem_ctrl: drives bands of several widths with eol on the last column
// and checks the column count, the RAM select rotation (starting at RAM
// index 3 and stepping once per band) and the row-parity toggle.
module tb_mem_ctrl;
  import demosaic_pkg::*;

  logic clk = 0, rst_n = 0, eol = 0;
  tag_t tag;
  int checks = 0, failures = 0;

  mem_ctrl dut (.clk(clk), .rst_n(rst_n), .eol(eol), .tag(tag));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL got %0d exp %0d", got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    chk(tag.valid, 0);
    rst_n = 1;
    for (int band = 0; band < 10; band++) begin
      automatic int wd = 5 + 3 * band;
      for (int x = 0; x < wd; x++) begin
        eol = (x == wd - 1);
        #1;
        chk(tag.valid, 1);
        chk(tag.col, x);
        chk(tag.sel, (3 + band) % 4);
        chk(tag.rpar, band % 2);
        chk(tag.eol, eol);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
