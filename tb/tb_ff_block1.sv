// tb_ff_block1: random windows and a random enable; the output must load
// only on enabled clocks and hold otherwise.
module tb_ff_block1;
  import demosaic_pkg::*;

  logic clk = 0, en = 0, red_in = 0, red_out;
  win7_t wi, wo, model;
  logic red_model;
  int checks = 0, failures = 0;

  ff_block1 dut (.clk(clk), .en(en), .win_in(wi), .red_row_in(red_in),
                 .win_out(wo), .red_row_out(red_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int loads = 0;
    en = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (t > 0) begin
        checks++;
        if (wo != model || red_out != red_model) failures++;
      end
      for (int r = 0; r < 7; r++) for (int c = 0; c < 7; c++) wi[r][c] = pix_t'($urandom);
      red_in = 1'($urandom);
      en = (t == 0) ? 1'b1 : 1'($urandom);
      if (en) begin model = wi; red_model = red_in; loads++; end
    end
    checks++; if (loads < 50 || loads > 250) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
