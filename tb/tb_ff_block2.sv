// tb_ff_block2: random SW inputs and a random enable; the outputs must load
// only on enabled clocks and hold otherwise.
module tb_ff_block2;
  import demosaic_pkg::*;

  logic clk = 0, en = 0;
  win3_t pi, po, pm;
  pix_t vi [5], vo [5], vm [5];
  int checks = 0, failures = 0;

  ff_block2 dut (.clk(clk), .en(en), .p_in(pi), .g_c_in(vi[0]), .c_up_in(vi[1]),
                 .c_left_in(vi[2]), .c_right_in(vi[3]), .c_down_in(vi[4]),
                 .p_out(po), .g_c_out(vo[0]), .c_up_out(vo[1]), .c_left_out(vo[2]),
                 .c_right_out(vo[3]), .c_down_out(vo[4]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (t > 0) begin
        checks++;
        if (po != pm || vo != vm) failures++;
      end
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) pi[r][c] = pix_t'($urandom);
      for (int k = 0; k < 5; k++) vi[k] = pix_t'($urandom);
      en = (t == 0) ? 1'b1 : 1'($urandom);
      if (en) begin pm = pi; vm = vi; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
