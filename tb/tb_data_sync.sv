// tb_data_sync: feeds random RAM output words, a RAM select that changes
// every few clocks and an alternating order signal (with phase slips), and
// checks the five SW values, the byte split by want_blue and mid_word
// against a model of the multiplexers, the two-clock delay and the enabled
// registers.
module tb_data_sync;
  import demosaic_pkg::*;

  logic clk = 0, order = 0, want_blue = 0;
  logic [1:0] rsel = 0;
  word_t doa [4];
  pix_t gc, cu, cl, cr, cd;
  word_t mid;
  word_t h1 [4], h2 [4];                 // model of the two-clock delay
  word_t up, center, down, left, right;  // model registers
  int checks = 0, failures = 0;

  data_sync dut (.clk(clk), .doa(doa), .rsel(rsel), .order(order), .want_blue(want_blue),
                 .g_c(gc), .c_up(cu), .c_left(cl), .c_right(cr), .c_down(cd), .mid_word(mid));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pix_t pick(word_t w, logic bl);
    return bl ? w[15:8] : w[7:0];
  endfunction

  task automatic chk(string n, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s got %h exp %h", n, got, exp); end
  endtask

  initial begin
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (t % 37 == 0) rsel = 2'($urandom);
      order = (t % 53 == 0) ? order : ~order;
      want_blue = 1'($urandom);
      for (int i = 0; i < 4; i++) doa[i] = word_t'($urandom);
      #1;
      if (t >= 2) chk("mid_word", mid, h2[2'(rsel + 2'd2)]);
      @(posedge clk);
      // model update, from the values seen before this edge
      if (!order) begin
        up = doa[2'(rsel + 2'd1)]; center = doa[2'(rsel + 2'd2)]; down = doa[2'(rsel + 2'd3)];
      end else begin
        left = h2[2'(rsel + 2'd2)]; right = doa[2'(rsel + 2'd2)];
      end
      h2 = h1; h1 = doa;
      #1;
      if (t >= 4) begin
        chk("g_c", gc, center[7:0]);
        chk("c_up", cu, pick(up, want_blue));
        chk("c_down", cd, pick(down, want_blue));
        chk("c_left", cl, pick(left, want_blue));
        chk("c_right", cr, pick(right, want_blue));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
