// tb_output_select: random tags, memory words, samples and SW values in all
// four Bayer phases; checks that each output pixel one clock later takes R,
// G and B from the right source (word, buffer sample or SW) for green, red
// and blue pixels, and that valid and eol follow the tag.
module tb_output_select;
  import demosaic_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] oi = 0;
  tag_t tag;
  word_t mid, word_q;
  pix_t pix, sw, r, g, b;
  logic valid, eol;
  int checks = 0, failures = 0;
  int n_green = 0, n_red = 0, n_blue = 0;

  output_select dut (.clk(clk), .rst_n(rst_n), .order_info(oi), .tag(tag), .mid_word(mid),
                     .pix(pix), .sw_c(sw), .r(r), .g(g), .b(b), .valid(valid), .eol(eol));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string n, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s got %0d exp %0d", n, got, exp); end
  endtask

  initial begin
    tag = '0; mid = '0; pix = '0; sw = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mid = word_t'($urandom);
    @(negedge clk);
    for (int t = 0; t < 1000; t++) begin
      automatic int er, eg, eb, row, colr;
      automatic bit is_g, red;
      word_q = mid;                      // word registered at the last edge
      oi = 2'(t / 250);
      tag.valid = 1'($urandom); tag.eol = 1'($urandom);
      tag.col = 10'($urandom); tag.sel = 2'($urandom); tag.rpar = 1'($urandom);
      pix = pix_t'($urandom); sw = pix_t'($urandom);
      row = tag.rpar ^ 1;                // SW row parity
      colr = tag.col[0];
      // Bayer colour of (row, col): written out per phase code
      case (oi)
        2'b00: begin is_g = (row ^ colr); red = (row == 0); end   // RG / GB
        2'b01: begin is_g = (row ^ colr); red = (row == 1); end   // BG / GR
        2'b10: begin is_g = !(row ^ colr); red = (row == 0); end  // GR / BG
        default: begin is_g = !(row ^ colr); red = (row == 1); end // GB / RG
      endcase
      if (is_g) begin er = word_q[7:0]; eg = pix; eb = word_q[15:8]; n_green++; end
      else if (red) begin er = pix; eg = word_q[7:0]; eb = sw; n_red++; end
      else begin eb = pix; eg = word_q[7:0]; er = sw; n_blue++; end
      mid = word_t'($urandom);
      @(negedge clk);
      chk("R", r, er); chk("G", g, eg); chk("B", b, eb);
      chk("valid", valid, tag.valid); chk("eol", eol, tag.valid & tag.eol);
    end
    chk("all colours seen", int'(n_green > 0 && n_red > 0 && n_blue > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
