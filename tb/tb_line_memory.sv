// tb_line_memory: writes random rows into the four RAMs through the Select
// Data path (0G word or the one-clock-delayed BR word), then reads every
// address back on all four ports and compares with a model; reads of the
// other RAMs during writes must return their stored rows.
module tb_line_memory;
  import demosaic_pkg::*;

  localparam int D = 64;
  logic clk = 0, we = 0, sel_br = 0;
  logic [1:0] wsel = 0;
  logic [5:0] addr = 0;
  pix_t gl, rc, bc;
  word_t dout [4];
  word_t model [4][D];
  int checks = 0, failures = 0;

  line_memory #(.DEPTH(D)) dut (.clk(clk), .we(we), .wsel(wsel), .addr(addr),
    .g_left(gl), .r_center(rc), .b_center(bc), .sel_br(sel_br), .dout(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t prev_br;
    for (int pass = 0; pass < 3; pass++)
      for (int ram = 0; ram < 4; ram++) begin

        for (int a = 0; a < D; a++) begin
          @(negedge clk);
          // previous clock's read (address a-1) of a RAM not being written
          if (a > 0 && pass > 0) begin
            automatic int o = (ram + 1) % 4;
            checks++;
            if (dout[o] != model[o][a-1]) begin failures++; if (failures < 5) $display("RW ram %0d a %0d got %h exp %h", o, a-1, dout[o], model[o][a-1]); end
          end
          we = 1; addr = 6'(a); wsel = 2'(ram);
          sel_br = a[0];
          prev_br = {bc, rc};
          gl = pix_t'($urandom); rc = pix_t'($urandom); bc = pix_t'($urandom);
          if (a == 0) prev_br = {bc, rc};
          model[ram][a] = sel_br ? prev_br : {8'h00, gl};
        end
      end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < D; a++) begin
      addr = 6'(a);
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (dout[i] != model[i][a]) begin
          failures++;
          if (failures < 10) $display("FAIL ram %0d addr %0d got %h exp %h", i, a, dout[i], model[i][a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
