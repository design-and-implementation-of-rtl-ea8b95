// mem_ctrl: the memory control units (Line Counter, RAM Select and the row
// phase part of the Sequence Generator).
//
// The core receives one Bayer column per clock, starting on the first clock
// after reset, and eol marks the last column of each seven-row band. This
// block labels the column now on din with a tag:
//   col  - image column; counts up each clock and restarts at 0 after eol
//          (the 10-bit Line Counter, which is also the line RAM address);
//   sel  - the 2-bit RAM Select counter, the line RAM that receives the BW
//          results of this band; it steps after each eol. After reset it
//          points at the fourth RAM, as in the memory-rotation figure;
//   rpar - parity of the band's top image row; it toggles after each eol,
//          which is how the green/chroma order of a row follows orderInfo;
//   eol, valid - copies of the input eol and "out of reset".
// The tag travels beside the data; each stage derives the pixel colour
// (the Sequence Generator's "order" signal) from it with is_green().
module mem_ctrl
  import demosaic_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic eol,
  output tag_t tag
);
  logic [ADDR_W-1:0] col_q;
  logic [1:0]        sel_q;
  logic              rpar_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q  <= '0;
      sel_q  <= 2'd3;
      rpar_q <= 1'b0;
    end else if (eol) begin
      col_q  <= '0;
      sel_q  <= sel_q + 2'd1;
      rpar_q <= ~rpar_q;
    end else begin
      col_q  <= col_q + 1'b1;
    end
  end

  always_comb begin
    tag.valid = rst_n;
    tag.eol   = eol & rst_n;
    tag.col   = col_q;
    tag.sel   = sel_q;
    tag.rpar  = rpar_q;
  end
endmodule
