// input_buffer: the 7x7 register window that feeds the Big Window, plus the
// 3x3 extension that feeds the Small Window.
//
// Each clock one Bayer column of seven rows (din[0] = top row of the band)
// enters and every register passes its sample one place along its row.
// Rows 0..6 are seven registers long; rows 0..2 continue for three more
// registers (the "p" window). After a column has entered, the register at
// distance d from the input holds the column that entered d clocks earlier.
//
// Outputs, in image orientation (column 0 = oldest = leftmost):
//   win[r][c] = row r, register 6-c   (the BW window, centre win[3][3])
//   p[r][c]   = row r, register 9-c   (the SW window, r = 0..2)
// So the BW centre is 3 columns behind the newest column and the SW centre
// is 8 columns behind it, two rows above the BW centre. Length and layout
// follow the buffer figure of the design. No reset: the contents are data.
module input_buffer
  import demosaic_pkg::*;
(
  input  logic  clk,
  input  pix_t  din [7],
  output win7_t win,
  output win3_t p
);
  pix_t sr_top [3][10];   // rows 0..2: 7 window + 3 extension registers
  pix_t sr_bot [4][7];    // rows 3..6

  always_ff @(posedge clk) begin
    for (int r = 0; r < 3; r++) begin
      sr_top[r][0] <= din[r];
      for (int d = 1; d < 10; d++) sr_top[r][d] <= sr_top[r][d-1];
    end
    for (int r = 0; r < 4; r++) begin
      sr_bot[r][0] <= din[r+3];
      for (int d = 1; d < 7; d++) sr_bot[r][d] <= sr_bot[r][d-1];
    end
  end

  always_comb begin
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 7; c++)
        win[r][c] = (r < 3) ? sr_top[r][6-c] : sr_bot[r-3][6-c];
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        p[r][c] = sr_top[r][9-c];
  end
endmodule
