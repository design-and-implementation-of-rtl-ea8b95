// line_ram: dual-port line memory of DEPTH words of WORD_W bits, the
// equivalent of one 1024 x 16 FPGA block RAM of the design.
//
// Port A is read-only with a registered output: dout_a shows the word at
// addr_a one clock after the address. Port B is write-only: din_b is stored
// at addr_b on the clock edge when we_b is high. A read and a write to the
// same address in the same clock return the old word. The contents are not
// reset.
module line_ram
  import demosaic_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
)(
  input  logic        clk,
  input  logic [AW-1:0] addr_a,
  output word_t       dout_a,
  input  logic        we_b,
  input  logic [AW-1:0] addr_b,
  input  word_t       din_b
);
  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    if (we_b) mem[addr_b] <= din_b;
  end
endmodule
