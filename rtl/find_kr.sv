// find_kr: colour-difference unit of the NG and SW blocks.
//
// K = G - (C1 + C2) / 2, where G is a green sample and C1, C2 are the two
// chroma samples on either side of it along one direction: the chroma value
// at the green pixel is estimated by linear interpolation, as in the ECI
// colour-difference model (K_R = G - R). Feeding the same sample to both C
// inputs gives the plain difference G - C. The halving is an arithmetic shift
// (floor), a choice of this design. Purely combinational.
module find_kr
  import demosaic_pkg::*;
(
  input  pix_t   g,
  input  pix_t   c1,
  input  pix_t   c2,
  output kdiff_t k
);
  logic [8:0] csum;
  assign csum = {1'b0, c1} + {1'b0, c2};
  assign k    = kdiff_t'({2'b00, g}) - kdiff_t'({2'b00, csum[8:1]});
endmodule
