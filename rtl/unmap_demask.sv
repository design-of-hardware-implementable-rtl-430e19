// unmap_demask: exit of the masked datapath. Both shares of the result are
// carried back from the tower field to GF(2^8) by the inverse isomorphism
// M^-1, byte by byte, and XORed together to remove the mask:
//   y = M^-1*s0 ^ M^-1*s1 = M^-1*(s0 ^ s1).
// The shares are unmapped separately and only combined at the very end.
// Combinational.
module unmap_demask
  import aes_gf_pkg::*;
(
  input  block_t s0,
  input  block_t s1,
  output block_t y
);

  assign y = unmap_block(s0) ^ unmap_block(s1);

endmodule
