// mask_map: entry of the masked datapath. A 128-bit value d (plaintext or
// key, in the usual AES byte representation) is Boolean-masked with the
// random mask m, and both shares are carried byte by byte into the tower
// field GF(((2^2)^2)^2) by the linear isomorphism M:
//   s0 = M*(d ^ m),  s1 = M*m   (per byte), so s0 ^ s1 = M*d.
// Masking before mapping follows the design's data flow; since M is linear,
// the unmasked value is never formed after the input XOR. Combinational.
module mask_map
  import aes_gf_pkg::*;
(
  input  block_t d,
  input  block_t m,
  output block_t s0,
  output block_t s1
);

  assign s0 = map_block(d ^ m);
  assign s1 = map_block(m);

endmodule
