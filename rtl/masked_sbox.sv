// masked_sbox: masked AES SubBytes on one byte held in the tower field
// representation as two Boolean shares (x = x0 ^ x1).
//
// A masked inversion in GF(((2^2)^2)^2) (masked_inv, using the 18 fresh bits
// of rnd) is followed by the mapped affine transformation (masked_affine), so
// y0 ^ y1 = M*S(M^-1*(x0 ^ x1)) with S the AES S-box. The mask never leaves
// the shares: the unmasked byte is not formed anywhere. Purely combinational.
module masked_sbox
  import aes_gf_pkg::*;
(
  input  byte_t                 x0,
  input  byte_t                 x1,
  input  logic [SBOX_RND_W-1:0] rnd,
  output byte_t                 y0,
  output byte_t                 y1
);

  byte_t i0, i1;

  masked_inv u_inv (.x0(x0), .x1(x1), .rnd(rnd), .y0(i0), .y1(i1));
  masked_affine u_aff (.a0(i0), .a1(i1), .y0(y0), .y1(y1));

endmodule
