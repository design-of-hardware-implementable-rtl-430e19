// masked_affine: the affine step of the AES S-box, carried out in the tower
// representation on a masked byte.
//
// In the tower field the S-box affine map A*x + b becomes q*x + r with
// q = M*A*M^-1 and r = M*b (M the GF(2^8) -> tower isomorphism, b = 8'h63).
// Being affine, it is applied to each share separately and the constant r is
// added to the data share only, so (a0 ^ a1) -> q*(a0 ^ a1) ^ r:
//   y0 = q*a0 ^ r,  y1 = q*a1.
// The form q = M*A*M^-1, r = M*b follows the design; the matrix values follow
// from the isomorphism chosen in aes_gf_pkg. Purely combinational.
module masked_affine
  import aes_gf_pkg::*;
(
  input  byte_t a0,
  input  byte_t a1,
  output byte_t y0,
  output byte_t y1
);

  assign y0 = mat8(Q_ROWS, a0) ^ R_CONST;
  assign y1 = mat8(Q_ROWS, a1);

endmodule
