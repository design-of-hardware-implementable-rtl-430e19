// masked_inv: first-order Boolean-masked multiplicative inverse of a byte in
// the tower field GF(((2^2)^2)^2), with 0 mapped to 0 as AES requires.
//
// The input x = x0 ^ x1 arrives as two shares; the output y = y0 ^ y1 = x^-1
// leaves as two shares. No step ever combines the two shares of a value.
// The inverse is split down the tower twice:
//   GF(2^8): d = LAMBDA*xh^2 + xh*xl + xl^2,  y = (xh*d^-1) y + (xh+xl)*d^-1
//   GF(2^4): same form with PHI, reducing to an inverse in GF(2^2),
// where inversion is plain squaring and therefore linear, so it is applied to
// each share on its own. Squarings and constant multiplications are linear and
// also work share by share. The non-linear products use a two-share masked
// multiplier: c0 = a0*b0 ^ (a0*b1 ^ z), c1 = a1*b1 ^ (a1*b0 ^ z), z fresh.
// Three GF(2^4) products (4 random bits each) and, inside the GF(2^4)
// inversion, three GF(2^2) products (2 bits each) use the 18 bits of rnd.
// Carrying all arithmetic down to GF(2^2) follows the design's idea; the
// masked-multiplier form and the use of fresh bits are this design's choice.
// Purely combinational.
module masked_inv
  import aes_gf_pkg::*;
(
  input  byte_t                 x0,
  input  byte_t                 x1,
  input  logic [SBOX_RND_W-1:0] rnd,
  output byte_t                 y0,
  output byte_t                 y1
);

  // Masked products; the result packs {share 0, share 1}.
  function automatic logic [3:0] mmul4(input logic [1:0] a0, input logic [1:0] a1,
                                       input logic [1:0] b0, input logic [1:0] b1,
                                       input logic [1:0] z);
    return {gf4_mul(a0, b0) ^ (gf4_mul(a0, b1) ^ z),
            gf4_mul(a1, b1) ^ (gf4_mul(a1, b0) ^ z)};
  endfunction

  function automatic logic [7:0] mmul16(input logic [3:0] a0, input logic [3:0] a1,
                                        input logic [3:0] b0, input logic [3:0] b1,
                                        input logic [3:0] z);
    return {gf16_mul(a0, b0) ^ (gf16_mul(a0, b1) ^ z),
            gf16_mul(a1, b1) ^ (gf16_mul(a1, b0) ^ z)};
  endfunction

  // Level GF(2^8)
  logic [3:0] h0, h1, l0, l1;
  logic [7:0] p;            // {p0, p1}: shares of xh*xl
  logic [3:0] d0, d1;       // shares of d in GF(2^4)
  logic [3:0] di0, di1;     // shares of d^-1

  // Level GF(2^4), operating on d
  logic [1:0] dh0, dh1, dl0, dl1;
  logic [3:0] e4p;          // shares of dh*dl
  logic [1:0] e0, e1;       // shares of e in GF(2^2)
  logic [1:0] ei0, ei1;     // shares of e^-1 = e^2
  logic [3:0] qh, ql;       // shares of the GF(2^4) inverse halves
  logic [7:0] oh, ol;       // shares of the GF(2^8) inverse halves

  always_comb begin
    {h0, l0} = x0;
    {h1, l1} = x1;

    p  = mmul16(h0, h1, l0, l1, rnd[3:0]);
    d0 = gf16_mul(LAMBDA, gf16_sq(h0)) ^ gf16_sq(l0) ^ p[7:4];
    d1 = gf16_mul(LAMBDA, gf16_sq(h1)) ^ gf16_sq(l1) ^ p[3:0];

    // GF(2^4) inverse of d = d0 ^ d1
    {dh0, dl0} = d0;
    {dh1, dl1} = d1;
    e4p = mmul4(dh0, dh1, dl0, dl1, rnd[5:4]);
    e0  = gf4_mul(PHI, gf4_sq(dh0)) ^ gf4_sq(dl0) ^ e4p[3:2];
    e1  = gf4_mul(PHI, gf4_sq(dh1)) ^ gf4_sq(dl1) ^ e4p[1:0];
    ei0 = gf4_sq(e0);
    ei1 = gf4_sq(e1);
    qh  = mmul4(dh0, dh1, ei0, ei1, rnd[7:6]);
    ql  = mmul4(dh0 ^ dl0, dh1 ^ dl1, ei0, ei1, rnd[9:8]);
    di0 = {qh[3:2], ql[3:2]};
    di1 = {qh[1:0], ql[1:0]};

    oh = mmul16(h0, h1, di0, di1, rnd[13:10]);
    ol = mmul16(h0 ^ l0, h1 ^ l1, di0, di1, rnd[17:14]);
    y0 = {oh[7:4], ol[7:4]};
    y1 = {oh[3:0], ol[3:0]};
  end

endmodule
