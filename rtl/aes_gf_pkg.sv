// aes_gf_pkg: types, constants and composite-field arithmetic shared by the
// masked AES-128 datapath.
//
// The datapath never works in the usual AES field GF(2^8) = GF(2)[x]/(x^8+x^4+x^3+x+1).
// Every byte is held in the tower representation GF(((2^2)^2)^2):
//   GF(2^2) = GF(2)[w]/(w^2 + w + 1)        element {b1,b0} = b1*w + b0
//   GF(2^4) = GF(2^2)[z]/(z^2 + z + PHI)    element {h,l}   = h*z + l, PHI = w
//   GF(2^8) = GF(2^4)[y]/(y^2 + y + LAMBDA) element {h,l}   = h*y + l, LAMBDA = w*z
// The GF(2^2) polynomial w^2+w+1 is the one the design is built around; PHI,
// LAMBDA and the isomorphism below are this design's choice (any valid set works).
//
// The isomorphism M maps the AES byte x^i to beta^i, with beta = 8'h41 a root of
// the AES polynomial in the tower field. M, its inverse and the affine matrix
// Q = M*A*M^-1 of the S-box are stored row by row: output bit r of a matrix
// product is the parity of (ROW[r] & input). R = M*8'h63 is the affine constant.
// The MixColumns constants 2 and 3 and the key-schedule round constants are
// derived from M by constant functions, so only M, M^-1 and Q are tabulated.
//
// Everything here is combinational (functions and constants); no timing.
package aes_gf_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;

  // One masked value: the real value is s0 ^ s1 (s0 = masked data, s1 = mask).
  typedef struct packed {
    block_t s0;
    block_t s1;
  } shared_block_t;

  // Fresh random bits consumed by one masked S-box per evaluation.
  localparam int unsigned SBOX_RND_W  = 18;
  localparam int unsigned ROUND_RND_W = 16 * SBOX_RND_W;   // 16 state S-boxes
  localparam int unsigned KEY_RND_W   = 4 * SBOX_RND_W;    // 4 key-schedule S-boxes
  localparam int unsigned CORE_RND_W  = ROUND_RND_W + KEY_RND_W;

  localparam int unsigned NUM_ROUNDS = 10;                  // AES-128

  // Matrices, ROW[r] at bits [8r+7:8r].
  localparam logic [63:0] MAP_ROWS   = {8'hA0, 8'hDE, 8'h0C, 8'h70, 8'h68, 8'h9C, 8'h34, 8'h03};
  localparam logic [63:0] UNMAP_ROWS = {8'hBA, 8'hB4, 8'h3A, 8'h9E, 8'h86, 8'hA6, 8'hF0, 8'hF1};
  localparam logic [63:0] Q_ROWS     = {8'h58, 8'hA4, 8'h32, 8'hFB, 8'hDF, 8'hA1, 8'h62, 8'h6E};

  localparam logic [1:0] PHI    = 2'b10;    // w
  localparam logic [3:0] LAMBDA = 4'b1000;  // w*z

  // ---------------- GF(2^2) ----------------
  function automatic logic [1:0] gf4_mul(input logic [1:0] a, input logic [1:0] b);
    logic [1:0] c;
    c[1] = (a[1] & b[1]) ^ (a[1] & b[0]) ^ (a[0] & b[1]);
    c[0] = (a[1] & b[1]) ^ (a[0] & b[0]);
    return c;
  endfunction

  // Squaring, which in GF(2^2) is also the inverse (and maps 0 to 0). Linear.
  function automatic logic [1:0] gf4_sq(input logic [1:0] a);
    return {a[1], a[1] ^ a[0]};
  endfunction

  // ---------------- GF(2^4) ----------------
  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] hh;
    hh = gf4_mul(a[3:2], b[3:2]);
    return {hh ^ gf4_mul(a[3:2], b[1:0]) ^ gf4_mul(a[1:0], b[3:2]),
            gf4_mul(a[1:0], b[1:0]) ^ gf4_mul(PHI, hh)};
  endfunction

  function automatic logic [3:0] gf16_sq(input logic [3:0] a);
    return gf16_mul(a, a);
  endfunction

  // ---------------- GF(2^8) (tower) ----------------
  function automatic byte_t gf256_mul(input byte_t a, input byte_t b);
    logic [3:0] hh;
    hh = gf16_mul(a[7:4], b[7:4]);
    return {hh ^ gf16_mul(a[7:4], b[3:0]) ^ gf16_mul(a[3:0], b[7:4]),
            gf16_mul(a[3:0], b[3:0]) ^ gf16_mul(LAMBDA, hh)};
  endfunction

  // ---------------- bit matrices ----------------
  function automatic byte_t mat8(input logic [63:0] rows, input byte_t x);
    byte_t y;
    for (int r = 0; r < 8; r++) y[r] = ^(rows[8*r +: 8] & x);
    return y;
  endfunction

  function automatic byte_t map8(input byte_t x);   // GF(2^8) -> tower
    return mat8(MAP_ROWS, x);
  endfunction

  function automatic byte_t unmap8(input byte_t x); // tower -> GF(2^8)
    return mat8(UNMAP_ROWS, x);
  endfunction

  localparam byte_t T1 = map8(8'h01);   // multiplicative identity
  localparam byte_t T2 = map8(8'h02);   // MixColumns / Rcon factor x
  localparam byte_t T3 = map8(8'h03);
  localparam byte_t R_CONST = map8(8'h63);

  // Byte i of a block (i = 0 is the most significant byte, FIPS-197 order;
  // byte i sits in row i%4, column i/4 of the state).
  function automatic byte_t get_byte(input block_t b, input int unsigned i);
    return b[127 - 8*i -: 8];
  endfunction

  function automatic block_t map_block(input block_t b);
    block_t y;
    for (int i = 0; i < 16; i++) y[127 - 8*i -: 8] = map8(b[127 - 8*i -: 8]);
    return y;
  endfunction

  function automatic block_t unmap_block(input block_t b);
    block_t y;
    for (int i = 0; i < 16; i++) y[127 - 8*i -: 8] = unmap8(b[127 - 8*i -: 8]);
    return y;
  endfunction

endpackage
