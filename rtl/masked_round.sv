// masked_round: one AES encryption round on a masked 128-bit state held in the
// tower field representation (state = s0 ^ s1).
//
// SubBytes uses 16 masked S-boxes, each fed its own 18 fresh random bits.
// ShiftRows, MixColumns and AddRoundKey are linear, so each is applied to both
// shares on its own (f(x ^ m) = f(x) ^ f(m)); MixColumns multiplies by the
// tower images T2 = M*2 and T3 = M*3 of the AES constants. The round key also
// arrives as two shares (rk0 ^ rk1) and each share is added to the matching
// state share. With last = 1 MixColumns is skipped (final AES round).
// Byte i of a block is row i%4, column i/4 (FIPS-197 order, byte 0 = MSBs).
// Purely combinational.
module masked_round
  import aes_gf_pkg::*;
(
  input  block_t                 s0,
  input  block_t                 s1,
  input  block_t                 rk0,
  input  block_t                 rk1,
  input  logic                   last,
  input  logic [ROUND_RND_W-1:0] rnd,
  output block_t                 n0,
  output block_t                 n1
);

  block_t sb0, sb1, sr0, sr1, mc0, mc1;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    masked_sbox u_sbox (
      .x0 (s0[127 - 8*i -: 8]),
      .x1 (s1[127 - 8*i -: 8]),
      .rnd(rnd[SBOX_RND_W*i +: SBOX_RND_W]),
      .y0 (sb0[127 - 8*i -: 8]),
      .y1 (sb1[127 - 8*i -: 8])
    );
  end

  function automatic block_t shift_rows(input block_t b);
    block_t y;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        y[127 - 8*(4*c + r) -: 8] = b[127 - 8*(4*((c + r) % 4) + r) -: 8];
    return y;
  endfunction

  function automatic block_t mix_columns(input block_t b);
    block_t y;
    byte_t a [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = b[127 - 8*(4*c + r) -: 8];
      for (int r = 0; r < 4; r++)
        y[127 - 8*(4*c + r) -: 8] = gf256_mul(a[r], T2) ^ gf256_mul(a[(r + 1) % 4], T3)
                                   ^ a[(r + 2) % 4] ^ a[(r + 3) % 4];
    end
    return y;
  endfunction

  always_comb begin
    sr0 = shift_rows(sb0);
    sr1 = shift_rows(sb1);
    mc0 = last ? sr0 : mix_columns(sr0);
    mc1 = last ? sr1 : mix_columns(sr1);
    n0  = mc0 ^ rk0;
    n1  = mc1 ^ rk1;
  end

endmodule
