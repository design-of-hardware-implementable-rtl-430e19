// masked_key_expand: one step of the AES-128 key schedule on a masked round
// key in the tower field representation (key = k0 ^ k1).
//
// Words w0..w3 are the four 32-bit columns of the round key (w0 = MSBs).
// temp = SubWord(RotWord(w3)) ^ Rcon; w0' = w0 ^ temp, w1' = w1 ^ w0',
// w2' = w2 ^ w1', w3' = w3 ^ w2'. SubWord uses four masked S-boxes (18 fresh
// bits each); the XORs are done share by share, and the round constant rc
// (already in tower form, M*Rcon) enters the data share only. The next round
// key therefore stays masked: neither share alone equals the key.
// Purely combinational.
module masked_key_expand
  import aes_gf_pkg::*;
(
  input  block_t               k0,
  input  block_t               k1,
  input  byte_t                rc,
  input  logic [KEY_RND_W-1:0] rnd,
  output block_t               nk0,
  output block_t               nk1
);

  logic [31:0] rot0, rot1, sub0, sub1, t0, t1;

  assign rot0 = {k0[23:0], k0[31:24]};
  assign rot1 = {k1[23:0], k1[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    masked_sbox u_sbox (
      .x0 (rot0[31 - 8*i -: 8]),
      .x1 (rot1[31 - 8*i -: 8]),
      .rnd(rnd[SBOX_RND_W*i +: SBOX_RND_W]),
      .y0 (sub0[31 - 8*i -: 8]),
      .y1 (sub1[31 - 8*i -: 8])
    );
  end

  always_comb begin
    t0 = sub0 ^ {rc, 24'h0};
    t1 = sub1;
    nk0[127:96] = k0[127:96] ^ t0;
    nk0[95:64]  = k0[95:64]  ^ nk0[127:96];
    nk0[63:32]  = k0[63:32]  ^ nk0[95:64];
    nk0[31:0]   = k0[31:0]   ^ nk0[63:32];
    nk1[127:96] = k1[127:96] ^ t1;
    nk1[95:64]  = k1[95:64]  ^ nk1[127:96];
    nk1[63:32]  = k1[63:32]  ^ nk1[95:64];
    nk1[31:0]   = k1[31:0]   ^ nk1[63:32];
  end

endmodule
