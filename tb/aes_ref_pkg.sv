// aes_ref_pkg: plain AES-128 reference model for the testbenches, written
// straight from the standard definition in GF(2^8) = GF(2)[x]/(x^8+x^4+x^3+x+1),
// with no tower field, no masking and no table: the S-box inverse is found
// as a^254 by square-and-multiply, followed by the standard affine map.
package aes_ref_pkg;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, t;
    r = 8'h00;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= t;
      t = xtime(t);
    end
    return r;
  endfunction

  function automatic logic [7:0] inv(input logic [7:0] a);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < 254; i++) r = mul(r, a);
    return r;
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++)
      y[i] = x[i] ^ x[(i + 4) % 8] ^ x[(i + 5) % 8] ^ x[(i + 6) % 8] ^ x[(i + 7) % 8];
    return y ^ 8'h63;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    return affine(inv(a));
  endfunction

  function automatic logic [127:0] sub_bytes(input logic [127:0] s);
    logic [127:0] y;
    for (int i = 0; i < 16; i++) y[127 - 8*i -: 8] = sbox(s[127 - 8*i -: 8]);
    return y;
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] y;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        y[127 - 8*(4*c + r) -: 8] = s[127 - 8*(4*((c + r) % 4) + r) -: 8];
    return y;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] y;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      {a0, a1, a2, a3} = s[127 - 32*c -: 32];
      y[127 - 32*c -: 32] = {mul(a0, 2) ^ mul(a1, 3) ^ a2 ^ a3,
                             a0 ^ mul(a1, 2) ^ mul(a2, 3) ^ a3,
                             a0 ^ a1 ^ mul(a2, 2) ^ mul(a3, 3),
                             mul(a0, 3) ^ a1 ^ a2 ^ mul(a3, 2)};
    end
    return y;
  endfunction

  function automatic logic [127:0] next_key(input logic [127:0] k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t = {sbox(w3[23:16]) ^ rcon, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 ^= t;
    w1 ^= w0;
    w2 ^= w1;
    w3 ^= w2;
    return {w0, w1, w2, w3};
  endfunction

  function automatic logic [7:0] rcon(input int round);  // round = 1..10
    logic [7:0] r;
    r = 8'h01;
    for (int i = 1; i < round; i++) r = xtime(r);
    return r;
  endfunction

  function automatic logic [127:0] round_fn(input logic [127:0] s, input logic [127:0] rk,
                                            input bit last);
    logic [127:0] t;
    t = shift_rows(sub_bytes(s));
    if (!last) t = mix_columns(t);
    return t ^ rk;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] s, k;
    s = pt ^ key;
    k = key;
    for (int r = 1; r <= 10; r++) begin
      k = next_key(k, rcon(r));
      s = round_fn(s, k, r == 10);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
