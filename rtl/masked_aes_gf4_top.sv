// masked_aes_gf4_top: Boolean-masked AES-128 encryption whose arithmetic is
// carried out in the composite field GF(((2^2)^2)^2), built down to GF(2^2).
//
// Data flow: the plaintext is XORed with the random mask pt_mask and both
// shares are mapped byte-wise to the tower field (mask_map); the key is
// treated the same way with key_mask. The iterative core (masked_aes_core)
// runs ten masked rounds with an on-the-fly masked key schedule. At the end
// both ciphertext shares are mapped back to GF(2^8) and XORed together
// (unmap_demask), which removes the mask.
//
// Interface and timing: assert start for one cycle with plaintext, key,
// pt_mask and key_mask valid; these need only be valid in that cycle. done
// pulses 11 clock edges later, and ciphertext is valid from then until the
// next start. rnd must carry CORE_RND_W fresh random bits every cycle. busy is
// high while rounds are running; start is ignored while busy. rst_n is an
// active-low synchronous reset. The masks and fresh bits come from outside,
// from a random number source this design does not contain.
module masked_aes_gf4_top
  import aes_gf_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  block_t                plaintext,
  input  block_t                key,
  input  block_t                pt_mask,
  input  block_t                key_mask,
  input  logic [CORE_RND_W-1:0] rnd,
  output logic                  busy,
  output logic                  done,
  output block_t                ciphertext
);

  block_t pt0, pt1, k0, k1, ct0, ct1;

  mask_map u_map_pt  (.d(plaintext), .m(pt_mask),  .s0(pt0), .s1(pt1));
  mask_map u_map_key (.d(key),       .m(key_mask), .s0(k0),  .s1(k1));

  masked_aes_core u_core (
    .clk, .rst_n, .start,
    .pt0, .pt1, .key0(k0), .key1(k1), .rnd,
    .busy, .done, .ct0, .ct1
  );

  unmap_demask u_out (.s0(ct0), .s1(ct1), .y(ciphertext));

endmodule
