// masked_aes_core: iterative masked AES-128 encryption, one round per clock,
// entirely in the tower field representation and entirely on two shares.
//
// Registers: the state shares (st0, st1), the current round-key shares
// (rk0, rk1), the tower-form round constant rc and a round counter. The round
// function (masked_round) and the key schedule step (masked_key_expand) sit
// side by side: in every round the next round key is expanded from the
// registered one and used in the same cycle.
//
// Interface and timing (all inputs sampled on the rising clock edge):
//  - start while idle loads the shares of plaintext and key and performs the
//    initial AddRoundKey; start while busy is ignored.
//  - rounds 1..10 follow on the next 10 edges (round 10 without MixColumns).
//  - done is a one-cycle pulse on the 11th edge after start was taken;
//    ct0/ct1 then hold the ciphertext shares until the next start.
//  - rnd must carry fresh random bits every cycle (ROUND_RND_W for the 16
//    state S-boxes in the low bits, KEY_RND_W for the key-schedule S-boxes).
//  - rst_n is an active-low synchronous reset that clears all registers.
// The round-per-cycle organisation, the handshake and the reset are this
// design's own choices; the masked round/key-expansion split follows the
// AES block / key expansion block structure of the design.
module masked_aes_core
  import aes_gf_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  block_t                pt0,
  input  block_t                pt1,
  input  block_t                key0,
  input  block_t                key1,
  input  logic [CORE_RND_W-1:0] rnd,
  output logic                  busy,
  output logic                  done,
  output block_t                ct0,
  output block_t                ct1
);

  typedef enum logic {IDLE, RUN} state_e;

  state_e      fsm;
  logic [3:0]  round;
  block_t      st0, st1, rk0, rk1;
  byte_t       rc;
  block_t      nrk0, nrk1, nst0, nst1;

  masked_key_expand u_kexp (
    .k0 (rk0), .k1 (rk1), .rc (rc),
    .rnd(rnd[ROUND_RND_W +: KEY_RND_W]),
    .nk0(nrk0), .nk1(nrk1)
  );

  masked_round u_round (
    .s0 (st0), .s1 (st1), .rk0 (nrk0), .rk1 (nrk1),
    .last(round == 4'(NUM_ROUNDS)),
    .rnd (rnd[0 +: ROUND_RND_W]),
    .n0  (nst0), .n1 (nst1)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fsm   <= IDLE;
      round <= '0;
      st0   <= '0;
      st1   <= '0;
      rk0   <= '0;
      rk1   <= '0;
      rc    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (fsm)
        IDLE: if (start) begin
          st0   <= pt0 ^ key0;
          st1   <= pt1 ^ key1;
          rk0   <= key0;
          rk1   <= key1;
          rc    <= T1;
          round <= 4'd1;
          fsm   <= RUN;
        end
        RUN: begin
          st0   <= nst0;
          st1   <= nst1;
          rk0   <= nrk0;
          rk1   <= nrk1;
          rc    <= gf256_mul(rc, T2);
          round <= round + 4'd1;
          if (round == 4'(NUM_ROUNDS)) begin
            fsm  <= IDLE;
            done <= 1'b1;
          end
        end
        default: fsm <= IDLE;
      endcase
    end
  end

  assign busy = (fsm == RUN);
  assign ct0  = st0;
  assign ct1  = st1;

  // The round counter stays within 1..NUM_ROUNDS while running.
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (round >= 4'd1 && round <= 4'(NUM_ROUNDS)));
  // done is a single-cycle pulse.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done);

endmodule
