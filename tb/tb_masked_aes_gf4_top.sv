// tb_masked_aes_gf4_top: end-to-end test of the masked AES-128 encryptor at
// its only (default) configuration. Encrypts the FIPS-197 examples and random
// blocks with random masks and fresh random bits, compares each ciphertext
// with the reference model, and checks the 11-cycle latency. It also makes
// each mechanism of the design happen and counts it:
//   zero mask and nonzero mask runs, all-zero fresh bits, a start while busy
//   (ignored), back-to-back operations, a reset in the middle of an operation,
//   and the final round without MixColumns (observed on the core).
module tb_masked_aes_gf4_top;
  import aes_gf_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, busy, done;
  block_t plaintext, key, pt_mask, key_mask, ciphertext;
  logic [CORE_RND_W-1:0] rnd;
  bit zero_rnd;

  int n_zero_mask, n_masked, n_zero_rnd, n_busy_start, n_back2back, n_reset_mid, n_last_round;

  masked_aes_gf4_top dut (.clk, .rst_n, .start, .plaintext, .key, .pt_mask, .key_mask, .rnd,
                          .busy, .done, .ciphertext);

  always @(negedge clk)
    for (int i = 0; i < CORE_RND_W; i += 24) rnd[i +: 24] = zero_rnd ? 24'h0 : 24'($urandom());

  always @(posedge clk)
    if (rst_n && dut.u_core.busy && dut.u_core.round == 4'(NUM_ROUNDS)) n_last_round++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode: 0 plain random masks, 1 zero masks, 2 start while busy
  task automatic run(input block_t pt, input block_t k, input int mode, input bit b2b);
    block_t e;
    int cyc;
    e = encrypt(pt, k);
    if (!b2b) @(negedge clk);
    plaintext = pt;
    key       = k;
    pt_mask   = (mode == 1) ? '0 : rand128();
    key_mask  = (mode == 1) ? '0 : rand128();
    if (mode == 1) n_zero_mask++; else n_masked++;
    if (zero_rnd) n_zero_rnd++;
    start = 1;
    @(negedge clk);
    start = 0;
    plaintext = rand128(); key = rand128(); pt_mask = rand128(); key_mask = rand128();
    cyc = 1;
    while (!done && cyc < 40) begin
      if (mode == 2 && cyc == 5) begin
        start = 1;
        n_busy_start++;
      end else start = 0;
      @(negedge clk);
      cyc++;
    end
    start = 0;
    check(cyc == 11, $sformatf("latency %0d", cyc));
    check(ciphertext == e, $sformatf("ct %h expected %h", ciphertext, e));
  endtask

  initial begin
    block_t pt, k;
    rst_n = 0; start = 0; zero_rnd = 0;
    plaintext = '0; key = '0; pt_mask = '0; key_mask = '0;
    n_zero_mask = 0; n_masked = 0; n_zero_rnd = 0; n_busy_start = 0;
    n_back2back = 0; n_reset_mid = 0; n_last_round = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 1, 0);
    check(ciphertext == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1");
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 0, 0);
    check(ciphertext == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B");

    // reset in the middle of an operation, then a normal run
    @(negedge clk);
    plaintext = rand128(); key = rand128(); pt_mask = rand128(); key_mask = rand128();
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (4) @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    check(!busy && !done, "reset aborts operation");
    n_reset_mid++;

    for (int n = 0; n < 40; n++) begin
      pt = rand128();
      k  = rand128();
      zero_rnd = (n % 7 == 3);
      run(pt, k, n % 3, 0);
    end
    zero_rnd = 0;
    // back to back: next start in the cycle right after done
    for (int n = 0; n < 5; n++) begin
      run(rand128(), rand128(), 0, n > 0);
      if (n > 0) n_back2back++;
    end

    $display("mechanisms: zero_mask=%0d masked=%0d zero_rnd=%0d busy_start=%0d back2back=%0d reset_mid=%0d last_round=%0d",
             n_zero_mask, n_masked, n_zero_rnd, n_busy_start, n_back2back, n_reset_mid, n_last_round);
    check(n_zero_mask > 0, "zero-mask run happened");
    check(n_masked > 0, "masked run happened");
    check(n_zero_rnd > 0, "zero fresh-bit run happened");
    check(n_busy_start > 0, "start while busy happened");
    check(n_back2back > 0, "back-to-back happened");
    check(n_reset_mid > 0, "reset mid-operation happened");
    check(n_last_round > 0, "final round happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
