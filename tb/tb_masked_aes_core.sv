// tb_masked_aes_core: drives the core with mapped, masked plaintext and key
// shares and fresh random bits every cycle. Checks the FIPS-197 example and
// random blocks against the reference model, the 11-cycle latency from start
// to done, the one-cycle done pulse, that neither output share alone equals
// the ciphertext, busy during the rounds, and that a start
// while busy is ignored.
module tb_masked_aes_core;
  import aes_gf_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, busy, done;
  block_t pt0, pt1, key0, key1, ct0, ct1;
  logic [CORE_RND_W-1:0] rnd;

  masked_aes_core dut (.clk, .rst_n, .start, .pt0, .pt1, .key0, .key1, .rnd,
                       .busy, .done, .ct0, .ct1);

  always @(negedge clk)
    for (int i = 0; i < CORE_RND_W; i += 24) rnd[i +: 24] = 24'($urandom());

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

  task automatic run(input block_t pt, input block_t key, input bit poke_busy);
    block_t mp, mk, e;
    int cyc;
    mp = rand128();
    mk = rand128();
    e  = encrypt(pt, key);
    @(negedge clk);
    pt0 = map_block(pt) ^ mp;   pt1 = mp;
    key0 = map_block(key) ^ mk; key1 = mk;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    check(busy, "busy after start");
    while (!done) begin
      if (poke_busy && cyc == 4) begin
        start = 1;                       // must be ignored
        pt0 = rand128(); key0 = rand128();
      end else start = 0;
      @(negedge clk);
      cyc++;
      check(cyc < 40, "done arrives");
      if (cyc >= 40) break;
    end
    start = 0;
    check(cyc == 11, $sformatf("latency %0d", cyc));
    check(!busy, "idle at done");
    check(unmap_block(ct0 ^ ct1) == e, $sformatf("ct %h expected %h", unmap_block(ct0 ^ ct1), e));
    // with random masks neither share alone may carry the ciphertext
    check(ct0 != map_block(e) && ct1 != map_block(e), "ciphertext shares stay masked");
    @(negedge clk);
    check(!done, "done is a pulse");
    check(unmap_block(ct0 ^ ct1) == e, "ct held");
  endtask

  initial begin
    rst_n = 0; start = 0;
    pt0 = '0; pt1 = '0; key0 = '0; key1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 0);
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 1);
    for (int n = 0; n < 30; n++) run(rand128(), rand128(), n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
