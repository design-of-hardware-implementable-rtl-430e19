// tb_masked_key_expand: the FIPS-197 key and random keys are expanded for ten
// rounds with fresh masks each step; every recombined round key must match the
// reference key schedule, and the round-constant input is the tower image of
// the AES Rcon sequence.
module tb_masked_key_expand;
  import aes_gf_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  block_t k0, k1, nk0, nk1;
  byte_t rc;
  logic [KEY_RND_W-1:0] rnd;

  masked_key_expand dut (.k0, .k1, .rc, .rnd, .nk0, .nk1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t k, m;
    for (int n = 0; n < 40; n++) begin
      k = (n == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128();
      for (int r = 1; r <= 10; r++) begin
        m  = rand128();
        k0 = map_block(k) ^ m;
        k1 = m;
        rc = map8(rcon(r));
        for (int i = 0; i < KEY_RND_W; i += 24) rnd[i +: 24] = 24'($urandom());
        k  = next_key(k, rcon(r));
        @(posedge clk);
        check(unmap_block(nk0 ^ nk1) == k, $sformatf("key %0d round %0d", n, r));
        if (n == 0 && r == 10)
          check(k == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 last round key");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
