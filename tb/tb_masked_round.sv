// tb_masked_round: random states, round keys, masks and fresh bits, with and
// without MixColumns. The recombined, unmapped result must equal one round of
// the reference AES model.
module tb_masked_round;
  import aes_gf_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  block_t s0, s1, rk0, rk1, n0, n1;
  logic last;
  logic [ROUND_RND_W-1:0] rnd;

  masked_round dut (.s0, .s1, .rk0, .rk1, .last, .rnd, .n0, .n1);

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
    block_t s, k, ms, mk, e;
    for (int n = 0; n < 300; n++) begin
      s  = rand128();
      k  = rand128();
      ms = rand128();
      mk = rand128();
      last = n[0];
      s0  = map_block(s) ^ ms;  s1  = ms;
      rk0 = map_block(k) ^ mk;  rk1 = mk;
      for (int i = 0; i < ROUND_RND_W; i += 32) rnd[i +: 32] = $urandom();
      e = round_fn(s, k, last);
      @(posedge clk);
      check(unmap_block(n0 ^ n1) == e, $sformatf("round last=%0d", last));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
