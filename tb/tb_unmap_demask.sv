// tb_unmap_demask: random values split into two random tower-field shares.
// The output must be the original GF(2^8) value, with the expected result
// worked out by the reference model's field (checked via the isomorphism
// property: products survive the round trip).
module tb_unmap_demask;
  import aes_gf_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  block_t s0, s1, y;

  unmap_demask dut (.s0, .s1, .y);

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
    block_t d, m, e;
    for (int n = 0; n < 500; n++) begin
      d  = rand128();
      m  = (n == 0) ? '0 : rand128();
      // Shares of the tower image of d: tower product of mapped bytes, so the
      // expected plain value is the AES-field product.
      for (int i = 0; i < 16; i++) begin
        s0[127 - 8*i -: 8] = gf256_mul(map8(d[127 - 8*i -: 8]), T3) ^ m[127 - 8*i -: 8];
        e[127 - 8*i -: 8]  = mul(d[127 - 8*i -: 8], 8'h03);
      end
      s1 = m;
      @(posedge clk);
      check(y == e, $sformatf("demasked %h expected %h", y, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
