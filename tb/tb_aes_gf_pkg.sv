// tb_aes_gf_pkg: checks the tower-field package against the plain AES field.
// The map must be a bijection, unmap its inverse, and map must carry AES
// multiplication to tower multiplication (a field isomorphism). The derived
// constants must be the images of 1, 2, 3 and 8'h63, and the tower affine
// matrix Q must equal M*A*M^-1 on every byte.
module tb_aes_gf_pkg;
  import aes_gf_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

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
    bit seen [256];
    byte_t a, b;
    for (int i = 0; i < 256; i++) seen[i] = 0;
    for (int x = 0; x < 256; x++) begin
      seen[map8(8'(x))] = 1;
      check(unmap8(map8(8'(x))) == 8'(x), $sformatf("unmap(map(%02h))", x));
      // affine in tower = map(affine(unmap))
      check((mat8(Q_ROWS, map8(8'(x))) ^ R_CONST) == map8(affine(8'(x))),
            $sformatf("Q affine at %02h", x));
    end
    for (int i = 0; i < 256; i++) check(seen[i], $sformatf("map hits %02h", i));
    for (int n = 0; n < 4000; n++) begin
      a = 8'($urandom());
      b = 8'($urandom());
      check(map8(mul(a, b)) == gf256_mul(map8(a), map8(b)),
            $sformatf("isomorphism %02h*%02h", a, b));
      check(map8(a ^ b) == (map8(a) ^ map8(b)), "linearity");
    end
    check(T1 == map8(8'h01) && gf256_mul(T1, 8'h5A) == 8'h5A, "identity");
    check(unmap8(T2) == 8'h02 && unmap8(T3) == 8'h03 && unmap8(R_CONST) == 8'h63, "constants");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
