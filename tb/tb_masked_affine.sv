// tb_masked_affine: every byte value with random masks. The recombined,
// unmapped output must equal the standard AES affine map (A*x + 8'h63) of the
// reference model, and the mask share must not carry the constant.
module tb_masked_affine;
  import aes_gf_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  byte_t a0, a1, y0, y1;

  masked_affine dut (.a0, .a1, .y0, .y1);

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
    byte_t m;
    for (int x = 0; x < 256; x++) begin
      for (int k = 0; k < 4; k++) begin
        m  = (k == 0) ? 8'h00 : 8'($urandom());
        a0 = map8(8'(x)) ^ m;
        a1 = m;
        @(posedge clk);
        check(unmap8(y0 ^ y1) == affine(8'(x)), $sformatf("affine(%02h)", x));
      end
    end
    a0 = 8'h00; a1 = 8'h00;
    @(posedge clk);
    check(y1 == 8'h00 && unmap8(y0) == 8'h63, "constant only in data share");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
