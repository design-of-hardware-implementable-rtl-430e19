// tb_masked_inv: every byte value, each with several random masks and random
// fresh bits. The recombined, unmapped output must equal the AES-field
// inverse computed by the reference model (0 -> 0).
module tb_masked_inv;
  import aes_gf_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  byte_t x0, x1, y0, y1;
  logic [SBOX_RND_W-1:0] rnd;

  masked_inv dut (.x0, .x1, .rnd, .y0, .y1);

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
      for (int k = 0; k < 8; k++) begin
        m   = (k == 0) ? 8'h00 : 8'($urandom());
        x0  = map8(8'(x)) ^ m;
        x1  = m;
        rnd = (k == 1) ? '0 : SBOX_RND_W'($urandom());
        @(posedge clk);
        check(unmap8(y0 ^ y1) == inv(8'(x)), $sformatf("inv(%02h) got %02h", x, unmap8(y0 ^ y1)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
