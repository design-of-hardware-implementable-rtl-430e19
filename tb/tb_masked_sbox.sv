// tb_masked_sbox: every byte value, each with several random masks and fresh
// bits. The recombined, unmapped output must equal the AES S-box of the
// reference model.
module tb_masked_sbox;
  import aes_gf_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  byte_t x0, x1, y0, y1;
  logic [SBOX_RND_W-1:0] rnd;

  masked_sbox dut (.x0, .x1, .rnd, .y0, .y1);

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
        rnd = SBOX_RND_W'($urandom());
        @(posedge clk);
        check(unmap8(y0 ^ y1) == sbox(8'(x)), $sformatf("sbox(%02h) got %02h", x, unmap8(y0 ^ y1)));
      end
    end
    // Known values from FIPS-197
    x0 = map8(8'h53); x1 = 8'h00; rnd = '0;
    @(posedge clk);
    check(unmap8(y0 ^ y1) == 8'hED, "S(53) = ED");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
