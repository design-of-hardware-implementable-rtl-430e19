// tb_mask_map: random data and masks. The two output shares must together
// encode the data (unmap(s0 ^ s1) = d), the mask share must be the mapped mask,
// and with a nonzero mask the data share must differ from the mapped data.
module tb_mask_map;
  import aes_gf_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  block_t d, m, s0, s1;

  mask_map dut (.d, .m, .s0, .s1);

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
    for (int n = 0; n < 500; n++) begin
      d = rand128();
      m = (n == 0) ? '0 : rand128();
      @(posedge clk);
      check(unmap_block(s0 ^ s1) == d, $sformatf("recombined %h", d));
      check(unmap_block(s1) == m, "mask share");
      if (m != '0) check(s0 != map_block(d), "data share is masked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
