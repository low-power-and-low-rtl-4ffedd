// tb_sbox_inv_affine: self-checking testbench for sbox_inv_affine.
// All 256 inputs against rotl(s,1)^rotl(s,3)^rotl(s,6)^{05}, and that it undoes the affine map.
// Expected values come from aes_ref_pkg, not from the RTL. A free-running
// clock only times the watchdog; the DUT is combinational and is sampled
// 1 time unit after each new input.
module tb_sbox_inv_affine;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] q, b;
  sbox_inv_affine dut (.q(q), .b(b));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 256; i++) begin
      q = 8'(i); #1;
      check(128'(b), 128'(inv_affine(q)), $sformatf("IAT(%h)", q));
      q = affine(8'(i)); #1;
      check(128'(b), 128'(i), $sformatf("IAT(AT(%h))", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
