// tb_gf4_inv: self-checking testbench for gf4_inv.
// All 16 inputs: q*q_inv = 1 for q != 0, and 0 maps to 0.
// Expected values come from aes_ref_pkg, not from the RTL. A free-running
// clock only times the watchdog; the DUT is combinational and is sampled
// 1 time unit after each new input.
module tb_gf4_inv;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] q, q_inv;
  gf4_inv dut (.q(q), .q_inv(q_inv));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 16; i++) begin
      q = 4'(i); #1;
      if (i == 0) check(128'(q_inv), 128'(0), "inv(0)");
      else        check(128'(m4(q, q_inv)), 128'(1), $sformatf("%h*inv", q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
