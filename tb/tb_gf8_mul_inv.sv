// tb_gf8_mul_inv: self-checking testbench for gf8_mul_inv.
// All 256 inputs, for both settings of SQ_LAMBDA_COMBINED: q*q_inv = 1 in the composite field, 0 maps to 0.
// Expected values come from aes_ref_pkg, not from the RTL. A free-running
// clock only times the watchdog; the DUT is combinational and is sampled
// 1 time unit after each new input.
module tb_gf8_mul_inv;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] q, qi_c, qi_s;
  gf8_mul_inv #(.SQ_LAMBDA_COMBINED(1'b1)) dut_c (.q(q), .q_inv(qi_c));
  gf8_mul_inv #(.SQ_LAMBDA_COMBINED(1'b0)) dut_s (.q(q), .q_inv(qi_s));

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
    for (int i = 0; i < 256; i++) begin
      q = 8'(i); #1;
      if (i == 0) begin
        check(128'(qi_c), 128'(0), "inv(0) combined");
        check(128'(qi_s), 128'(0), "inv(0) separate");
      end else begin
        check(128'(m8(q, qi_c)), 128'(1), $sformatf("%h*inv combined", q));
        check(128'(m8(q, qi_s)), 128'(1), $sformatf("%h*inv separate", q));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
