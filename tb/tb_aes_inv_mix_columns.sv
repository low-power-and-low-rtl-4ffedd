// tb_aes_inv_mix_columns: self-checking testbench for aes_inv_mix_columns.
// Inverts the FIPS-197 round-1 column and random blocks.
// Expected values come from aes_ref_pkg, not from the RTL. A free-running
// clock only times the watchdog; the DUT is combinational and is sampled
// 1 time unit after each new input.
module tb_aes_inv_mix_columns;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [127:0] si, so;
  aes_inv_mix_columns dut (.state_in(si), .state_out(so));

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
    si = 128'h046681e5e0cb199a48f8d37a2806264c; #1;
    check(so, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS-197 round 1");
    for (int i = 0; i < 200; i++) begin
      si = {$urandom, $urandom, $urandom, $urandom}; #1;
      check(so, ref_mix_columns(si, 1), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
