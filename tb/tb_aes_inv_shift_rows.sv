// tb_aes_inv_shift_rows: self-checking testbench for aes_inv_shift_rows.
// Numbered block and random blocks against the reference.
// Expected values come from aes_ref_pkg, not from the RTL. A free-running
// clock only times the watchdog; the DUT is combinational and is sampled
// 1 time unit after each new input.
module tb_aes_inv_shift_rows;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [127:0] si, so;
  aes_inv_shift_rows dut (.state_in(si), .state_out(so));

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
    si = 128'h00050a0f04090e03080d02070c01060b; #1;
    check(so, 128'h000102030405060708090a0b0c0d0e0f, "numbered");
    for (int i = 0; i < 200; i++) begin
      si = {$urandom, $urandom, $urandom, $urandom}; #1;
      check(so, ref_shift_rows(si, 1), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
