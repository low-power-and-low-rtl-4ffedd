// tb_aes_sub_bytes: self-checking testbench for aes_sub_bytes.
// FIPS-197 round-1 SubBytes (193de3be... -> d42711ae...) and random blocks in both directions.
// Expected values come from aes_ref_pkg, not from the RTL. A free-running
// clock only times the watchdog; the DUT is combinational and is sampled
// 1 time unit after each new input.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [127:0] si, so;
  logic dec;
  aes_sub_bytes dut (.state_in(si), .decrypt(dec), .state_out(so));

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
    dec = 1'b0; si = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    check(so, 128'hd42711aee0bf98f1b8b45de51e415230, "FIPS-197 round 1");
    for (int i = 0; i < 100; i++) begin
      si = {$urandom, $urandom, $urandom, $urandom};
      dec = 1'b0; #1; check(so, ref_sub_bytes(si, 0), "random enc");
      dec = 1'b1; #1; check(so, ref_sub_bytes(si, 1), "random dec");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
