// tb_aes_key_expand: self-checking testbench for aes_key_expand.
// The FIPS-197 key 2b7e1516... expanded step by step (round key 1 a0fafe17..., round key 10 d014f9a8...), and random keys against the reference schedule.
// Expected values come from aes_ref_pkg, not from the RTL. A free-running
// clock only times the watchdog; the DUT is combinational and is sampled
// 1 time unit after each new input.
module tb_aes_key_expand;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [127:0] ki, ko;
  logic [7:0] rc;
  aes_key_expand dut (.key_in(ki), .rcon(rc), .key_out(ko));

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
    rk_t rk;
    ki = 128'h2b7e151628aed2a6abf7158809cf4f3c; rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      #1;
      if (r == 1)  check(ko, 128'ha0fafe1788542cb123a339392a6c7605, "round key 1");
      if (r == 10) check(ko, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "round key 10");
      ki = ko; rc = gmul(rc, 8'h02);
    end
    for (int i = 0; i < 20; i++) begin
      rk = ref_key_schedule({$urandom, $urandom, $urandom, $urandom});
      rc = 8'h01;
      for (int r = 1; r <= 10; r++) begin
        ki = rk[r-1]; #1;
        check(ko, rk[r], $sformatf("random key step %0d", r));
        rc = gmul(rc, 8'h02);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
