// tb_aes_round: self-checking testbench for aes_round.
// FIPS-197 round 1 of 3243f6a8... and random states in all four modes (enc/dec, middle/final) against the reference steps; decrypt middle rounds expect InvMixColumns applied to the key.
// Expected values come from aes_ref_pkg, not from the RTL. A free-running
// clock only times the watchdog; the DUT is combinational and is sampled
// 1 time unit after each new input.
module tb_aes_round;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [127:0] si, k, so;
  logic dec, fin;
  aes_round dut (.state_in(si), .round_key(k), .decrypt(dec), .final_round(fin), .state_out(so));

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
    logic [127:0] exp;
    dec = 1'b0; fin = 1'b0;
    si = 128'h193de3bea0f4e22b9ac68d2ae9f84808; k = 128'ha0fafe1788542cb123a339392a6c7605; #1;
    check(so, 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 round 1");
    for (int i = 0; i < 100; i++) begin
      si = {$urandom, $urandom, $urandom, $urandom};
      k  = {$urandom, $urandom, $urandom, $urandom};
      dec = 1'b0; fin = 1'b0; #1;
      exp = ref_mix_columns(ref_shift_rows(ref_sub_bytes(si, 0), 0), 0) ^ k;
      check(so, exp, "enc middle");
      fin = 1'b1; #1;
      exp = ref_shift_rows(ref_sub_bytes(si, 0), 0) ^ k;
      check(so, exp, "enc final");
      dec = 1'b1; fin = 1'b0; #1;
      exp = ref_mix_columns(ref_sub_bytes(ref_shift_rows(si, 1), 1), 1) ^ ref_mix_columns(k, 1);
      check(so, exp, "dec middle");
      fin = 1'b1; #1;
      exp = ref_sub_bytes(ref_shift_rows(si, 1), 1) ^ k;
      check(so, exp, "dec final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
