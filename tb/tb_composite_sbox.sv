// tb_composite_sbox: self-checking testbench for composite_sbox.
// All 256 inputs in both modes against S(x) = affine(x^-1) and S^-1, plus FIPS-197 entries S(00)=63, S(53)=ed.
// Expected values come from aes_ref_pkg, not from the RTL. A free-running
// clock only times the watchdog; the DUT is combinational and is sampled
// 1 time unit after each new input.
module tb_composite_sbox;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] din, dout;
  logic dec;
  composite_sbox dut (.din(din), .dec(dec), .dout(dout));

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
    dec = 1'b0;
    din = 8'h00; #1; check(128'(dout), 128'h63, "S(00)");
    din = 8'h53; #1; check(128'(dout), 128'hed, "S(53)");
    for (int i = 0; i < 256; i++) begin
      din = 8'(i); dec = 1'b0; #1;
      check(128'(dout), 128'(sbox(din)), $sformatf("S(%h)", din));
      dec = 1'b1; #1;
      check(128'(dout), 128'(inv_sbox(din)), $sformatf("Sinv(%h)", din));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
