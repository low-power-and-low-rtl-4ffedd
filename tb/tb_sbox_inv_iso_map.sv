// tb_sbox_inv_iso_map: self-checking testbench for sbox_inv_iso_map.
// Checks inv_iso(a*b) = inv_iso(a)*inv_iso(b) for all pairs (composite product on the left, GF(2^8) product on the right), bijection and inv_iso(1) = 1.
// Expected values come from aes_ref_pkg, not from the RTL. A free-running
// clock only times the watchdog; the DUT is combinational and is sampled
// 1 time unit after each new input.
module tb_sbox_inv_iso_map;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] q, b;
  logic [7:0] img [256];
  sbox_inv_iso_map dut (.q(q), .b(b));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    bit seen [256];
    for (int i = 0; i < 256; i++) begin q = 8'(i); #1; img[i] = b; end
    for (int i = 0; i < 256; i++) seen[i] = 1'b0;
    for (int i = 0; i < 256; i++) seen[img[i]] = 1'b1;
    for (int i = 0; i < 256; i++) check(128'(seen[i]), 128'(1), $sformatf("onto %h", i));
    check(128'(img[1]), 128'(1), "inv_iso(1)");
    for (int a = 0; a < 256; a++)
      for (int c = 0; c < 256; c++)
        check(128'(img[m8(8'(a), 8'(c))]), 128'(gmul(img[a], img[c])), $sformatf("mul %h %h", a, c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
