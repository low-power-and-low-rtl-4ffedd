// tb_sbox_iso_map: self-checking testbench for sbox_iso_map.
// Checks that the map is a bijection and a field isomorphism: iso(a*b) = iso(a)*iso(b) for all 65536 pairs (GF(2^8) product on the left, composite product on the right), iso(1) = 1 and iso is additive.
// Expected values come from aes_ref_pkg, not from the RTL. A free-running
// clock only times the watchdog; the DUT is combinational and is sampled
// 1 time unit after each new input.
module tb_sbox_iso_map;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] b, q;
  logic [7:0] img [256];
  sbox_iso_map dut (.b(b), .q(q));

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
    for (int i = 0; i < 256; i++) begin b = 8'(i); #1; img[i] = q; end
    for (int i = 0; i < 256; i++) seen[i] = 1'b0;
    for (int i = 0; i < 256; i++) seen[img[i]] = 1'b1;
    for (int i = 0; i < 256; i++) check(128'(seen[i]), 128'(1), $sformatf("onto %h", i));
    check(128'(img[1]), 128'(1), "iso(1)");
    for (int a = 0; a < 256; a++)
      for (int c = 0; c < 256; c++) begin
        check(128'(img[gmul(8'(a), 8'(c))]), 128'(m8(img[a], img[c])), $sformatf("mul %h %h", a, c));
        check(128'(img[a ^ c]), 128'(img[a] ^ img[c]), $sformatf("add %h %h", a, c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
