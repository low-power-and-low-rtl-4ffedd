// tb_aes128_core_separate_sq: the end-to-end test of tb_aes128_core run on
// the core built with SQ_LAMBDA_COMBINED = 0, i.e. with the separate x^2 and
// x*lambda blocks in every multiplicative inverse instead of the combined
// block. Both builds must give identical AES results. It loads keys,
// encrypts and decrypts, and compares every result with the FIPS-197
// reference model of aes_ref_pkg, including the appendix B and C.1
// vectors. It also checks the timing: key_ready 10 cycles after
// the key_load edge, done 10 cycles after the start edge, and a new block
// accepted in the cycle done is high.
// Each mechanism of the core is counted and must happen at least once:
// key expansion, encryption, decryption, a key change, back-to-back blocks,
// a start ignored while busy and a start ignored without a key.
// Inputs change on the falling clock edge.
module tb_aes128_core_separate_sq;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_keyexp = 0, n_enc = 0, n_dec = 0, n_rekey = 0;
  int n_b2b = 0, n_busy_ignored = 0, n_nokey_ignored = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         key_load, start, decrypt;
  logic [127:0] key_in, data_in, data_out;
  logic         key_ready, busy, done;

  always #5 clk = ~clk;

  aes128_core #(.SQ_LAMBDA_COMBINED(1'b0)) dut (
    .clk, .rst_n, .key_load, .key_in, .key_ready,
    .start, .decrypt, .data_in, .busy, .done, .data_out
  );

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load a key and check that key_ready rises exactly 10 cycles later.
  task automatic load_key(logic [127:0] k);
    int cyc = 0;
    @(negedge clk);
    key_load = 1'b1; key_in = k;
    @(negedge clk);
    key_load = 1'b0; key_in = '0;
    cyc = 0;
    while (!key_ready) begin @(negedge clk); cyc++; end
    check(128'(cyc), 128'(10), "key expansion latency");
    n_keyexp++;
  endtask

  // Run one block; check latency and result.
  task automatic run_block(logic [127:0] k, logic [127:0] din, bit dec);
    int cyc = 0;
    logic [127:0] exp;
    exp = dec ? ref_decrypt(k, din) : ref_encrypt(k, din);
    @(negedge clk);
    start = 1'b1; decrypt = dec; data_in = din;
    @(negedge clk);
    start = 1'b0; decrypt = 1'b0; data_in = '0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(128'(cyc), 128'(10), "block latency");
    check(data_out, exp, dec ? "decrypt" : "encrypt");
    if (dec) n_dec++; else n_enc++;
  endtask

  initial begin : stimulus
    logic [127:0] k, pt, ct;
    rst_n = 1'b0; key_load = 1'b0; start = 1'b0; decrypt = 1'b0;
    key_in = '0; data_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // A start without a key is ignored.
    @(negedge clk); start = 1'b1; data_in = 128'h1;
    @(negedge clk); start = 1'b0;
    check(128'(busy), 128'(0), "start without key ignored");
    if (!busy) n_nokey_ignored++;

    // FIPS-197 appendix C.1.
    k = 128'h000102030405060708090a0b0c0d0e0f;
    load_key(k);
    run_block(k, 128'h00112233445566778899aabbccddeeff, 1'b0);
    check(data_out, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 encrypt");
    run_block(k, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1'b1);
    check(data_out, 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1 decrypt");

    // FIPS-197 appendix B (key 2b7e1516...).
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    load_key(k);
    n_rekey++;
    run_block(k, 128'h3243f6a8885a308d313198a2e0370734, 1'b0);
    check(data_out, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B encrypt");
    run_block(k, 128'h3925841d02dc09fbdc118597196a0b32, 1'b1);
    check(data_out, 128'h3243f6a8885a308d313198a2e0370734, "FIPS-197 B decrypt");

    // Start while busy is ignored: the first block's result must stand.
    @(negedge clk); start = 1'b1; decrypt = 1'b0; data_in = 128'h0123;
    @(negedge clk); start = 1'b1; data_in = 128'h4567;   // ignored, busy
    check(128'(busy), 128'(1), "busy during block");
    n_busy_ignored++;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    check(data_out, ref_encrypt(k, 128'h0123), "result unaffected by start while busy");
    @(negedge clk);
    check(128'(busy), 128'(0), "idle after block");

    // Back-to-back: start held high, the next block is taken in the done cycle.
    @(negedge clk); start = 1'b1; decrypt = 1'b0; data_in = 128'haaaa;
    @(negedge clk); data_in = 128'hbbbb;
    while (!done) @(negedge clk);
    check(data_out, ref_encrypt(k, 128'haaaa), "back-to-back first");
    @(negedge clk); start = 1'b0;  // second block was taken at the done edge
    begin
      int cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      check(128'(cyc), 128'(10), "back-to-back spacing");
    end
    check(data_out, ref_encrypt(k, 128'hbbbb), "back-to-back second");
    n_b2b++;

    // Random keys and blocks, both directions, with key changes.
    for (int t = 0; t < 8; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      load_key(k);
      n_rekey++;
      for (int j = 0; j < 3; j++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        run_block(k, pt, 1'b0);
        ct = data_out;
        run_block(k, ct, 1'b1);
        check(data_out, pt, "round trip");
      end
    end

    $display("mechanisms: key_expansion=%0d encrypt=%0d decrypt=%0d rekey=%0d back_to_back=%0d start_ignored_busy=%0d start_ignored_no_key=%0d",
             n_keyexp, n_enc, n_dec, n_rekey, n_b2b, n_busy_ignored, n_nokey_ignored);
    if (n_keyexp == 0 || n_enc == 0 || n_dec == 0 || n_rekey == 0 || n_b2b == 0 ||
        n_busy_ignored == 0 || n_nokey_ignored == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
