// tb_rc5_core: checks the complete RC5-32/12/16 unit: on-chip key expansion
// followed by encryption and decryption through the shared round-key table.
//
// Checked: the two published known-answer vectors (key loaded through the
// key port), random keys and blocks against the reference model in both
// directions, the key-expansion latency (79 cycles) and block latency
// (13 cycles), that `ready` is low and a start is dropped before a key is
// loaded and while a block is in flight, and that a key load during a block
// is ignored.
module tb_rc5_core;
  import tb_rc_ref_pkg::*;

  localparam int W = 32, R = 12, KB = 16, T = 2*R + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic            key_load, key_busy, key_done, key_valid;
  logic [8*KB-1:0] key;
  logic            start, decrypt, ready, busy, done;
  logic [2*W-1:0]  din, dout;

  rc5_core dut (.clk, .rst_n, .key_load, .key, .key_busy, .key_done, .key_valid,
                .start, .decrypt, .din, .ready, .busy, .done, .dout);

  task automatic expect_eq(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load(bytes_t k);
    int cyc;
    @(negedge clk);
    foreach (k[i]) key[8*i +: 8] = k[i];
    key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    cyc = 1;
    while (!key_done && cyc < 500) begin @(negedge clk); cyc++; end
    expect_eq(cyc, 3*T + 1, "key expansion latency");
    expect_eq(key_valid & ready, 1, "ready after key expansion");
  endtask

  task automatic run(bit dec, logic [2*W-1:0] blk, output logic [2*W-1:0] res);
    int cyc;
    @(negedge clk);
    din = blk;
    decrypt = dec;
    start = 1'b1;
    @(negedge clk);
    // In flight: a second start and a key load must both be ignored.
    expect_eq(ready, 0, "not ready while busy");
    din = ~blk;
    decrypt = ~dec;
    key_load = 1'b1;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); key_load = 1'b0; cyc++; end
    start = 1'b0;
    key_load = 1'b0;
    expect_eq(cyc, R + 1, "block latency");
    expect_eq(key_busy, 0, "key load ignored while busy");
    res = dout;
  endtask

  initial begin
    bytes_t k;
    words_t s;
    logic [2*W-1:0] res, ct;
    word_t a, b;
    key_load = 1'b0; key = '0; start = 1'b0; decrypt = 1'b0; din = '0;
    k = new[KB];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq(ready | key_valid, 0, "not ready after reset");
    // A start with no key is dropped.
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    expect_eq(busy | done, 0, "start without key dropped");

    foreach (k[i]) k[i] = 8'h00;
    load(k);
    run(1'b0, '0, res);
    expect_eq(res, {W'(le32(32'h154B8F6D)), W'(le32(32'h21A5DBEE))}, "KAT1 encrypt");
    run(1'b1, res, res);
    expect_eq(res, '0, "KAT1 decrypt");

    k = '{8'h91, 8'h5F, 8'h46, 8'h19, 8'hBE, 8'h41, 8'hB2, 8'h51,
          8'h63, 8'h55, 8'hA5, 8'h01, 8'h10, 8'hA9, 8'hCE, 8'h91};
    load(k);
    run(1'b0, {W'(le32(32'h154B8F6D)), W'(le32(32'h21A5DBEE))}, res);
    expect_eq(res, {W'(le32(32'h5B2B8952)), W'(le32(32'hF7C013AC))}, "KAT2 encrypt");

    for (int n = 0; n < 4; n++) begin
      foreach (k[i]) k[i] = 8'($urandom);
      s = key_expand(W, T, k);
      load(k);
      for (int m = 0; m < 4; m++) begin
        a = word_t'($urandom);
        b = word_t'($urandom);
        run(1'b0, {W'(b), W'(a)}, ct);
        rc5_enc(W, R, s, a, b);
        expect_eq(ct, {W'(b), W'(a)}, "random encrypt");
        run(1'b1, ct, res);
        rc5_dec(W, R, s, a, b);
        expect_eq(res, {W'(b), W'(a)}, "random decrypt");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
