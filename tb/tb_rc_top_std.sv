// tb_rc_top_std: runs the combined engine in the "standard" configuration
// of both ciphers: RC6-32/20/16 (128-bit block) and RC5-32/20/16, i.e.
// rc_top with W6 = 32, R6 = 20, R5 = 20. The data ports are then 128 bits
// wide and RC5 uses the low 64. Checked: the two published RC6-32/20/16
// known-answer vectors in both directions, random RC5-32/20 and RC6-32/20
// blocks against the reference model, and the latencies (key tables ready
// 3*44 + 1 = 133 cycles after the load, results r + 2 = 22 cycles after the
// start).
module tb_rc_top_std;
  import tb_rc_ref_pkg::*;
  import rc_pkg::*;

  localparam int W5 = 32, R5 = 20, W6 = 32, R6 = 20, KB = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic            key_load, key_busy, key_done, key_valid;
  logic [8*KB-1:0] key;
  logic            start, decrypt, ready, busy, done;
  alg_e            alg, done_alg;
  logic [127:0]    din, dout;

  rc_top #(.W5(W5), .R5(R5), .W6(W6), .R6(R6), .KB(KB)) dut (
    .clk, .rst_n, .key_load, .key, .key_busy, .key_done, .key_valid,
    .start, .alg, .decrypt, .din, .ready, .busy, .done, .done_alg, .dout);

  words_t s5, s6;

  task automatic expect_eq(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [127:0] pack(word_t a, word_t b, word_t c, word_t d);
    return {d[31:0], c[31:0], b[31:0], a[31:0]};
  endfunction

  task automatic load(bytes_t k);
    int cyc;
    @(negedge clk);
    foreach (k[i]) key[8*i +: 8] = k[i];
    key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    cyc = 1;
    while (!key_done && cyc < 500) begin @(negedge clk); cyc++; end
    expect_eq(cyc, 3*(2*R6 + 4) + 1, "key ready latency");
    s5 = key_expand(W5, 2*R5 + 2, k);
    s6 = key_expand(W6, 2*R6 + 4, k);
  endtask

  task automatic send(alg_e a, bit dec, logic [127:0] blk, output logic [127:0] res);
    int cyc;
    @(negedge clk);
    din = blk;
    alg = a;
    decrypt = dec;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    expect_eq(cyc, ((a == ALG_RC5) ? R5 : R6) + 2, "block latency");
    res = dout;
  endtask

  initial begin
    bytes_t k;
    logic [127:0] res, pt, ct;
    word_t a, b, c, d;
    key_load = 0; key = '0; start = 0; decrypt = 0; din = '0; alg = ALG_RC5;
    k = new[KB];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    foreach (k[i]) k[i] = 8'h00;
    load(k);
    send(ALG_RC6, 1'b0, '0, res);
    ct = pack(le32(32'h8fc3a536), le32(32'h56b1f778), le32(32'hc129df4e), le32(32'h9848a41e));
    expect_eq(res, ct, "RC6 KAT1 encrypt");
    send(ALG_RC6, 1'b1, ct, res);
    expect_eq(res, '0, "RC6 KAT1 decrypt");

    k = '{8'h01, 8'h23, 8'h45, 8'h67, 8'h89, 8'hab, 8'hcd, 8'hef,
          8'h01, 8'h12, 8'h23, 8'h34, 8'h45, 8'h56, 8'h67, 8'h78};
    load(k);
    pt = pack(le32(32'h02132435), le32(32'h46576879), le32(32'h8a9bacbd), le32(32'hcedfe0f1));
    ct = pack(le32(32'h524e192f), le32(32'h4715c623), le32(32'h1f51f636), le32(32'h7ea43f18));
    send(ALG_RC6, 1'b0, pt, res);
    expect_eq(res, ct, "RC6 KAT2 encrypt");
    send(ALG_RC6, 1'b1, ct, res);
    expect_eq(res, pt, "RC6 KAT2 decrypt");

    for (int n = 0; n < 8; n++) begin
      a = word_t'($urandom); b = word_t'($urandom);
      c = word_t'($urandom); d = word_t'($urandom);
      pt = pack(a, b, c, d);
      send(ALG_RC6, 1'b0, pt, res);
      rc6_enc(W6, R6, s6, a, b, c, d);
      expect_eq(res, pack(a, b, c, d), "RC6-32/20 random encrypt");
      a = word_t'($urandom); b = word_t'($urandom);
      pt = 128'({b[31:0], a[31:0]});
      send(ALG_RC5, 1'b0, pt, res);
      rc5_enc(W5, R5, s5, a, b);
      expect_eq(res, 128'({b[31:0], a[31:0]}), "RC5-32/20 random encrypt");
      send(ALG_RC5, 1'b1, res, res);
      expect_eq(res, pt, "RC5-32/20 random decrypt");
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
