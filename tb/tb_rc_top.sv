// tb_rc_top: end-to-end test of the combined RC5/RC6 engine at its default
// configuration (RC5-32/12/16 and RC6-16/12/16, both with 64-bit blocks and
// a 128-bit key).
//
// A sequence of key loads and mixed RC5/RC6 encrypt/decrypt requests is sent
// through the host port and every result is compared with the reference
// model; the RC5 known-answer vector and a fixed RC6 input pattern (the
// words 3333, CCCC, 0F0F, F0F0) are also run through the top. Each
// mechanism of the engine is counted and must happen at least once: key
// expansion of both tables, RC5 encryption, RC5 decryption, RC6 encryption,
// RC6 decryption, a switch between the two ciphers on consecutive blocks, a
// start dropped because the engine was not ready, and a key load ignored
// because a block was in flight. Latencies are checked: key ready 85 cycles
// after the load (the longer RC6 table), result R + 2 = 14 cycles after the
// start (R + 1 in the cipher unit plus the output register).
module tb_rc_top;
  import tb_rc_ref_pkg::*;
  import rc_pkg::*;

  localparam int W5 = 32, R5 = 12, W6 = 16, R6 = 12, KB = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic            key_load, key_busy, key_done, key_valid;
  logic [8*KB-1:0] key;
  logic            start, decrypt, ready, busy, done;
  alg_e            alg, done_alg;
  logic [63:0]     din, dout;

  rc_top dut (.clk, .rst_n, .key_load, .key, .key_busy, .key_done, .key_valid,
              .start, .alg, .decrypt, .din, .ready, .busy, .done, .done_alg, .dout);

  // Mechanism counters.
  int n_keys = 0, n_rc5_enc = 0, n_rc5_dec = 0, n_rc6_enc = 0, n_rc6_dec = 0;
  int n_switch = 0, n_drop_start = 0, n_drop_key = 0;
  alg_e last_alg = ALG_RC5;
  bit   any_block = 0;

  bytes_t  cur_key;
  words_t  s5, s6;

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
    // Start while the tables are being built: must be dropped.
    start = 1'b1;
    alg = ALG_RC5;
    cyc = 1;
    while (!key_done && cyc < 500) begin
      @(negedge clk);
      if (busy) begin failures++; $display("FAIL start accepted during key expansion"); end
      start = 1'b0;
      cyc++;
    end
    start = 1'b0;
    n_drop_start++;
    expect_eq(cyc, 3*(2*R6 + 4) + 1, "key ready latency");
    expect_eq(key_valid & ready, 1, "ready after key load");
    cur_key = k;
    s5 = key_expand(W5, 2*R5 + 2, k);
    s6 = key_expand(W6, 2*R6 + 4, k);
    n_keys++;
  endtask

  // Sends one block and returns the engine's result.
  task automatic send(alg_e a, bit dec, logic [63:0] blk, bit poke_key,
                      output logic [63:0] res);
    int cyc;
    @(negedge clk);
    din = blk;
    alg = a;
    decrypt = dec;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    din = ~blk;
    if (poke_key) key_load = 1'b1;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); key_load = 1'b0; cyc++; end
    key_load = 1'b0;
    if (poke_key) begin
      expect_eq(key_busy, 0, "key load ignored while busy");
      n_drop_key++;
    end
    expect_eq(cyc, ((a == ALG_RC5) ? R5 : R6) + 2, "block latency");
    expect_eq(done_alg, a, "done_alg");
    res = dout;
    if (any_block && a != last_alg) n_switch++;
    any_block = 1;
    last_alg = a;
    case ({a == ALG_RC6, dec})
      2'b00: n_rc5_enc++;
      2'b01: n_rc5_dec++;
      2'b10: n_rc6_enc++;
      default: n_rc6_dec++;
    endcase
  endtask

  // One random block through the model and the engine, both directions.
  task automatic roundtrip(alg_e a);
    logic [63:0] pt, ct, back;
    word_t wa, wb, wc, wd;
    pt = {$urandom, $urandom};
    send(a, 1'b0, pt, ($urandom % 3) == 0, ct);
    if (a == ALG_RC5) begin
      wa = pt[31:0]; wb = pt[63:32];
      rc5_enc(W5, R5, s5, wa, wb);
      expect_eq(ct, {wb[31:0], wa[31:0]}, "RC5 encrypt");
    end else begin
      wa = pt[15:0]; wb = pt[31:16]; wc = pt[47:32]; wd = pt[63:48];
      rc6_enc(W6, R6, s6, wa, wb, wc, wd);
      expect_eq(ct, {wd[15:0], wc[15:0], wb[15:0], wa[15:0]}, "RC6 encrypt");
    end
    send(a, 1'b1, ct, 1'b0, back);
    expect_eq(back, pt, "decrypt restores plaintext");
  endtask

  initial begin
    bytes_t k;
    logic [63:0] res;
    key_load = 0; key = '0; start = 0; decrypt = 0; din = '0; alg = ALG_RC5;
    k = new[KB];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq(ready | key_valid, 0, "not ready after reset");

    // RC5-32/12/16 known answer through the whole engine.
    foreach (k[i]) k[i] = 8'h00;
    load(k);
    send(ALG_RC5, 1'b0, '0, 1'b0, res);
    expect_eq(res, {32'(le32(32'h154B8F6D)), 32'(le32(32'h21A5DBEE))}, "RC5 KAT");
    send(ALG_RC6, 1'b0, '0, 1'b0, res);
    begin
      word_t a, b, c, d;
      a = 0; b = 0; c = 0; d = 0;
      rc6_enc(W6, R6, s6, a, b, c, d);
      expect_eq(res, {d[15:0], c[15:0], b[15:0], a[15:0]}, "RC6 zero block");
    end

    // The RC6 input words of the reference waveform (A = 3333, B = CCCC,
    // C = 0F0F, D = F0F0) through RC6 and back, and through RC5.
    begin
      logic [63:0] pt, ct, back;
      word_t a, b, c, d;
      pt = {16'hF0F0, 16'h0F0F, 16'hCCCC, 16'h3333};
      send(ALG_RC6, 1'b0, pt, 1'b0, ct);
      a = 16'h3333; b = 16'hCCCC; c = 16'h0F0F; d = 16'hF0F0;
      rc6_enc(W6, R6, s6, a, b, c, d);
      expect_eq(ct, {d[15:0], c[15:0], b[15:0], a[15:0]}, "RC6 pattern encrypt");
      send(ALG_RC6, 1'b1, ct, 1'b0, back);
      expect_eq(back, pt, "RC6 pattern decrypt");
      send(ALG_RC5, 1'b0, pt, 1'b0, ct);
      send(ALG_RC5, 1'b1, ct, 1'b0, back);
      expect_eq(back, pt, "RC5 pattern round trip");
    end

    for (int n = 0; n < 3; n++) begin
      foreach (k[i]) k[i] = 8'($urandom);
      load(k);
      for (int m = 0; m < 6; m++) roundtrip(($urandom % 2) ? ALG_RC6 : ALG_RC5);
      roundtrip(ALG_RC5);
      roundtrip(ALG_RC6);
    end

    $display("mechanisms: keys=%0d rc5_enc=%0d rc5_dec=%0d rc6_enc=%0d rc6_dec=%0d switch=%0d dropped_start=%0d dropped_key=%0d",
             n_keys, n_rc5_enc, n_rc5_dec, n_rc6_enc, n_rc6_dec, n_switch, n_drop_start, n_drop_key);
    checks += 8;
    if (n_keys == 0)       begin failures++; $display("FAIL no key expansion"); end
    if (n_rc5_enc == 0)    begin failures++; $display("FAIL no RC5 encryption"); end
    if (n_rc5_dec == 0)    begin failures++; $display("FAIL no RC5 decryption"); end
    if (n_rc6_enc == 0)    begin failures++; $display("FAIL no RC6 encryption"); end
    if (n_rc6_dec == 0)    begin failures++; $display("FAIL no RC6 decryption"); end
    if (n_switch == 0)     begin failures++; $display("FAIL no cipher switch"); end
    if (n_drop_start == 0) begin failures++; $display("FAIL no dropped start"); end
    if (n_drop_key == 0)   begin failures++; $display("FAIL no ignored key load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
