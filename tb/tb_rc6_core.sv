// tb_rc6_core: checks the complete RC6 unit: on-chip key schedule followed by
// encryption and decryption through the shared round-key table.
//
// Two instances: the default RC6-16/12/16 (64-bit block) and the standard
// RC6-32/20/16 (128-bit block). The standard one runs the two published
// known-answer vectors; the default one runs random keys and blocks in both
// directions against the reference model. Checked besides: key-schedule
// latency (3*(2r+4) + 1 cycles), block latency (r + 1 cycles), `ready` low
// and starts dropped before a key is loaded and while a block is in flight.
module tb_rc6_core;
  import tb_rc_ref_pkg::*;

  localparam int WS = 16, RS = 12, WL = 32, RL = 20, KB = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [8*KB-1:0] key;
  logic            decrypt;
  logic [127:0]    din;
  logic            kl_s, kb_s, kd_s, kv_s, st_s, rdy_s, busy_s, done_s;
  logic            kl_l, kb_l, kd_l, kv_l, st_l, rdy_l, busy_l, done_l;
  logic [4*WS-1:0] dout_s;
  logic [4*WL-1:0] dout_l;

  rc6_core dut_s (.clk, .rst_n, .key_load(kl_s), .key, .key_busy(kb_s), .key_done(kd_s),
                  .key_valid(kv_s), .start(st_s), .decrypt, .din(din[4*WS-1:0]),
                  .ready(rdy_s), .busy(busy_s), .done(done_s), .dout(dout_s));
  rc6_core #(.W(WL), .R(RL)) dut_l (.clk, .rst_n, .key_load(kl_l), .key, .key_busy(kb_l),
                  .key_done(kd_l), .key_valid(kv_l), .start(st_l), .decrypt, .din(din),
                  .ready(rdy_l), .busy(busy_l), .done(done_l), .dout(dout_l));

  task automatic expect_eq(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [127:0] pack(int w, word_t a, word_t b, word_t c, word_t d);
    return (w == 32) ? {d[31:0], c[31:0], b[31:0], a[31:0]}
                     : 128'({d[15:0], c[15:0], b[15:0], a[15:0]});
  endfunction

  task automatic load(bit big, bytes_t k);
    int cyc;
    @(negedge clk);
    foreach (k[i]) key[8*i +: 8] = k[i];
    if (big) kl_l = 1'b1; else kl_s = 1'b1;
    @(negedge clk);
    kl_l = 1'b0; kl_s = 1'b0;
    cyc = 1;
    while (!(big ? kd_l : kd_s) && cyc < 500) begin @(negedge clk); cyc++; end
    expect_eq(cyc, 3*(2*(big ? RL : RS) + 4) + 1, "key schedule latency");
    expect_eq(big ? (kv_l & rdy_l) : (kv_s & rdy_s), 1, "ready after key schedule");
  endtask

  task automatic run(bit big, bit dec, logic [127:0] blk, output logic [127:0] res);
    int cyc;
    @(negedge clk);
    din = blk;
    decrypt = dec;
    if (big) st_l = 1'b1; else st_s = 1'b1;
    @(negedge clk);
    expect_eq(big ? rdy_l : rdy_s, 0, "not ready while busy");
    din = ~blk;
    decrypt = ~dec;
    cyc = 1;
    while (!(big ? done_l : done_s) && cyc < 100) begin @(negedge clk); cyc++; end
    st_l = 1'b0; st_s = 1'b0;
    expect_eq(cyc, (big ? RL : RS) + 1, "block latency");
    res = big ? dout_l : 128'(dout_s);
  endtask

  initial begin
    bytes_t k;
    words_t s;
    logic [127:0] res, ct, pt;
    word_t a, b, c, d;
    kl_s = 0; kl_l = 0; st_s = 0; st_l = 0; key = '0; decrypt = 0; din = '0;
    k = new[KB];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq(rdy_s | kv_s | rdy_l | kv_l, 0, "not ready after reset");
    st_s = 1'b1;
    @(negedge clk);
    st_s = 1'b0;
    @(negedge clk);
    expect_eq(busy_s | done_s, 0, "start without key dropped");

    // Standard RC6-32/20/16 known answers.
    foreach (k[i]) k[i] = 8'h00;
    load(1'b1, k);
    run(1'b1, 1'b0, '0, res);
    expect_eq(res, pack(32, le32(32'h8fc3a536), le32(32'h56b1f778), le32(32'hc129df4e),
                        le32(32'h9848a41e)), "KAT1 encrypt");
    run(1'b1, 1'b1, res, res);
    expect_eq(res, '0, "KAT1 decrypt");
    k = '{8'h01, 8'h23, 8'h45, 8'h67, 8'h89, 8'hab, 8'hcd, 8'hef,
          8'h01, 8'h12, 8'h23, 8'h34, 8'h45, 8'h56, 8'h67, 8'h78};
    load(1'b1, k);
    pt = pack(32, le32(32'h02132435), le32(32'h46576879), le32(32'h8a9bacbd), le32(32'hcedfe0f1));
    run(1'b1, 1'b0, pt, res);
    expect_eq(res, pack(32, le32(32'h524e192f), le32(32'h4715c623), le32(32'h1f51f636),
                        le32(32'h7ea43f18)), "KAT2 encrypt");

    // Default RC6-16/12/16 against the reference model.
    for (int n = 0; n < 4; n++) begin
      foreach (k[i]) k[i] = 8'($urandom);
      s = key_expand(WS, 2*RS + 4, k);
      load(1'b0, k);
      for (int m = 0; m < 4; m++) begin
        a = word_t'($urandom) & 16'hFFFF;
        b = word_t'($urandom) & 16'hFFFF;
        c = word_t'($urandom) & 16'hFFFF;
        d = word_t'($urandom) & 16'hFFFF;
        run(1'b0, 1'b0, pack(WS, a, b, c, d), ct);
        rc6_enc(WS, RS, s, a, b, c, d);
        expect_eq(ct, pack(WS, a, b, c, d), "random encrypt");
        run(1'b0, 1'b1, ct, res);
        rc6_dec(WS, RS, s, a, b, c, d);
        expect_eq(res, pack(WS, a, b, c, d), "random decrypt");
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
