// tb_rc6_encrypt: checks the RC6 encryption datapath.
//
// Two instances run side by side: the default RC6-16/12 (64-bit block) and
// RC6-32/20 (128-bit block), the standard configuration for which published
// known-answer vectors exist; the vectors anchor both the datapath and the
// reference model that then checks the 16-bit instance on random keys and
// blocks. The round-key tables come from the reference key expansion. Also
// checked: latency (done R + 1 cycles after the start cycle) and that a start
// while busy is ignored.
module tb_rc6_encrypt;
  import tb_rc_ref_pkg::*;

  localparam int WS = 16, RS = 12, TS = 2*RS + 4;   // default instance
  localparam int WL = 32, RL = 20, TL = 2*RL + 4;   // standard RC6-32/20

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic            start_s, busy_s, done_s, start_l, busy_l, done_l;
  logic [4*WS-1:0] din_s, dout_s;
  logic [4*WL-1:0] din_l, dout_l;
  logic [WS-1:0]   s_s [TS];
  logic [WL-1:0]   s_l [TL];

  rc6_encrypt dut_s (.clk, .rst_n, .start(start_s), .din(din_s), .s_tab(s_s),
                     .busy(busy_s), .done(done_s), .dout(dout_s));
  rc6_encrypt #(.W(WL), .R(RL)) dut_l (.clk, .rst_n, .start(start_l), .din(din_l), .s_tab(s_l),
                     .busy(busy_l), .done(done_l), .dout(dout_l));

  // Runs one block through the selected instance; returns result and latency.
  task automatic run(bit big, logic [127:0] blk, output logic [127:0] res, output int cyc);
    @(negedge clk);
    if (big) begin din_l = blk; start_l = 1'b1; end
    else       begin din_s = blk[63:0]; start_s = 1'b1; end
    @(negedge clk);
    din_l = ~din_l;
    din_s = ~din_s;
    cyc = 1;
    while (!(big ? done_l : done_s) && cyc < 100) begin
      @(negedge clk);
      start_l = 1'b0;
      start_s = 1'b0;
      cyc++;
    end
    start_l = 1'b0;
    start_s = 1'b0;
    res = big ? dout_l : 128'(dout_s);
  endtask

  function automatic logic [127:0] pack(int w, word_t a, word_t b, word_t c, word_t d);
    return (w == 32) ? {d[31:0], c[31:0], b[31:0], a[31:0]}
                     : 128'({d[15:0], c[15:0], b[15:0], a[15:0]});
  endfunction

  task automatic check(logic [127:0] got, logic [127:0] exp, int cyc, int r, string what);
    checks += 2;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h expected %h", what, got, exp);
    end
    if (cyc != r + 1) begin
      failures++; $display("FAIL %s: latency %0d, expected %0d", what, cyc, r + 1);
    end
  endtask

  initial begin
    bytes_t k;
    words_t s;
    logic [127:0] res;
    word_t a, b, c, d;
    int cyc;
    start_s = 1'b0; start_l = 1'b0; din_s = '0; din_l = '0;
    k = new[16];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Known answer 1: RC6-32/20/16, zero key, zero block.
    foreach (k[i]) k[i] = 8'h00;
    s = key_expand(WL, TL, k);
    foreach (s_l[i]) s_l[i] = WL'(s[i]);
    run(1'b1, '0, res, cyc);
    check(res, pack(32, le32(32'h8fc3a536), le32(32'h56b1f778), le32(32'hc129df4e),
                    le32(32'h9848a41e)), cyc, RL, "KAT1");

    // Known answer 2.
    k = '{8'h01, 8'h23, 8'h45, 8'h67, 8'h89, 8'hab, 8'hcd, 8'hef,
          8'h01, 8'h12, 8'h23, 8'h34, 8'h45, 8'h56, 8'h67, 8'h78};
    s = key_expand(WL, TL, k);
    foreach (s_l[i]) s_l[i] = WL'(s[i]);
    run(1'b1, pack(32, le32(32'h02132435), le32(32'h46576879), le32(32'h8a9bacbd),
                   le32(32'hcedfe0f1)), res, cyc);
    check(res, pack(32, le32(32'h524e192f), le32(32'h4715c623), le32(32'h1f51f636),
                    le32(32'h7ea43f18)), cyc, RL, "KAT2");

    // Random keys and blocks on both instances against the reference model.
    for (int n = 0; n < 40; n++) begin
      bit big;
      int w, r;
      big = (n % 4 == 3);
      w = big ? WL : WS;
      r = big ? RL : RS;
      foreach (k[i]) k[i] = 8'($urandom);
      s = key_expand(w, 2*r + 4, k);
      if (big) foreach (s_l[i]) s_l[i] = WL'(s[i]);
      else       foreach (s_s[i]) s_s[i] = WS'(s[i]);
      a = word_t'($urandom) & wmask(w);
      b = word_t'($urandom) & wmask(w);
      c = word_t'($urandom) & wmask(w);
      d = word_t'($urandom) & wmask(w);
      run(big, pack(w, a, b, c, d), res, cyc);
      rc6_enc(w, r, s, a, b, c, d);
      check(res, pack(w, a, b, c, d), cyc, r, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
