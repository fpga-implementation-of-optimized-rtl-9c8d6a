// tb_rc5_encrypt: checks the RC5-32/12 encryption datapath.
//
// The round-key table is computed by the reference key expansion and driven
// straight into the datapath. Checked: the two published RC5-32/12/16
// known-answer vectors, random blocks under random keys against the
// reference model, the latency (done exactly R + 1 = 13 cycles after the start
// cycle) and that a start while busy is ignored.
module tb_rc5_encrypt;
  import tb_rc_ref_pkg::*;

  localparam int W = 32;
  localparam int R = 12;
  localparam int T = 2*R + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic           start, busy, done;
  logic [2*W-1:0] din, dout;
  logic [W-1:0]   s_tab [T];

  rc5_encrypt dut (.clk, .rst_n, .start, .din, .s_tab, .busy, .done, .dout);

  task automatic load_key(bytes_t k);
    words_t s;
    s = key_expand(W, T, k);
    foreach (s_tab[i]) s_tab[i] = W'(s[i]);
  endtask

  task automatic run(logic [2*W-1:0] pt, output logic [2*W-1:0] ct, output int cyc);
    @(negedge clk);
    din = pt;
    start = 1'b1;
    @(negedge clk);
    // Busy now: a second start with other data must be ignored.
    din = ~pt;
    cyc = 1;
    while (!done && cyc < 100) begin
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    start = 1'b0;
    ct = dout;
  endtask

  task automatic check(logic [2*W-1:0] got, logic [2*W-1:0] exp, int cyc, string what);
    checks += 2;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h expected %h", what, got, exp);
    end
    if (cyc != R + 1) begin
      failures++; $display("FAIL %s: latency %0d, expected %0d", what, cyc, R + 1);
    end
  endtask

  initial begin
    bytes_t k;
    logic [2*W-1:0] ct;
    word_t a, b;
    int cyc;
    words_t s;
    start = 1'b0;
    din = '0;
    k = new[16];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Known answer 1: zero key, zero block.
    foreach (k[i]) k[i] = 8'h00;
    load_key(k);
    run('0, ct, cyc);
    check(ct, {W'(le32(32'h154B8F6D)), W'(le32(32'h21A5DBEE))}, cyc, "KAT1");

    // Known answer 2.
    k = '{8'h91, 8'h5F, 8'h46, 8'h19, 8'hBE, 8'h41, 8'hB2, 8'h51,
          8'h63, 8'h55, 8'hA5, 8'h01, 8'h10, 8'hA9, 8'hCE, 8'h91};
    load_key(k);
    run({W'(le32(32'h154B8F6D)), W'(le32(32'h21A5DBEE))}, ct, cyc);
    check(ct, {W'(le32(32'h5B2B8952)), W'(le32(32'hF7C013AC))}, cyc, "KAT2");

    // Random keys and blocks against the reference model.
    for (int n = 0; n < 40; n++) begin
      if (n % 8 == 0) begin
        foreach (k[i]) k[i] = 8'($urandom);
        load_key(k);
      end
      a = word_t'($urandom);
      b = word_t'($urandom);
      s = key_expand(W, T, k);
      din = {W'(b), W'(a)};
      run({W'(b), W'(a)}, ct, cyc);
      rc5_enc(W, R, s, a, b);
      check(ct, {W'(b), W'(a)}, cyc, "random");
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
