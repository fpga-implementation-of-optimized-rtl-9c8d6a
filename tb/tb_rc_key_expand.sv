// tb_rc_key_expand: checks the round-key table generator against the
// reference key expansion, for the RC5-32/12 table (26 words of 32 bits) and
// for the RC6-16/12 table (28 words of 16 bits), with an all-zero key, an
// all-ones key and random keys. Also checks the latency, 3*max(T,c) + 1
// cycles from start to done, and that start is ignored while busy.
module tb_rc_key_expand;
  import tb_rc_ref_pkg::*;

  localparam int KB = 16;
  localparam int T5 = 26;
  localparam int T6 = 28;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic            start5, start6;
  logic [8*KB-1:0] key;
  logic            busy5, done5, valid5, busy6, done6, valid6;
  logic [31:0]     s5 [T5];
  logic [15:0]     s6 [T6];

  rc_key_expand dut5 (
    .clk, .rst_n, .start(start5), .key, .busy(busy5), .done(done5), .valid(valid5), .s_tab(s5)
  );
  rc_key_expand #(.W(16), .T(T6), .KB(KB)) dut6 (
    .clk, .rst_n, .start(start6), .key, .busy(busy6), .done(done6), .valid(valid6), .s_tab(s6)
  );

  function automatic bytes_t key_bytes(logic [8*KB-1:0] k);
    bytes_t b;
    b = new[KB];
    foreach (b[i]) b[i] = k[8*i +: 8];
    return b;
  endfunction

  task automatic run_one(logic [8*KB-1:0] k);
    words_t ref5, ref6;
    int cyc5, cyc6;
    bit got5, got6;
    ref5 = key_expand(32, T5, key_bytes(k));
    ref6 = key_expand(16, T6, key_bytes(k));
    @(negedge clk);
    key = k;
    start5 = 1'b1;
    start6 = 1'b1;
    @(negedge clk);
    start5 = 1'b0;
    start6 = 1'b0;
    // A second start while busy must not restart the expansion.
    key = ~k;
    start5 = 1'b1;
    @(negedge clk);
    start5 = 1'b0;
    cyc5 = 1; cyc6 = 1; got5 = 0; got6 = 0;
    for (int n = 2; n < 200 && !(got5 && got6); n++) begin
      if (done5 && !got5) begin got5 = 1; cyc5 = n; end
      if (done6 && !got6) begin got6 = 1; cyc6 = n; end
      @(negedge clk);
    end
    checks += 4;
    if (!got5 || cyc5 != 3*T5 + 1) begin
      failures++; $display("FAIL RC5 table latency %0d (expected %0d)", cyc5, 3*T5 + 1);
    end
    if (!got6 || cyc6 != 3*T6 + 1) begin
      failures++; $display("FAIL RC6 table latency %0d (expected %0d)", cyc6, 3*T6 + 1);
    end
    if (!valid5 || busy5) begin failures++; $display("FAIL RC5 valid/busy after done"); end
    if (!valid6 || busy6) begin failures++; $display("FAIL RC6 valid/busy after done"); end
    for (int i = 0; i < T5; i++) begin
      checks++;
      if (word_t'(s5[i]) != ref5[i]) begin
        failures++; $display("FAIL S5[%0d] = %h, expected %h", i, s5[i], ref5[i]);
      end
    end
    for (int i = 0; i < T6; i++) begin
      checks++;
      if (word_t'(s6[i]) != ref6[i]) begin
        failures++; $display("FAIL S6[%0d] = %h, expected %h", i, s6[i], ref6[i]);
      end
    end
  endtask

  initial begin
    start5 = 1'b0;
    start6 = 1'b0;
    key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (valid5 || valid6) begin failures++; $display("FAIL valid after reset"); end
    run_one('0);
    run_one('1);
    for (int n = 0; n < 6; n++) run_one({$urandom, $urandom, $urandom, $urandom});
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
