// tb_rc6_f: checks the RC6 quadratic round function f(x) = (x(2x+1)) <<< lg w
// for 16-bit words (the default) and 32-bit words, on corner values and
// random inputs, against the reference model.
module tb_rc6_f;
  import tb_rc_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [15:0] x16, y16;
  logic [31:0] x32, y32;

  rc6_f              dut16 (.x(x16), .y(y16));
  rc6_f #(.W(32))    dut32 (.x(x32), .y(y32));

  task automatic try(logic [31:0] v);
    x16 = v[15:0];
    x32 = v;
    #1;
    checks += 2;
    if (word_t'(y16) != rc6_f(16, word_t'(x16))) begin
      failures++; $display("FAIL f16(%h) = %h, expected %h", x16, y16, rc6_f(16, word_t'(x16)));
    end
    if (word_t'(y32) != rc6_f(32, word_t'(x32))) begin
      failures++; $display("FAIL f32(%h) = %h, expected %h", x32, y32, rc6_f(32, word_t'(x32)));
    end
  endtask

  initial begin
    // Hand-worked values: f(1) = 3 <<< lg w; f(2) = 10 <<< lg w.
    x16 = 16'd1; x32 = 32'd1; #1;
    checks += 2;
    if (y16 != 16'h0030)     begin failures++; $display("FAIL f16(1) = %h", y16); end
    if (y32 != 32'h00000060) begin failures++; $display("FAIL f32(1) = %h", y32); end
    x16 = 16'd2; x32 = 32'hFFFFFFFF; #1;
    // f(-1) = -1 * (-1) = 1 mod 2^32, rotated by 5 -> 0x20.
    checks += 2;
    if (y16 != 16'h00A0)     begin failures++; $display("FAIL f16(2) = %h", y16); end
    if (y32 != 32'h00000020) begin failures++; $display("FAIL f32(-1) = %h", y32); end
    try(32'h0); try(32'hFFFF_FFFF); try(32'h8000_8000); try(32'h7FFF_7FFF);
    for (int n = 0; n < 500; n++) try($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
