// tb_fp32_add: checks the binary32 adder/subtractor against the reference
// arithmetic of fp_ref_pkg: random operands of close and distant exponents
// (alignment, cancellation, rounding), and directed cases for zeros,
// infinities, NaN, overflow and flush-to-zero.
module tb_fp32_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  int          checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic chk(input logic [31:0] exp_y, input string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: %h %s %h = %h, expected %h", what, a, sub ? "-" : "+", b, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // random, exponents close together: cancellation and carries
    for (int i = 0; i < 20000; i++) begin
      a = rnd_f(100, 150);
      b = {a[31:30], 6'(a[28:23] + 6'($urandom % 4)), 23'($urandom)};
      b[30:23] = 8'(int'(a[30:23]) + int'($urandom % 5) - 2);
      if ($urandom % 2) b[31] = ~b[31];
      sub = 1'($urandom);
      chk(sub ? fsub(a, b) : fadd(a, b), "close");
    end
    // random, any exponent difference
    for (int i = 0; i < 20000; i++) begin
      a = rnd_f(60, 190);
      b = rnd_f(60, 190);
      sub = 1'($urandom);
      chk(sub ? fsub(a, b) : fadd(a, b), "wide");
    end
    // directed
    sub = 0; a = 32'h3F80_0000; b = 32'h3F80_0000; chk(32'h4000_0000, "1+1");
    sub = 1; a = 32'h3F80_0000; b = 32'h3F80_0000; chk(32'h0000_0000, "1-1");
    sub = 0; a = 32'h3F80_0000; b = 32'h3380_0000; chk(32'h3F80_0000, "tie to even");
    sub = 0; a = 32'h3F80_0001; b = 32'h3380_0000; chk(32'h3F80_0002, "tie up");
    sub = 0; a = 32'h8000_0000; b = 32'h8000_0000; chk(32'h8000_0000, "-0 + -0");
    sub = 0; a = 32'h0000_0000; b = 32'hC040_0000; chk(32'hC040_0000, "0 + x");
    sub = 0; a = 32'h7F80_0000; b = 32'h3F80_0000; chk(32'h7F80_0000, "inf + 1");
    sub = 1; a = 32'h7F80_0000; b = 32'h7F80_0000; chk(32'h7FC0_0000, "inf - inf");
    sub = 0; a = 32'h7FC0_0001; b = 32'h3F80_0000; chk(32'h7FC0_0000, "nan");
    sub = 0; a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; chk(32'h7F80_0000, "overflow");
    sub = 1; a = 32'h0080_0001; b = 32'h0080_0000; chk(32'h0000_0000, "flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
