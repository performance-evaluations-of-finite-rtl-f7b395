// tb_fp32_mul: checks the binary32 multiplier against the reference
// arithmetic of fp_ref_pkg on random operands and on directed cases for
// zeros, infinities, NaN, overflow and flush-to-zero.
module tb_fp32_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int          checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic chk(input logic [31:0] exp_y, input string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h * %h = %h, expected %h", what, a, b, y, exp_y);
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
    for (int i = 0; i < 40000; i++) begin
      a = rnd_f(70, 180);
      b = rnd_f(70, 180);
      chk(fmul(a, b), "random");
    end
    a = 32'h4040_0000; b = 32'h4000_0000; chk(32'h40C0_0000, "3*2");
    a = 32'h8000_0000; b = 32'h4000_0000; chk(32'h8000_0000, "-0*2");
    a = 32'h7F80_0000; b = 32'hC000_0000; chk(32'hFF80_0000, "inf*-2");
    a = 32'h7F80_0000; b = 32'h0000_0000; chk(32'h7FC0_0000, "inf*0");
    a = 32'h7F00_0000; b = 32'h7F00_0000; chk(32'h7F80_0000, "overflow");
    a = 32'h0100_0000; b = 32'h0100_0000; chk(32'h0000_0000, "flush");
    a = 32'h3F80_0001; b = 32'h3F80_0001; chk(32'h3F80_0002, "round");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
