// tb_rdp_pe: drives three PEs (adder+multiplier, adder only, multiplier
// only) with random operations and operands, and checks each registered
// result one clock later against fp_ref_pkg, including the constant operand,
// the PASS transfer, NOP, an operation the PE's FPU lacks, and hold while
// en is low.
module tb_rdp_pe;
  import rdp_pkg::*;
  import fp_ref_pkg::*;

  logic    clk = 0, rst_n = 0, en = 0;
  pe_cfg_t cfg;
  word_t   a, b, y_am, y_a, y_m;
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  rdp_pe #(.KIND(KIND_ADD_MUL)) dut_am (.clk, .rst_n, .en, .cfg, .a, .b, .y(y_am));
  rdp_pe #(.KIND(KIND_ADD))     dut_a  (.clk, .rst_n, .en, .cfg, .a, .b, .y(y_a));
  rdp_pe #(.KIND(KIND_MUL))     dut_m  (.clk, .rst_n, .en, .cfg, .a, .b, .y(y_m));

  task automatic chk(input word_t got, input word_t exp_y, input string what);
    checks++;
    if (got !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%s: %h expected %h", what, cfg.op.name(), got, exp_y);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t ob, e_am, e_a, e_m, prev;
    cfg = PE_CFG_NOP; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      cfg.op      = pe_op_e'($urandom % 5);
      cfg.b_const = 1'($urandom);
      cfg.konst   = rnd_f(100, 150);
      a  = rnd_f(100, 150);
      b  = rnd_f(100, 150);
      en = ($urandom % 8) != 0;
      prev = y_am;
      ob = cfg.b_const ? cfg.konst : b;
      case (cfg.op)
        OP_PASS: begin e_am = a;           e_a = a;     e_m = a;     end
        OP_ADD:  begin e_am = fadd(a, ob); e_a = e_am;  e_m = '0;    end
        OP_SUB:  begin e_am = fsub(a, ob); e_a = e_am;  e_m = '0;    end
        OP_MUL:  begin e_am = fmul(a, ob); e_a = '0;    e_m = e_am;  end
        default: begin e_am = '0;          e_a = '0;    e_m = '0;    end
      endcase
      @(posedge clk); #1;
      if (en) begin
        chk(y_am, e_am, "add_mul");
        chk(y_a,  e_a,  "add");
        chk(y_m,  e_m,  "mul");
      end else begin
        chk(y_am, prev, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
