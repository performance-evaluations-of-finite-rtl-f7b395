// rdp_pe: one processing element (PE) of the RDP array.
//
// A PE takes two operands routed to it from the row above by the operand
// routing network, applies the operation its configuration word selects and
// registers the result, so every PE row is one pipeline stage and a result
// moves down one row per clock. Besides computing, a PE can transfer a value
// unchanged (PASS) so that data can skip rows. Operand b may instead be the
// coefficient held in the configuration word, which is how the constant
// factors of a stencil (C0, C1, ...) enter the data flow.
//
// KIND fixes which FPU the PE is built with. The source describes PEs that
// each hold an ADD or a MUL floating-point unit, and also says the layout of
// ADD/MUL units is a design result; a PE holding both (KIND_ADD_MUL) is offered
// too and is the array's default. An operation the PE's FPU cannot perform
// gives +0.
//
// Interface: en advances the stage (held during a global stall); cfg is
// static while the array runs. Timing: y is valid one enabled clock after a/b.
module rdp_pe
  import rdp_pkg::*;
#(
  parameter pe_kind_e KIND = KIND_ADD_MUL
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  pe_cfg_t cfg,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  word_t opb, add_y, mul_y, nxt;

  assign opb = cfg.b_const ? cfg.konst : b;

  generate
    if (KIND != KIND_MUL) begin : g_add
      fp32_add u_add (.a(a), .b(opb), .sub(cfg.op == OP_SUB), .y(add_y));
    end else begin : g_noadd
      assign add_y = '0;
    end
    if (KIND != KIND_ADD) begin : g_mul
      fp32_mul u_mul (.a(a), .b(opb), .y(mul_y));
    end else begin : g_nomul
      assign mul_y = '0;
    end
  endgenerate

  always_comb begin
    unique case (cfg.op)
      OP_PASS:        nxt = a;
      OP_ADD, OP_SUB: nxt = add_y;
      OP_MUL:         nxt = mul_y;
      default:        nxt = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= nxt;
  end

endmodule
