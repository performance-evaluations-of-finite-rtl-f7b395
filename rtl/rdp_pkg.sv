// rdp_pkg: types and constants shared by the reconfigurable data-path (RDP)
// accelerator. The array is a grid of processing elements (PEs); every PE
// holds one configuration word (pe_cfg_t) that selects its operation and the
// two operand sources in the row above. Single precision (IEEE 754 binary32)
// is the data format, following the single-precision GFLOPS figures the
// design is evaluated with. Field widths are this design's choice.
package rdp_pkg;

  localparam int unsigned WORD   = 32;  // data word: binary32
  localparam int unsigned SEL_W  = 5;   // operand select: column 0..31
  localparam int unsigned OP_W   = 3;

  typedef logic [WORD-1:0] word_t;

  // PE operation. PASS is the data transfer function that carries a value
  // one row further down without computing on it.
  typedef enum logic [OP_W-1:0] {
    OP_NOP  = 3'd0,  // output +0
    OP_PASS = 3'd1,  // y = a
    OP_ADD  = 3'd2,  // y = a + b
    OP_SUB  = 3'd3,  // y = a - b
    OP_MUL  = 3'd4   // y = a * b
  } pe_op_e;

  // Which FPU a PE is built with.
  typedef enum logic [1:0] {
    KIND_ADD     = 2'd0,  // adder only (ADD, SUB, PASS, NOP)
    KIND_MUL     = 2'd1,  // multiplier only (MUL, PASS, NOP)
    KIND_ADD_MUL = 2'd2   // both, chosen by configuration
  } pe_kind_e;

  typedef struct packed {
    pe_op_e           op;
    logic [SEL_W-1:0] sel_a;    // column of operand a in the row above
    logic [SEL_W-1:0] sel_b;    // column of operand b in the row above
    logic             b_const;  // 1: operand b is the constant below
    word_t            konst;    // coefficient (C0, C1, C_HX, ...)
  } pe_cfg_t;

  localparam pe_cfg_t PE_CFG_NOP = '{op: OP_NOP, sel_a: '0, sel_b: '0,
                                     b_const: 1'b0, konst: '0};

  // Canonical quiet NaN produced for invalid operations.
  localparam word_t QNAN = 32'h7FC0_0000;

endpackage
