// rdp_array: the two-dimensional PE array of the reconfigurable data path.
//
// ROWS rows of COLS PEs. Above every PE row sits an operand routing network
// (ORN) that feeds each PE's two operands from the row above; the first ORN
// takes the input line delivered by the input streaming memory access
// controller instead. Below the last row an output ORN picks NOUT results for
// the output controller. There is no path from a row back to an earlier row:
// the mapped data-flow graph is evaluated as a pipeline in which one input
// line enters per clock and each row is one stage, so C lines leave the last
// row after C + ROWS - 1 clocks, the cycle count of the source's execution
// time model.
//
// A valid bit travels with each line so that empty slots (bubbles) can be
// inserted when input data is late. en freezes the whole array (a global
// stall) when the output side cannot accept a line.
//
// ADD_ONLY / MUL_ONLY mark PEs, bit r*COLS+c, that hold only an adder or
// only a multiplier; unmarked PEs hold both. Default: all PEs hold both.
// Timing: in_line/in_valid are sampled on a clock with en high; out_line is
// combinational from the last row's registers, valid when out_valid is high.
module rdp_array
  import rdp_pkg::*;
#(
  parameter int unsigned ROWS  = 15,
  parameter int unsigned COLS  = 22,
  parameter int unsigned NOUT  = 22,
  parameter int unsigned REACH = 31,
  parameter logic [ROWS*COLS-1:0] ADD_ONLY = '0,
  parameter logic [ROWS*COLS-1:0] MUL_ONLY = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             in_valid,
  input  word_t            in_line  [COLS],
  input  pe_cfg_t          pe_cfg   [ROWS][COLS],
  input  logic [SEL_W-1:0] out_sel  [NOUT],
  output logic             out_valid,
  output word_t            out_line [NOUT]
);

  word_t row_q   [ROWS][COLS];   // registered PE outputs of every row
  word_t row_src [ROWS][COLS];   // what the ORN above row r reads
  logic  vld     [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [SEL_W-1:0] sel [2*COLS];
    word_t            opd [2*COLS];

    for (genvar c = 0; c < COLS; c++) begin : g_sel
      assign sel[2*c]     = pe_cfg[r][c].sel_a;
      assign sel[2*c + 1] = pe_cfg[r][c].sel_b;
      if (r == 0) begin : g_first
        assign row_src[r][c] = in_line[c];
      end else begin : g_next
        assign row_src[r][c] = row_q[r-1][c];
      end
    end

    rdp_orn #(.NSRC(COLS), .NDST(2*COLS), .DST_PER_COL(2), .REACH(REACH)) u_orn (
      .src(row_src[r]), .sel(sel), .dst(opd)
    );

    for (genvar c = 0; c < COLS; c++) begin : g_pe
      localparam pe_kind_e K = ADD_ONLY[r*COLS + c] ? KIND_ADD :
                               MUL_ONLY[r*COLS + c] ? KIND_MUL : KIND_ADD_MUL;
      rdp_pe #(.KIND(K)) u_pe (
        .clk(clk), .rst_n(rst_n), .en(en), .cfg(pe_cfg[r][c]),
        .a(opd[2*c]), .b(opd[2*c + 1]), .y(row_q[r][c])
      );
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  vld[r] <= 1'b0;
      else if (en) vld[r] <= (r == 0) ? in_valid : vld[r == 0 ? 0 : r-1];
    end
  end

  rdp_orn #(.NSRC(COLS), .NDST(NOUT), .DST_PER_COL(1), .REACH(31)) u_out_orn (
    .src(row_q[ROWS-1]), .sel(out_sel), .dst(out_line)
  );

  assign out_valid = vld[ROWS-1];

endmodule
