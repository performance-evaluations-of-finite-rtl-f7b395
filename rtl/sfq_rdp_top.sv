// sfq_rdp_top: the reconfigurable data-path (RDP) accelerator.
//
// A host processor off-loads the body of an unrolled loop, turned into a
// data-flow graph, to a ROWS x COLS array of floating-point PEs. The host
// writes the configuration (operation and operand routes of every PE, the
// output routes, the line sizes), then starts an invocation of C lines. The
// input streaming memory access controller (SMAC) assembles each line from
// two memory read streams, the array evaluates the graph as a pipeline with
// one line per clock and no feedback, and the output SMAC writes the results
// back through one memory write stream.
//
//   memory --2 ports--> smac_in --line--> [ORN, PE row] x ROWS --> output ORN
//          <--1 port--- smac_out <--line------------------------------'
//
// Sizes from the source: 22 PEs per row, 15 rows, two input ports and one
// output port, double-buffered I/O. Input and output lines are 22 slots wide
// (one per column), an assumption. The host, main memory and shared bus are
// outside this module; their signals are the ports below.
// Timing: with data always available, C lines finish C + ROWS - 1 clocks
// after the first line enters the array, plus controller latency.
module sfq_rdp_top
  import rdp_pkg::*;
#(
  parameter int unsigned ROWS     = 15,
  parameter int unsigned COLS     = 22,
  parameter int unsigned NPORT_IN = 2,
  parameter int unsigned REACH    = 31,
  localparam int unsigned NIN     = COLS,
  localparam int unsigned NOUT    = COLS
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration port (host)
  input  logic        cfg_we,
  input  logic [15:0] cfg_addr,
  input  word_t       cfg_wdata,
  output logic        cfg_err,
  // invocation (host)
  input  logic        start,
  input  logic [31:0] num_lines,
  output logic        busy,
  output logic        done,
  output logic [31:0] cyc_total,
  output logic [31:0] cyc_inject,
  output logic [31:0] cyc_in_st,
  output logic [31:0] cyc_out_st,
  // memory read streams
  input  logic        mem_in_valid [NPORT_IN],
  input  word_t       mem_in_data  [NPORT_IN],
  output logic        mem_in_ready [NPORT_IN],
  // memory write stream
  output logic        mem_out_valid,
  output word_t       mem_out_data,
  input  logic        mem_out_ready
);

  localparam int unsigned CWI = $clog2(NIN + 1);
  localparam int unsigned CWO = $clog2(NOUT + 1);

  pe_cfg_t          pe_cfg  [ROWS][COLS];
  logic [SEL_W-1:0] out_sel [NOUT];
  logic [CWI-1:0]   n_in;
  logic [CWO-1:0]   n_out;

  logic  clear, adv, take;
  logic  in_line_valid, arr_out_valid, out_space, out_line_done;
  word_t in_line  [NIN];
  word_t out_line [NOUT];

  rdp_cfg #(.ROWS(ROWS), .COLS(COLS), .NOUT(NOUT), .NIN(NIN)) u_cfg (
    .clk, .rst_n, .locked(busy), .cfg_we, .cfg_addr, .cfg_wdata, .cfg_err,
    .pe_cfg, .out_sel, .n_in, .n_out
  );

  rdp_ctrl u_ctrl (
    .clk, .rst_n, .start, .num_lines, .in_line_valid, .arr_out_valid,
    .out_space, .out_line_done, .clear, .adv, .take, .busy, .done,
    .cyc_total, .cyc_inject, .cyc_in_st, .cyc_out_st
  );

  smac_in #(.NSLOT(NIN), .NPORT(NPORT_IN)) u_smac_in (
    .clk, .rst_n, .clear, .n_in,
    .mem_valid(mem_in_valid), .mem_data(mem_in_data), .mem_ready(mem_in_ready),
    .line_valid(in_line_valid), .line(in_line), .line_take(take)
  );

  rdp_array #(.ROWS(ROWS), .COLS(COLS), .NOUT(NOUT), .REACH(REACH)) u_array (
    .clk, .rst_n, .en(adv), .in_valid(take), .in_line, .pe_cfg, .out_sel,
    .out_valid(arr_out_valid), .out_line
  );

  smac_out #(.NSLOT(NOUT)) u_smac_out (
    .clk, .rst_n, .clear, .n_out,
    .line_valid(arr_out_valid), .line(out_line), .line_space(out_space),
    .mem_valid(mem_out_valid), .mem_data(mem_out_data), .mem_ready(mem_out_ready),
    .line_done(out_line_done)
  );

endmodule
