// rdp_cfg: configuration registers of the RDP array (the "configuration data
// set" of a mapped data-flow graph).
//
// The host writes words through a simple address/data port; the registers
// drive the control inputs of every PE and every ORN switch, and the line
// sizes of the two streaming controllers, directly. Reconfiguration happens
// at run time between invocations: writes while `locked` (an invocation is
// running) are ignored and set the sticky cfg_err flag.
//
// Address map (word addresses), k = r*COLS + c for the PE in row r, column c:
//   2k     : [2:0] op, [7:3] sel_a, [12:8] sel_b, [13] b_const
//   2k+1   : constant (binary32)
//   OB+j   : [4:0] column of the last row routed to output slot j, OB = 2*ROWS*COLS
//   OB+NOUT   : n_in,  words per input line
//   OB+NOUT+1 : n_out, words per output line
// The source states only that PE and ORN control signals are set at run
// time; the map and port are this design's choice. Reset clears every PE to
// NOP. Timing: a write on clock t is in effect from t+1.
module rdp_cfg
  import rdp_pkg::*;
#(
  parameter int unsigned ROWS   = 15,
  parameter int unsigned COLS   = 22,
  parameter int unsigned NOUT   = 22,
  parameter int unsigned NIN    = 22,
  localparam int unsigned CWI   = $clog2(NIN + 1),
  localparam int unsigned CWO   = $clog2(NOUT + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             locked,
  input  logic             cfg_we,
  input  logic [15:0]      cfg_addr,
  input  word_t            cfg_wdata,
  output logic             cfg_err,
  output pe_cfg_t          pe_cfg  [ROWS][COLS],
  output logic [SEL_W-1:0] out_sel [NOUT],
  output logic [CWI-1:0]   n_in,
  output logic [CWO-1:0]   n_out
);

  localparam int unsigned OB = 2 * ROWS * COLS;

  initial begin
    assert (OB + NOUT + 2 <= 65536) else $error("rdp_cfg: address map exceeds 16 bits");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) pe_cfg[r][c] <= PE_CFG_NOP;
      out_sel <= '{default: '0};
      n_in    <= '0;
      n_out   <= '0;
      cfg_err <= 1'b0;
    end else if (cfg_we && locked) begin
      cfg_err <= 1'b1;
    end else if (cfg_we) begin
      if (int'(cfg_addr) < OB) begin
        if (cfg_addr[0] == 1'b0) begin
          pe_cfg[int'(cfg_addr) / (2*COLS)][(int'(cfg_addr) / 2) % COLS].op
              <= pe_op_e'(cfg_wdata[2:0]);
          pe_cfg[int'(cfg_addr) / (2*COLS)][(int'(cfg_addr) / 2) % COLS].sel_a
              <= cfg_wdata[7:3];
          pe_cfg[int'(cfg_addr) / (2*COLS)][(int'(cfg_addr) / 2) % COLS].sel_b
              <= cfg_wdata[12:8];
          pe_cfg[int'(cfg_addr) / (2*COLS)][(int'(cfg_addr) / 2) % COLS].b_const
              <= cfg_wdata[13];
        end else begin
          pe_cfg[int'(cfg_addr) / (2*COLS)][(int'(cfg_addr) / 2) % COLS].konst
              <= cfg_wdata;
        end
      end else if (int'(cfg_addr) < OB + NOUT) begin
        out_sel[int'(cfg_addr) - OB] <= cfg_wdata[SEL_W-1:0];
      end else if (int'(cfg_addr) == OB + NOUT) begin
        n_in <= cfg_wdata[CWI-1:0];
      end else if (int'(cfg_addr) == OB + NOUT + 1) begin
        n_out <= cfg_wdata[CWO-1:0];
      end
    end
  end

endmodule
