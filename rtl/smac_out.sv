// smac_out: output streaming memory access controller (SMAC).
//
// Receives result lines from the last row of the PE array (through the
// output routing network) and writes the first n_out words of each line to
// main memory through one output port, slot 0 first. Two line buffers are
// used alternately (double buffering), so a line can be accepted while the
// previous one is still being written out. line_space is low when both
// buffers are full; a line offered then (line_valid) is not taken and the
// array must hold its last row (global stall).
//
// The source gives one output port and double buffering; the handshake
// (valid/ready, one word per beat), the slot order and line_done (pulses
// when the last word of a line is accepted) are this design's choice.
// Timing: a line written on clock t is offered on mem_valid from t+1.
module smac_out
  import rdp_pkg::*;
#(
  parameter int unsigned NSLOT = 22,
  localparam int unsigned CW   = $clog2(NSLOT + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [CW-1:0] n_out,
  input  logic          line_valid,
  input  word_t         line [NSLOT],
  output logic          line_space,
  output logic          mem_valid,
  output word_t         mem_data,
  input  logic          mem_ready,
  output logic          line_done
);

  word_t         buf_q  [2][NSLOT];
  logic          full_q [2];
  logic          wr_sel, rd_sel;
  logic [CW-1:0] idx_q;
  logic          last;

  assign line_space = !full_q[wr_sel];
  assign mem_valid  = full_q[rd_sel];
  assign mem_data   = buf_q[rd_sel][idx_q];
  assign last       = (idx_q + CW'(1) >= n_out);
  assign line_done  = mem_valid && mem_ready && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= '{default: 1'b0};
      wr_sel <= 1'b0;
      rd_sel <= 1'b0;
      idx_q  <= '0;
      for (int i = 0; i < 2; i++)
        for (int s = 0; s < NSLOT; s++) buf_q[i][s] <= '0;
    end else if (clear) begin
      full_q <= '{default: 1'b0};
      wr_sel <= 1'b0;
      rd_sel <= 1'b0;
      idx_q  <= '0;
    end else begin
      if (line_valid && line_space) begin
        buf_q[wr_sel]  <= line;
        full_q[wr_sel] <= 1'b1;
        wr_sel         <= !wr_sel;
      end
      if (mem_valid && mem_ready) begin
        if (last) begin
          idx_q          <= '0;
          full_q[rd_sel] <= 1'b0;
          rd_sel         <= !rd_sel;
        end else begin
          idx_q <= idx_q + CW'(1);
        end
      end
    end
  end

  // a word offered to memory stays offered, unchanged, until accepted
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || clear)
                           mem_valid && !mem_ready |=> mem_valid && $stable(mem_data));

endmodule
