// smac_in: input streaming memory access controller (SMAC).
//
// Turns NPORT word streams from main memory into input lines for the PE
// array. A line holds n_in words (the data-flow graph's inputs); port p
// delivers slots p, p+NPORT, p+2*NPORT, ... of each line, in order. Two line
// buffers are used alternately (double buffering): while the array takes the
// complete line of one buffer, the ports fill the other. A port is held
// (mem_ready low) only when both buffers are full, and the array sees no line
// (line_valid low) while no buffer is complete, which is the memory stall of
// the execution time model. Slots at and above n_in read as +0.
//
// The source gives two input ports and double buffering; the slot order, the
// valid/ready handshake and the one-word-per-beat ports are this design's
// choice. clear empties both buffers at the start of an invocation.
// Timing: a line whose last word arrives on clock t is offered from t+1.
module smac_in
  import rdp_pkg::*;
#(
  parameter int unsigned NSLOT = 22,
  parameter int unsigned NPORT = 2,
  localparam int unsigned CW   = $clog2(NSLOT + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [CW-1:0] n_in,
  input  logic          mem_valid [NPORT],
  input  word_t         mem_data  [NPORT],
  output logic          mem_ready [NPORT],
  output logic          line_valid,
  output word_t         line      [NSLOT],
  input  logic          line_take
);

  word_t         buf_q  [2][NSLOT];
  logic          full_q [2];
  logic          wr_sel, rd_sel;
  logic [CW-1:0] cnt_q  [NPORT];
  logic [CW-1:0] quota  [NPORT];
  logic [CW-1:0] cnt_n  [NPORT];
  logic          fire   [NPORT];
  logic          done;

  always_comb begin
    done = 1'b1;
    for (int p = 0; p < NPORT; p++) begin
      quota[p]     = (n_in > CW'(p)) ? CW'((n_in - CW'(p) + CW'(NPORT - 1)) / CW'(NPORT)) : '0;
      mem_ready[p] = !full_q[wr_sel] && (cnt_q[p] < quota[p]);
      fire[p]      = mem_ready[p] && mem_valid[p];
      cnt_n[p]     = cnt_q[p] + CW'(fire[p]);
      if (cnt_n[p] != quota[p]) done = 1'b0;
    end
    // a line with no words is never complete
    if (n_in == '0) done = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= '{default: 1'b0};
      wr_sel <= 1'b0;
      rd_sel <= 1'b0;
      cnt_q  <= '{default: '0};
      for (int i = 0; i < 2; i++)
        for (int s = 0; s < NSLOT; s++) buf_q[i][s] <= '0;
    end else if (clear) begin
      full_q <= '{default: 1'b0};
      wr_sel <= 1'b0;
      rd_sel <= 1'b0;
      cnt_q  <= '{default: '0};
      for (int i = 0; i < 2; i++)
        for (int s = 0; s < NSLOT; s++) buf_q[i][s] <= '0;
    end else begin
      for (int p = 0; p < NPORT; p++) begin
        if (fire[p]) buf_q[wr_sel][int'(cnt_q[p]) * NPORT + p] <= mem_data[p];
      end
      if (done && !full_q[wr_sel]) begin
        full_q[wr_sel] <= 1'b1;
        wr_sel         <= !wr_sel;
        cnt_q          <= '{default: '0};
      end else begin
        cnt_q <= cnt_n;
      end
      if (line_take && full_q[rd_sel]) begin
        full_q[rd_sel] <= 1'b0;
        rd_sel         <= !rd_sel;
      end
    end
  end

  always_comb begin
    line_valid = full_q[rd_sel];
    for (int s = 0; s < NSLOT; s++) line[s] = (CW'(s) < n_in) ? buf_q[rd_sel][s] : '0;
  end

  // the array only takes a line that is offered
  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 line_take |-> line_valid);

endmodule
