// rdp_ctrl: invocation controller of the RDP accelerator.
//
// The host starts one invocation with the number of input lines C it will
// stream (one line per loop iteration of the off-loaded loop body). The
// controller clears both streaming controllers, lets the input controller
// inject exactly C lines, and reports done when the output controller has
// written the C-th result line to memory.
//
// It also owns the global stall: the array advances (adv) unless its last
// row holds a result line that the output controller has no buffer for.
// Per invocation it counts the terms of the source's execution-time model:
//   cyc_total  clocks from start to done
//   cyc_inject clocks on which a line entered the array
//   cyc_in_st  clocks on which a line was due but not yet in a buffer
//   cyc_out_st clocks on which the array was frozen by the output side
// Without stalls cyc_total is C + ROWS - 1 plus the fixed latency of the
// two controllers. The counters and handshake are this design's choice.
module rdp_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] num_lines,
  input  logic        in_line_valid,   // smac_in has a complete line
  input  logic        arr_out_valid,   // last array row holds a line
  input  logic        out_space,       // smac_out can take a line
  input  logic        out_line_done,   // smac_out wrote a line's last word
  output logic        clear,           // empties the streaming controllers
  output logic        adv,             // array enable
  output logic        take,            // inject a line into the array
  output logic        busy,
  output logic        done,
  output logic [31:0] cyc_total,
  output logic [31:0] cyc_inject,
  output logic [31:0] cyc_in_st,
  output logic [31:0] cyc_out_st
);

  logic [31:0] issued_q, retired_q, total_q;
  logic        due;

  assign clear = start && !busy;
  assign adv   = !(arr_out_valid && !out_space);
  assign due   = busy && (issued_q < total_q);
  assign take  = due && adv && in_line_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      issued_q   <= '0;
      retired_q  <= '0;
      total_q    <= '0;
      cyc_total  <= '0;
      cyc_inject <= '0;
      cyc_in_st  <= '0;
      cyc_out_st <= '0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        busy       <= (num_lines != '0);
        done       <= (num_lines == '0);
        total_q    <= num_lines;
        issued_q   <= '0;
        retired_q  <= '0;
        cyc_total  <= '0;
        cyc_inject <= '0;
        cyc_in_st  <= '0;
        cyc_out_st <= '0;
      end else if (busy) begin
        cyc_total <= cyc_total + 32'd1;
        if (take) begin
          issued_q   <= issued_q + 32'd1;
          cyc_inject <= cyc_inject + 32'd1;
        end
        if (due && adv && !in_line_valid) cyc_in_st <= cyc_in_st + 32'd1;
        if (!adv) cyc_out_st <= cyc_out_st + 32'd1;
        if (out_line_done) begin
          retired_q <= retired_q + 32'd1;
          if (retired_q + 32'd1 == total_q) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // no more lines leave than were injected
  a_retire: assert property (@(posedge clk) disable iff (!rst_n)
                             out_line_done |-> retired_q < issued_q);

endmodule
