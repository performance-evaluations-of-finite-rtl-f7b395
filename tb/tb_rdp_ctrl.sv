// tb_rdp_ctrl: drives the invocation controller with a behavioural model of
// the streaming controllers and a ROWS-deep array (a shift register of valid
// bits) and checks: exactly C lines are taken, done comes after the C-th
// line_done, the array is frozen exactly when its last row holds a line and
// the output has no space, and the stall counters match counts kept here.
// Also checks an invocation of 0 lines and the C + ROWS - 1 clock count
// with no stalls.
module tb_rdp_ctrl;
  localparam int ROWS = 15;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [31:0] num_lines;
  logic        in_line_valid, arr_out_valid, out_space, out_line_done;
  logic        clear, adv, take, busy, done;
  logic [31:0] cyc_total, cyc_inject, cyc_in_st, cyc_out_st;
  logic [ROWS-1:0] pipe;
  int          checks = 0, failures = 0;
  int          n_take, n_done, m_in_st, m_out_st, first_take, last_out, cyc;
  bit          slow;

  always #5 clk = ~clk;

  rdp_ctrl dut (.*);

  assign arr_out_valid = pipe[ROWS-1];

  always @(posedge clk) begin
    cyc++;
    if (!rst_n) pipe <= '0;
    else if (adv) pipe <= {pipe[ROWS-2:0], take};
  end

  task automatic fail(input string m);
    failures++;
    if (failures < 10) $display("FAIL %s", m);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int c, input bit stalls);
    @(negedge clk);
    num_lines = 32'(c); start = 1;
    @(negedge clk);
    start = 0;
    n_take = 0; n_done = 0; m_in_st = 0; m_out_st = 0; first_take = -1; last_out = -1;
    while (busy) begin
      in_line_valid = stalls ? (($urandom % 3) == 0) : 1'b1;
      out_space     = stalls ? (($urandom % 4) != 0) : 1'b1;
      out_line_done = 0;
      #1;
      checks++;
      if (adv !== !(arr_out_valid && !out_space)) fail("adv");
      if (take) begin
        n_take++;
        if (first_take < 0) first_take = cyc;
      end
      if (busy && n_take < c && !take && adv && !in_line_valid) m_in_st++;
      if (!adv) m_out_st++;
      if (arr_out_valid && adv) last_out = cyc;
      // model of the output SMAC: a line is finished some clocks later
      if (arr_out_valid && adv) n_done++;
      out_line_done = (n_done > 0) && (stalls ? ($urandom % 2) == 0 : 1'b1);
      if (out_line_done) n_done--;
      @(negedge clk);
    end
    out_line_done = 0;
    checks += 4;
    if (n_take != c)               fail($sformatf("took %0d of %0d lines", n_take, c));
    if (cyc_in_st != 32'(m_in_st))   fail($sformatf("cyc_in_st %0d vs %0d", cyc_in_st, m_in_st));
    if (cyc_out_st != 32'(m_out_st)) fail($sformatf("cyc_out_st %0d vs %0d", cyc_out_st, m_out_st));
    if (cyc_inject != 32'(c))      fail("cyc_inject");
    if (!stalls) begin
      checks++;
      if (last_out - first_take != c + ROWS - 1)
        fail($sformatf("pipeline clocks %0d, expected C+H-1 = %0d", last_out - first_take, c + ROWS - 1));
    end
  endtask

  initial begin
    in_line_valid = 0; out_space = 1; out_line_done = 0; num_lines = 0; cyc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(100, 0);
    run(57, 1);
    run(1, 0);
    run(300, 1);
    // zero lines: done at once
    @(negedge clk);
    num_lines = 0; start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!done || busy) fail("zero-line invocation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
