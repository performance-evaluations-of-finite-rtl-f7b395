// tb_rdp_array: maps the 2D-Heat and 2D-FDTD data-flow graphs onto the full
// 15 x 22 array, streams random input lines through it and compares every
// output line with the graph evaluated by the reference arithmetic.
// Per graph: one run with a line on every clock, which must take exactly
// C + ROWS - 1 clocks from the first line in to the last line out, and one
// run with random bubbles and random freezes (en low).
module tb_rdp_array;
  import rdp_pkg::*;
  import fp_ref_pkg::*;
  import rdp_map_pkg::*;

  localparam int ROWS = 15, COLS = 22, NOUT = 22;
  logic             clk = 0, rst_n = 0, en, in_valid, out_valid;
  word_t            in_line  [COLS];
  pe_cfg_t          pe_cfg   [ROWS][COLS];
  logic [SEL_W-1:0] out_sel  [NOUT];
  word_t            out_line [NOUT];
  int               checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  rdp_array #(.ROWS(ROWS), .COLS(COLS), .NOUT(NOUT)) dut (.*);

  task automatic fail(input string m);
    failures++;
    if (failures < 10) $display("FAIL %s", m);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(rdp_dfg g, int nlines, bit stalls);
    word_t x [], y [];
    word_t expq [$][];
    int    sent, got, first, last;
    if (!g.map(ROWS, COLS)) fail({g.name, " does not map"});
    foreach (pe_cfg[r, c]) pe_cfg[r][c] = g.cfg[r][c];
    foreach (out_sel[j]) out_sel[j] = (j < g.osel.size()) ? g.osel[j] : '0;
    sent = 0; got = 0; first = -1; last = -1;
    x = new[COLS];
    while (got < nlines) begin
      @(negedge clk);
      en       = stalls ? ($urandom % 5) != 0 : 1'b1;
      in_valid = (sent < nlines) && (stalls ? ($urandom % 3) != 0 : 1'b1);
      foreach (x[s]) x[s] = (s < g.n_in) ? rnd_f(110, 140) : word_t'($urandom);
      foreach (in_line[s]) in_line[s] = x[s];
      #1;
      if (en && out_valid) begin
        y = expq.pop_front();
        foreach (y[j]) begin
          checks++;
          if (out_line[j] !== y[j])
            fail($sformatf("%s line %0d out %0d: %h expected %h", g.name, got, j, out_line[j], y[j]));
        end
        got++;
        last = cyc;
      end
      if (en && in_valid) begin
        g.eval(x, y);
        expq.push_back(y);
        if (first < 0) first = cyc;
        sent++;
      end
    end
    if (!stalls) begin
      checks++;
      // the last line is in the last row after last - first clock edges
      if (last - first != nlines + ROWS - 1)
        fail($sformatf("%s: %0d clocks for %0d lines, expected C+H-1 = %0d",
                       g.name, last - first, nlines, nlines + ROWS - 1));
    end
    // drain
    en = 1; in_valid = 0;
    repeat (ROWS + 1) @(negedge clk);
    $display("%s: %0d lines checked, %0d rows used", g.name, got, g.rows_used);
  endtask

  initial begin
    rdp_dfg h, f;
    en = 1; in_valid = 0;
    foreach (in_line[s]) in_line[s] = '0;
    foreach (pe_cfg[r, c]) pe_cfg[r][c] = PE_CFG_NOP;
    foreach (out_sel[j]) out_sel[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    h = heat2d(32'h3E80_0000, 32'h3E4C_CCCD, 32'h3DCC_CCCD);
    f = fdtd2d(32'h3F00_0000, 32'h3EAA_AAAB, 32'h3E99_999A, 32'hBF40_0000);
    run(h, 100, 0);
    run(h, 100, 1);
    run(f, 100, 0);
    run(f, 100, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
