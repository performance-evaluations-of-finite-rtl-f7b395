// tb_sfq_rdp_top: end-to-end test of the accelerator at its default size
// (15 rows of 22 PEs, two memory read ports, one write port).
//
// A host model writes a configuration through the configuration port and
// starts invocations; a memory model streams input lines on the two read
// ports and collects the result words from the write port. Workloads:
//   1. 2D-Heat: one time step on a 12 x 12 grid (16 blocks of 3 x 3 outputs,
//      one input line of 21 values per block), results checked point by
//      point against the stencil computed with the reference arithmetic.
//   2. Reconfiguration to 2D-FDTD (a write during the run must be rejected),
//      one update of an 8 x 8 field (16 blocks of 2 x 2), checked likewise.
//   Both are run twice: with randomly throttled memory, and with memory
//   always ready, where the run time must be set by the number of memory
//   beats per line (the bandwidth-bound regime).
//   3. A minimal pipe (2 words in, 1 out, PASS PEs) with memory always ready:
//      the invocation must end C + ROWS - 1 clocks after its first line plus
//      the fixed latency of the two controllers (3 clocks: one to fill the
//      first line, two through the output buffer and write port).
// Memory ports are throttled at random in runs 1 and 2, so input stalls,
// output back-pressure (array frozen) and both input buffers full must each
// occur; every mechanism is counted and one that never happens fails.
module tb_sfq_rdp_top;
  import rdp_pkg::*;
  import fp_ref_pkg::*;
  import rdp_map_pkg::*;

  localparam int ROWS = 15, COLS = 22, NP = 2;
  localparam int OB = 2 * ROWS * COLS;

  logic        clk = 0, rst_n = 0;
  logic        cfg_we = 0, cfg_err, start = 0, busy, done;
  logic [15:0] cfg_addr = '0;
  word_t       cfg_wdata = '0;
  logic [31:0] num_lines = '0, cyc_total, cyc_inject, cyc_in_st, cyc_out_st;
  logic        mem_in_valid [NP];
  word_t       mem_in_data  [NP];
  logic        mem_in_ready [NP];
  logic        mem_out_valid, mem_out_ready;
  word_t       mem_out_data;

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_stall = 0, n_dbuf_full = 0, n_reconfig = 0, n_cfg_reject = 0, n_line_per_clk = 0, n_bw_bound = 0;

  // memory model state
  word_t lines [$][];      // input lines of the current invocation
  word_t results [$];      // words written by the accelerator
  int    sent [NP];
  int    n_in_cur;
  int    in_rate, out_rate; // percent of clocks a port is active

  always #5 clk = ~clk;

  sfq_rdp_top dut (.*);

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

  // read ports: port p streams slots p, p+NP, ... of each line in turn
  for (genvar p = 0; p < NP; p++) begin : g_rd
    always_comb begin
      int q, l, k;
      q = (n_in_cur > p) ? (n_in_cur - p + NP - 1) / NP : 1;
      l = sent[p] / q;
      k = sent[p] % q;
      mem_in_data[p] = (l < lines.size() && n_in_cur > p) ? lines[l][k * NP + p] : '0;
    end
    always @(negedge clk) mem_in_valid[p] <= busy && (sent[p] / ((n_in_cur - p + NP - 1) / NP) < lines.size())
                                             && (($urandom % 100) < 32'(in_rate));
    always @(posedge clk) if (mem_in_valid[p] && mem_in_ready[p]) sent[p] <= sent[p] + 1;
  end

  always @(negedge clk) mem_out_ready <= ($urandom % 100) < 32'(out_rate);
  always @(posedge clk) if (mem_out_valid && mem_out_ready) results.push_back(mem_out_data);

  // mechanism monitors
  always @(posedge clk) if (busy) begin
    if (dut.u_ctrl.due && dut.adv && !dut.in_line_valid) n_in_stall++;
    if (!dut.adv) n_out_stall++;
    if (dut.u_smac_in.full_q[0] && dut.u_smac_in.full_q[1]) n_dbuf_full++;
  end

  task automatic wr(input int addr, input word_t d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 16'(addr); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic configure(rdp_dfg g);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        pe_cfg_t k;
        k = g.cfg[r][c];
        wr(2 * (r * COLS + c), {18'd0, k.b_const, k.sel_b, k.sel_a, k.op});
        wr(2 * (r * COLS + c) + 1, k.konst);
      end
    foreach (g.osel[j]) wr(OB + j, 32'(g.osel[j]));
    wr(OB + COLS, 32'(g.n_in));
    wr(OB + COLS + 1, 32'(g.outs.size()));
    n_reconfig++;
  endtask

  // runs one invocation over the queued lines; returns clocks start..done
  task automatic invoke(output int clocks, input bit poke_cfg);
    int t0;
    @(negedge clk);
    foreach (sent[p]) sent[p] = 0;
    results.delete();
    num_lines = 32'(lines.size());
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = $time;
    if (poke_cfg) begin
      wr(0, 32'h0);   // must be ignored: an invocation is running
      n_cfg_reject += cfg_err;
    end
    while (!done) @(negedge clk);
    clocks = ($time - t0) / 10;
  endtask

  // With memory always ready the line rate is set by the busier port:
  // ceil(n_in / 2) read beats or n_out write beats per line. The invocation
  // then lasts C lines at that interval plus the pipeline depth and the
  // controller latency; allow a few clocks for buffer start-up.
  task automatic check_rate(input string nm, input int clocks, input int nin, input int nout);
    int beats, lo, hi;
    beats = ((nin + NP - 1) / NP > nout) ? (nin + NP - 1) / NP : nout;
    lo = lines.size() * beats;
    hi = lines.size() * beats + ROWS + 2 * beats + 4;
    checks++;
    if (clocks < lo || clocks > hi) fail($sformatf("%s: %0d clocks, expected %0d..%0d", nm, clocks, lo, hi));
    else n_bw_bound++;
    $display("%s at full memory rate: %0d clocks for %0d lines (%0d beats per line)", nm, clocks, lines.size(), beats);
  endtask

  // ---- 2D heat on an N x N interior with a fixed border --------------------
  task automatic heat_run(input int irate, input int orate);
    localparam int N = 12;
    word_t  c0, c1, c2, fgrid [N+2][N+2];
    rdp_dfg g;
    int     clocks;
    c0 = 32'h3E80_0000; c1 = 32'h3E4C_CCCD; c2 = 32'h3E19_999A;
    g = heat2d(c0, c1, c2);
    if (!g.map(ROWS, COLS)) fail("heat does not map");
    configure(g);
    foreach (fgrid[i, j]) fgrid[i][j] = rnd_f(120, 135);
    lines.delete();
    for (int bi = 0; bi < N / 3; bi++)
      for (int bj = 0; bj < N / 3; bj++) begin
        word_t x [];
        int    k;
        x = new[g.n_in];
        k = 0;
        // window rows/cols a,b = 0..4 map to grid 3*bi+a, 3*bj+b (border offset 0)
        for (int a = 0; a < 5; a++)
          for (int b = 0; b < 5; b++)
            if (!((a == 0 || a == 4) && (b == 0 || b == 4))) x[k++] = fgrid[3*bi + a][3*bj + b];
        lines.push_back(x);
      end
    n_in_cur = g.n_in;
    in_rate = irate; out_rate = orate;
    invoke(clocks, 0);
    if (irate == 100 && orate == 100) check_rate("2D-Heat", clocks, g.n_in, 9);
    checks++;
    if (results.size() != lines.size() * 9) fail($sformatf("heat: %0d words", results.size()));
    for (int bi = 0; bi < N / 3; bi++)
      for (int bj = 0; bj < N / 3; bj++)
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            int gi, gj;
            word_t e, got;
            gi = 3*bi + 1 + i; gj = 3*bj + 1 + j;
            e = fadd(fadd(fmul(fadd(fgrid[gi-1][gj], fgrid[gi+1][gj]), c0),
                          fmul(fadd(fgrid[gi][gj-1], fgrid[gi][gj+1]), c1)),
                     fmul(fgrid[gi][gj], c2));
            got = results[(bi * (N / 3) + bj) * 9 + i * 3 + j];
            checks++;
            if (got !== e) fail($sformatf("heat f(%0d,%0d) = %h, expected %h", gi, gj, got, e));
          end
    $display("2D-Heat: %0d lines, %0d clocks (inject %0d, input stall %0d, output stall %0d)",
             lines.size(), clocks, cyc_inject, cyc_in_st, cyc_out_st);
  endtask

  // ---- 2D FDTD on an N x N field -----------------------------------------
  task automatic fdtd_run(input int irate, input int orate);
    localparam int N = 8;
    word_t  cx, cy, czx, czy;
    // index offset 1 so that -1 and N are inside the arrays
    word_t  hx [N+2][N+2], hy [N+2][N+2], ez [N+2][N+2];
    rdp_dfg g;
    int     clocks;
    cx = 32'h3F00_0000; cy = 32'h3EAA_AAAB; czx = 32'h3E99_999A; czy = 32'h3F40_0000;
    g = fdtd2d(cx, cy, czx, czy);
    if (!g.map(ROWS, COLS)) fail("fdtd does not map");
    configure(g);
    foreach (hx[i, j]) begin
      hx[i][j] = rnd_f(118, 130); hy[i][j] = rnd_f(118, 130); ez[i][j] = rnd_f(118, 130);
    end
    lines.delete();
    for (int bi = 0; bi < N / 2; bi++)
      for (int bj = 0; bj < N / 2; bj++) begin
        word_t x [];
        int    i0, j0, k;
        i0 = 1 + 2*bi; j0 = 1 + 2*bj;
        x = new[g.n_in];
        k = 0;
        for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) x[k++] = hx[i0+i][j0+j];
        for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) x[k++] = hy[i0+i][j0+j];
        for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) x[k++] = ez[i0+i][j0+j];
        for (int i = 0; i < 2; i++) x[k++] = ez[i0+i][j0-1];
        for (int j = 0; j < 2; j++) x[k++] = ez[i0-1][j0+j];
        for (int j = 0; j < 2; j++) x[k++] = hy[i0+2][j0+j];
        for (int i = 0; i < 2; i++) x[k++] = hx[i0+i][j0+2];
        lines.push_back(x);
      end
    n_in_cur = g.n_in;
    in_rate = irate; out_rate = orate;
    invoke(clocks, irate != 100);
    if (irate == 100 && orate == 100) check_rate("2D-FDTD", clocks, g.n_in, 12);
    checks++;
    if (results.size() != lines.size() * 12) fail($sformatf("fdtd: %0d words", results.size()));
    for (int bi = 0; bi < N / 2; bi++)
      for (int bj = 0; bj < N / 2; bj++) begin
        word_t hxn [2][3], hyn [3][2];
        int    i0, j0, base;
        i0 = 1 + 2*bi; j0 = 1 + 2*bj;
        base = (bi * (N / 2) + bj) * 12;
        for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
          hxn[i][j] = fadd(hx[i0+i][j0+j], fmul(fsub(ez[i0+i][j0+j], ez[i0+i][j0+j-1]), cx));
          hyn[i][j] = fsub(hy[i0+i][j0+j], fmul(fsub(ez[i0+i][j0+j], ez[i0+i-1][j0+j]), cy));
        end
        for (int i = 0; i < 2; i++) hxn[i][2] = hx[i0+i][j0+2];
        for (int j = 0; j < 2; j++) hyn[2][j] = hy[i0+2][j0+j];
        for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
          word_t e;
          checks += 3;
          if (results[base + i*2 + j] !== hxn[i][j]) fail($sformatf("Hx(%0d,%0d)", i0+i, j0+j));
          if (results[base + 4 + i*2 + j] !== hyn[i][j]) fail($sformatf("Hy(%0d,%0d)", i0+i, j0+j));
          e = fadd(fsub(ez[i0+i][j0+j], fmul(fsub(hyn[i+1][j], hyn[i][j]), czx)),
                   fmul(fsub(hxn[i][j+1], hxn[i][j]), czy));
          if (results[base + 8 + i*2 + j] !== e)
            fail($sformatf("Ez(%0d,%0d) = %h, expected %h", i0+i, j0+j, results[base + 8 + i*2 + j], e));
        end
      end
    $display("2D-FDTD: %0d lines, %0d clocks (inject %0d, input stall %0d, output stall %0d)",
             lines.size(), clocks, cyc_inject, cyc_in_st, cyc_out_st);
  endtask

  // ---- minimal pipe: C + H - 1 -------------------------------------------
  task automatic pipe_run();
    localparam int C = 50;
    int clocks;
    // slot 0 and 1 in, sum carried down column 0, one word out
    wr(0, {18'd0, 1'b0, 5'd1, 5'd0, OP_ADD});
    for (int r = 1; r < ROWS; r++) wr(2 * (r * COLS), {18'd0, 1'b0, 5'd0, 5'd0, OP_PASS});
    wr(OB, 32'd0);
    wr(OB + COLS, 32'd2);
    wr(OB + COLS + 1, 32'd1);
    n_reconfig++;
    lines.delete();
    for (int l = 0; l < C; l++) begin
      word_t x [];
      x = new[2];
      x[0] = rnd_f(120, 130); x[1] = rnd_f(120, 130);
      lines.push_back(x);
    end
    n_in_cur = 2;
    in_rate = 100; out_rate = 100;
    invoke(clocks, 0);
    checks++;
    if (results.size() != C) fail("pipe: word count");
    foreach (results[l]) begin
      checks++;
      if (results[l] !== fadd(lines[l][0], lines[l][1])) fail($sformatf("pipe line %0d", l));
    end
    checks++;
    // the only stall is the clock that fills the first line
    if (cyc_in_st != 1 || cyc_out_st != 0)
      fail($sformatf("pipe: stalls %0d/%0d with memory always ready", cyc_in_st, cyc_out_st));
    checks++;
    if (clocks != C + ROWS - 1 + 3)
      fail($sformatf("pipe: %0d clocks, expected C+H-1+3 = %0d", clocks, C + ROWS - 1 + 3));
    else n_line_per_clk++;
    $display("pipe: %0d lines in %0d clocks (C+H-1 = %0d, +3 controller latency)", C, clocks, C + ROWS - 1);
  endtask

  initial begin
    foreach (sent[p]) sent[p] = 0;
    n_in_cur = 1; in_rate = 0; out_rate = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    heat_run(70, 15);
    heat_run(100, 100);
    fdtd_run(80, 20);
    fdtd_run(100, 100);
    pipe_run();
    checks += 7;
    if (n_bw_bound != 2)   fail("bandwidth-bound runs");
    if (n_in_stall == 0)   fail("input stall never happened");
    if (n_out_stall == 0)  fail("output back-pressure never happened");
    if (n_dbuf_full == 0)  fail("both input buffers never full");
    if (n_reconfig < 3)    fail("reconfiguration count");
    if (n_cfg_reject == 0) fail("write during a run was not rejected");
    if (n_line_per_clk == 0) fail("one line per clock never reached");
    $display("mechanisms: input stall %0d, output stall %0d, double buffer full %0d, reconfigurations %0d, rejected writes %0d, full-rate runs %0d",
             n_in_stall, n_out_stall, n_dbuf_full, n_reconfig, n_cfg_reject, n_line_per_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
