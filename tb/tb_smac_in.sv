// tb_smac_in: feeds the input SMAC from two randomly throttled memory
// streams and takes lines with random delays, for several line sizes. Every
// word is tagged with its line and slot, so each offered line is checked
// slot by slot (unused slots must read +0). Also checks that a line is
// offered on the clock after its last word and that both buffers filling up
// holds the memory ports (counted, must happen).
module tb_smac_in;
  import rdp_pkg::*;

  localparam int NSLOT = 22, NPORT = 2, CW = $clog2(NSLOT + 1);
  logic          clk = 0, rst_n = 0, clear = 0;
  logic [CW-1:0] n_in;
  logic          mem_valid [NPORT];
  word_t         mem_data  [NPORT];
  logic          mem_ready [NPORT];
  logic          line_valid, line_take;
  word_t         line [NSLOT];
  int            checks = 0, failures = 0, both_full = 0;
  int            sent [NPORT];
  int            nlines;

  always #5 clk = ~clk;

  smac_in #(.NSLOT(NSLOT), .NPORT(NPORT)) dut (.*);

  function automatic word_t tag(input int l, input int s);
    return word_t'(32'hA000_0000 | (l << 8) | s);
  endfunction

  task automatic fail(input string m);
    failures++;
    if (failures < 10) $display("FAIL %s", m);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory streams: port p sends slots p, p+NPORT, ... of consecutive lines
  for (genvar p = 0; p < NPORT; p++) begin : g_port
    always @(posedge clk) begin
      if (rst_n && !clear && mem_valid[p] && mem_ready[p]) sent[p]++;
    end
    always_comb begin
      int q, l, k;
      q = (int'(n_in) > p) ? (int'(n_in) - p + NPORT - 1) / NPORT : 0;
      l = (q == 0) ? 0 : sent[p] / q;
      k = (q == 0) ? 0 : sent[p] % q;
      mem_data[p] = tag(l, k * NPORT + p);
    end
  end

  initial begin
    int sizes [5] = '{21, 20, 22, 3, 1};
    for (int p = 0; p < NPORT; p++) begin mem_valid[p] = 0; sent[p] = 0; end
    line_take = 0; n_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (sizes[t]) begin
      @(negedge clk);
      n_in = CW'(sizes[t]); clear = 1;
      @(negedge clk);
      clear = 0;
      for (int p = 0; p < NPORT; p++) sent[p] = 0;
      nlines = 0;
      while (nlines < 40) begin
        @(negedge clk);
        for (int p = 0; p < NPORT; p++) mem_valid[p] = ($urandom % 4) != 0;
        // slow consumer in the first half of each run, fast in the second
        line_take = line_valid && (($urandom % (nlines < 20 ? 30 : 2)) == 0);
        if (!mem_ready[0] && !mem_ready[1] && dut.full_q[0] && dut.full_q[1]) both_full++;
        if (line_take) begin
          for (int s = 0; s < NSLOT; s++) begin
            checks++;
            if (line[s] !== (s < sizes[t] ? tag(nlines, s) : word_t'(0)))
              fail($sformatf("n_in=%0d line %0d slot %0d: %h", sizes[t], nlines, s, line[s]));
          end
          nlines++;
        end
      end
      line_take = 0;
    end
    // latency: with an empty controller, a 2-word line is offered the
    // clock after its last word is accepted
    @(negedge clk);
    n_in = CW'(2); clear = 1;
    for (int p = 0; p < NPORT; p++) mem_valid[p] = 0;
    @(negedge clk);
    clear = 0;
    for (int p = 0; p < NPORT; p++) begin sent[p] = 0; mem_valid[p] = 1; end
    @(posedge clk); #1;
    for (int p = 0; p < NPORT; p++) mem_valid[p] = 0;
    checks++;
    if (!line_valid) fail("line not offered one clock after its last word");
    checks++;
    if (both_full == 0) fail("both buffers never full");
    $display("both-buffers-full clocks: %0d", both_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
