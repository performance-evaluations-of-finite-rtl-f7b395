// tb_smac_out: offers tagged result lines at random times to the output
// SMAC, drains the memory port with a random ready, and checks that the
// first n_out words of every line come out in slot order, that no line is
// lost when both buffers fill (line_space low, counted, must happen), and
// that line_done pulses once per line.
module tb_smac_out;
  import rdp_pkg::*;

  localparam int NSLOT = 22, CW = $clog2(NSLOT + 1);
  logic          clk = 0, rst_n = 0, clear = 0;
  logic [CW-1:0] n_out;
  logic          line_valid, line_space, mem_valid, mem_ready, line_done;
  word_t         line [NSLOT];
  word_t         mem_data;
  int            checks = 0, failures = 0, no_space = 0;
  int            offered, got_words, got_lines;

  always #5 clk = ~clk;

  smac_out #(.NSLOT(NSLOT)) dut (.*);

  function automatic word_t tag(input int l, input int s);
    return word_t'(32'hB000_0000 | (l << 8) | s);
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

  always_comb for (int s = 0; s < NSLOT; s++) line[s] = tag(offered, s);

  initial begin
    int sizes [4] = '{9, 12, 22, 1};
    bit acc;
    line_valid = 0; mem_ready = 0; n_out = '0; offered = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (sizes[t]) begin
      @(negedge clk);
      n_out = CW'(sizes[t]); clear = 1;
      @(negedge clk);
      clear = 0; offered = 0; got_words = 0; got_lines = 0;
      acc = 0;
      while (got_lines < 30) begin
        @(negedge clk);
        if (acc) offered++;
        line_valid = (offered < 30) && (($urandom % 3) != 0);
        mem_ready  = ($urandom % 3) != 0;
        #1;
        if (line_valid && !line_space) no_space++;
        if (mem_valid && mem_ready) begin
          checks++;
          if (mem_data !== tag(got_words / sizes[t], got_words % sizes[t]))
            fail($sformatf("n_out=%0d word %0d: %h", sizes[t], got_words, mem_data));
          checks++;
          if (line_done !== ((got_words % sizes[t]) == sizes[t] - 1))
            fail($sformatf("line_done wrong at word %0d", got_words));
          got_words++;
          if (line_done) got_lines++;
        end
        acc = line_valid && line_space;
      end
      line_valid = 0;
    end
    checks++;
    if (no_space == 0) fail("output buffers never both full");
    $display("line offered without space: %0d clocks", no_space);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
