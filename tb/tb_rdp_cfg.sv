// tb_rdp_cfg: writes random words to random addresses of the configuration
// registers, keeps its own copy of what every register should hold per the
// address map, and compares all outputs after each burst. Also checks the
// reset state (all PEs NOP) and that writes while locked are ignored and set
// cfg_err.
module tb_rdp_cfg;
  import rdp_pkg::*;

  localparam int ROWS = 15, COLS = 22, NOUT = 22, NIN = 22;
  localparam int OB = 2 * ROWS * COLS;
  logic             clk = 0, rst_n = 0, locked = 0, cfg_we = 0, cfg_err;
  logic [15:0]      cfg_addr;
  word_t            cfg_wdata;
  pe_cfg_t          pe_cfg  [ROWS][COLS];
  logic [SEL_W-1:0] out_sel [NOUT];
  logic [4:0]       n_in, n_out;
  int               checks = 0, failures = 0;

  pe_cfg_t          m_pe  [ROWS][COLS];
  logic [SEL_W-1:0] m_sel [NOUT];
  logic [4:0]       m_nin, m_nout;

  always #5 clk = ~clk;

  rdp_cfg #(.ROWS(ROWS), .COLS(COLS), .NOUT(NOUT), .NIN(NIN)) dut (.*);

  task automatic compare(input string when);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (pe_cfg[r][c] !== m_pe[r][c]) begin
          failures++;
          if (failures < 10) $display("FAIL %s pe[%0d][%0d] %h expected %h", when, r, c, pe_cfg[r][c], m_pe[r][c]);
        end
      end
    for (int j = 0; j < NOUT; j++) begin
      checks++;
      if (out_sel[j] !== m_sel[j]) begin failures++; $display("FAIL %s out_sel[%0d]", when, j); end
    end
    checks += 2;
    if (n_in !== m_nin)   begin failures++; $display("FAIL %s n_in", when); end
    if (n_out !== m_nout) begin failures++; $display("FAIL %s n_out", when); end
  endtask

  task automatic wr(input int addr, input word_t d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 16'(addr); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
    if (!locked) begin
      if (addr < OB) begin
        if (addr % 2 == 0) begin
          m_pe[addr / (2*COLS)][(addr / 2) % COLS].op      = pe_op_e'(d[2:0]);
          m_pe[addr / (2*COLS)][(addr / 2) % COLS].sel_a   = d[7:3];
          m_pe[addr / (2*COLS)][(addr / 2) % COLS].sel_b   = d[12:8];
          m_pe[addr / (2*COLS)][(addr / 2) % COLS].b_const = d[13];
        end else begin
          m_pe[addr / (2*COLS)][(addr / 2) % COLS].konst = d;
        end
      end else if (addr < OB + NOUT) m_sel[addr - OB] = d[4:0];
      else if (addr == OB + NOUT)     m_nin  = d[4:0];
      else if (addr == OB + NOUT + 1) m_nout = d[4:0];
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_pe = '{default: '{default: PE_CFG_NOP}};
    m_sel = '{default: '0}; m_nin = '0; m_nout = '0;
    cfg_addr = '0; cfg_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare("reset");
    for (int burst = 0; burst < 20; burst++) begin
      for (int i = 0; i < 200; i++) wr($urandom % (OB + NOUT + 4), $urandom);
      compare("burst");
    end
    // every address once
    for (int a = 0; a < OB + NOUT + 2; a++) wr(a, $urandom);
    compare("sweep");
    checks++;
    if (cfg_err !== 1'b0) begin failures++; $display("FAIL cfg_err set early"); end
    locked = 1;
    for (int i = 0; i < 50; i++) wr($urandom % (OB + NOUT + 2), $urandom);
    compare("locked");
    checks++;
    if (cfg_err !== 1'b1) begin failures++; $display("FAIL cfg_err not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
