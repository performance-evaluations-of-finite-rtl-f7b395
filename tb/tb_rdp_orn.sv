// tb_rdp_orn: random selects on a full-crossbar ORN (every destination may
// read every source, fan-out included) and on a neighbourhood ORN of reach 2,
// where a select outside the window must deliver +0.
module tb_rdp_orn;
  import rdp_pkg::*;

  localparam int NS = 22, ND = 44;
  word_t            src [NS];
  logic [SEL_W-1:0] sel [ND];
  word_t            dst_f [ND], dst_n [ND];
  int               checks = 0, failures = 0;

  rdp_orn #(.NSRC(NS), .NDST(ND), .DST_PER_COL(2), .REACH(31)) dut_f (.src, .sel, .dst(dst_f));
  rdp_orn #(.NSRC(NS), .NDST(ND), .DST_PER_COL(2), .REACH(2))  dut_n (.src, .sel, .dst(dst_n));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      for (int s = 0; s < NS; s++) src[s] = $urandom | 32'h1;
      for (int d = 0; d < ND; d++) sel[d] = SEL_W'($urandom % NS);
      #1;
      for (int d = 0; d < ND; d++) begin
        int c;
        word_t exp_n;
        c = d / 2;
        exp_n = (int'(sel[d]) >= c - 2 && int'(sel[d]) <= c + 2) ? src[sel[d]] : '0;
        checks += 2;
        if (dst_f[d] !== src[sel[d]]) begin
          failures++;
          if (failures < 10) $display("FAIL full d=%0d sel=%0d", d, sel[d]);
        end
        if (dst_n[d] !== exp_n) begin
          failures++;
          if (failures < 10) $display("FAIL near d=%0d sel=%0d", d, sel[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
