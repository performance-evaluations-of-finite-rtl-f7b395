// rdp_orn: operand routing network (ORN) between two consecutive rows.
//
// NDST destinations (operand inputs of the next row, or output slots) each
// pick one of NSRC sources (outputs of the row above, or input slots) by a
// configuration select. One source may feed any number of destinations, so a
// value fans out to several PEs of the next row. The network is a set of
// programmable multiplexers with no storage; data only flows downwards.
//
// Destination d sits at column d / DST_PER_COL (2 for the a/b operand pair of
// each PE). REACH limits how many columns a route may move sideways; a select
// outside that window delivers +0. The source does not give the reach, so by
// default REACH spans the whole row (a full crossbar); a smaller value gives a
// neighbourhood network with fewer multiplexer inputs.
module rdp_orn
  import rdp_pkg::*;
#(
  parameter int unsigned NSRC        = 22,
  parameter int unsigned NDST        = 44,
  parameter int unsigned DST_PER_COL = 2,
  parameter int unsigned REACH       = 31
) (
  input  word_t            src [NSRC],
  input  logic [SEL_W-1:0] sel [NDST],
  output word_t            dst [NDST]
);

  initial begin
    assert (NSRC <= (1 << SEL_W)) else $error("rdp_orn: NSRC too large for SEL_W");
  end

  always_comb begin
    for (int d = 0; d < NDST; d++) begin
      dst[d] = '0;
      for (int s = 0; s < NSRC; s++) begin
        if ((s + REACH >= d / DST_PER_COL) && (s <= d / DST_PER_COL + REACH)
            && (sel[d] == SEL_W'(s)))
          dst[d] = src[s];
      end
    end
  end

endmodule
