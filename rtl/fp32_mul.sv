// fp32_mul: the MUL FPU of a processing element. Combinational IEEE 754
// binary32 multiplier, round to nearest even.
//
// How it works: the 24x24-bit product of the significands is formed, the
// 48-bit result is normalised by at most one place, rounded using its guard
// bit and the OR of the bits below (sticky), and the biased exponents are
// added. Interface: a, b in, y out, no clock.
// Simplifications chosen for this design, as in fp32_add: subnormals read
// as zero and results below the normal range flush to zero; NaN, or infinity
// times zero, gives 0x7FC00000; overflow gives a signed infinity.
module fp32_mul
  import rdp_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, st, up;
  logic [24:0] rnd;
  logic signed [10:0] e;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == '0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == '0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != '0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != '0);
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    p  = ma * mb;
    e  = 11'($unsigned(ea)) + 11'($unsigned(eb)) - 11'sd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 11'sd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    up  = g & (st | m[0]);
    rnd = {1'b0, m} + 25'(up);
    if (rnd[24]) e = e + 11'sd1;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = QNAN;
    end else if (a_inf || b_inf) begin
      y = {s, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      y = {s, 31'd0};
    end else if (e <= 11'sd0) begin
      y = {s, 31'd0};
    end else if (e >= 11'sd255) begin
      y = {s, 8'hFF, 23'd0};
    end else begin
      y = {s, e[7:0], rnd[24] ? rnd[23:1] : rnd[22:0]};
    end
  end

endmodule
