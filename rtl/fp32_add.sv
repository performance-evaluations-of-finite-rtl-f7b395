// fp32_add: the ADD FPU of a processing element. Combinational IEEE 754
// binary32 adder/subtractor, round to nearest even.
//
// How it works: the operand of larger magnitude is placed first, the other
// one's significand is shifted right by the exponent difference while keeping
// guard, round and sticky bits, the two are added or subtracted, the result is
// normalised (one step right after a carry, or left by the leading-zero count
// after a cancellation) and finally rounded.
//
// Interface: a, b in; sub = 1 computes a - b; y out, no clock.
// Simplifications chosen for this design (the floating-point units are only
// named, not detailed, by the source): subnormal inputs are read as zero and
// results below the normal range are flushed to zero; any NaN or inf - inf
// gives the quiet NaN 0x7FC00000; overflow gives a signed infinity.
module fp32_add
  import rdp_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  logic  sub,
  output word_t y
);

  logic        sa, sb, sx, sy;
  logic [7:0]  ea, eb, ex, ey;
  logic [23:0] ma, mb, mx, my;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  logic [7:0]  d;
  logic [49:0] ysh;
  logic [26:0] mx27, my27;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic signed [9:0] e_n;
  logic [24:0] rnd;
  logic        g, r_s, up;
  logic signed [9:0] e_f;
  logic        rs;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == '0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == '0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != '0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != '0);
    ma = a_zero ? 24'd0 : {1'b1, a[22:0]};
    mb = b_zero ? 24'd0 : {1'b1, b[22:0]};

    // order by magnitude: x is the larger one
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end

    // align the smaller significand: [26:3] significand, [2] G, [1] R, [0] S
    d    = ex - ey;
    ysh  = (d > 8'd49) ? 50'd0 : ({my, 26'd0} >> d);
    mx27 = {mx, 3'b000};
    my27 = {ysh[49:24], (|ysh[23:0]) | ((d > 8'd49) && (my != '0))};

    lz   = '0;
    norm = '0;
    e_n  = {2'b00, ex};
    sum  = '0;
    rs   = sx;
    if (sx == sy) begin
      sum = {1'b0, mx27} + {1'b0, my27};
      if (sum[27]) begin
        norm = {sum[27:2], sum[1] | sum[0]};
        e_n  = e_n + 10'sd1;
      end else begin
        norm = sum[26:0];
      end
    end else begin
      sum = {1'b0, mx27 - my27};
      // leading zeros of the 27-bit difference
      lz = 5'd27;
      for (int i = 0; i < 27; i++) begin
        if (sum[i]) lz = 5'(26 - i);
      end
      norm = sum[26:0] << lz;
      e_n  = e_n - 10'($unsigned(lz));
    end

    // round to nearest even
    g   = norm[2];
    r_s = norm[1] | norm[0];
    up  = g & (r_s | norm[3]);
    rnd = {1'b0, norm[26:3]} + 25'(up);
    e_f = e_n;
    if (rnd[24]) e_f = e_f + 10'sd1;

    // result selection
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = QNAN;
    end else if (a_inf) begin
      y = {sa, 8'hFF, 23'd0};
    end else if (b_inf) begin
      y = {sb, 8'hFF, 23'd0};
    end else if (a_zero && b_zero) begin
      y = {sa & sb, 31'd0};
    end else if (sum[26:0] == '0 && sx != sy) begin
      y = 32'd0;                       // exact cancellation gives +0
    end else if (e_f <= 10'sd0) begin
      y = {rs, 31'd0};                 // flush to zero
    end else if (e_f >= 10'sd255) begin
      y = {rs, 8'hFF, 23'd0};          // overflow
    end else begin
      y = {rs, e_f[7:0], rnd[24] ? rnd[23:1] : rnd[22:0]};
    end
  end

endmodule
