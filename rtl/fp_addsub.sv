// fp_addsub: floating-point adder/subtractor for 16-bit IEEE 754 binary16 numbers
// (1 sign bit, 5 exponent bits with bias 15, 10 fraction bits).
//
// Computes y = a + b (sub = 0) or y = a - b (sub = 1), rounded to nearest, ties to
// even. The larger-magnitude operand's significand is placed in a 42-bit window
// and the smaller one is shifted right inside it by the exponent difference (at most
// 29), so the sum is exact before the single rounding step. Subnormal inputs are
// read as zero and results below the smallest normal number (after rounding) become
// a signed zero; results at or above 2^16 become infinity. Any NaN input, or
// infinity minus infinity, gives the quiet NaN 16'h7E00. An exact zero sum is +0
// unless both operands are -0. The number format and the rounding/underflow rules
// are this design's choice; the processor's description fixes only the 16-bit
// width and the add/subtract function. Purely combinational.
module fp_addsub
  import risc_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        sub,
  output logic [15:0] y
);

  logic        sa, sb, sbig, ssml;
  logic [4:0]  ea, eb, ebig, esml;
  logic [9:0]  fa, fb, fbig, fsml;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [4:0]  d;
  logic [41:0] wbig, wsml, w, norm;
  int unsigned p;
  logic signed [7:0]  e_pre;
  logic signed [17:0] r;
  logic signed [7:0]  e_fin;
  logic        g, st, inc;

  always_comb begin
    sa = a[15]; ea = a[14:10]; fa = a[9:0];
    sb = b[15] ^ sub; eb = b[14:10]; fb = b[9:0];
    a_zero = (ea == 5'd0);
    b_zero = (eb == 5'd0);
    a_inf  = (ea == 5'd31) && (fa == '0);
    b_inf  = (eb == 5'd31) && (fb == '0);
    a_nan  = (ea == 5'd31) && (fa != '0);
    b_nan  = (eb == 5'd31) && (fb != '0);

    // order by magnitude
    if ({ea, fa} >= {eb, fb}) begin
      sbig = sa; ebig = ea; fbig = fa; ssml = sb; esml = eb; fsml = fb;
    end else begin
      sbig = sb; ebig = eb; fbig = fb; ssml = sa; esml = ea; fsml = fa;
    end
    d    = ebig - esml;
    wbig = {1'b0, 1'b1, fbig, 30'b0};
    wsml = {1'b0, 1'b1, fsml, 30'b0} >> d;
    w    = (sbig == ssml) ? wbig + wsml : wbig - wsml;

    // leading one of the exact sum
    p = 0;
    for (int i = 0; i < 42; i++) if (w[i]) p = i;
    norm  = w << (41 - p);
    e_pre = 8'(signed'({3'b0, ebig})) + 8'(signed'(p)) - 8'sd40;
    g     = norm[30];
    st    = |norm[29:0];
    inc   = g & (st | norm[31]);
    r     = {e_pre, norm[40:31]} + 18'(inc);
    e_fin = r[17:10];

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = FP16_QNAN;
    end else if (a_inf) begin
      y = {sa, FP16_INF[14:0]};
    end else if (b_inf) begin
      y = {sb, FP16_INF[14:0]};
    end else if (a_zero && b_zero) begin
      y = {sa & sb, 15'b0};
    end else if (a_zero) begin
      y = {sb, b[14:0]};
    end else if (b_zero) begin
      y = a;
    end else if (w == '0) begin
      y = 16'h0000;
    end else if (e_fin >= 8'sd31) begin
      y = {sbig, FP16_INF[14:0]};
    end else if (e_fin <= 8'sd0) begin
      y = {sbig, 15'b0};
    end else begin
      y = {sbig, e_fin[4:0], r[9:0]};
    end
  end

endmodule
