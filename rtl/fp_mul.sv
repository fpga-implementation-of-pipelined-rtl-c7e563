// fp_mul: floating-point multiplier for 16-bit IEEE 754 binary16 numbers.
//
// Multiplies the two 11-bit significands exactly (22-bit product), normalises by
// at most one place, adds the exponents and rounds once to nearest, ties to even.
// Special cases and range limits follow the same rules as fp_addsub: subnormal
// inputs read as zero, results below the smallest normal number become a signed
// zero, overflow gives infinity, a NaN input or zero times infinity gives the quiet
// NaN 16'h7E00. The format and these rules are this design's choice; the processor's
// description gives only the 16-bit width and the multiply function.
// Purely combinational.
module fp_mul
  import risc_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);

  logic        s;
  logic [4:0]  ea, eb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [21:0] prod;
  logic [9:0]  frac;
  logic        g, st, inc;
  logic signed [7:0]  e_pre, e_fin;
  logic signed [17:0] r;

  always_comb begin
    s  = a[15] ^ b[15];
    ea = a[14:10];
    eb = b[14:10];
    a_zero = (ea == 5'd0);
    b_zero = (eb == 5'd0);
    a_inf  = (ea == 5'd31) && (a[9:0] == '0);
    b_inf  = (eb == 5'd31) && (b[9:0] == '0);
    a_nan  = (ea == 5'd31) && (a[9:0] != '0);
    b_nan  = (eb == 5'd31) && (b[9:0] != '0);

    prod = {1'b1, a[9:0]} * {1'b1, b[9:0]};
    if (prod[21]) begin
      frac  = prod[20:11];
      g     = prod[10];
      st    = |prod[9:0];
      e_pre = 8'(signed'({3'b0, ea})) + 8'(signed'({3'b0, eb})) - 8'sd14;
    end else begin
      frac  = prod[19:10];
      g     = prod[9];
      st    = |prod[8:0];
      e_pre = 8'(signed'({3'b0, ea})) + 8'(signed'({3'b0, eb})) - 8'sd15;
    end
    inc   = g & (st | frac[0]);
    r     = {e_pre, frac} + 18'(inc);
    e_fin = r[17:10];

    if (a_nan || b_nan || (a_inf && b_zero) || (a_zero && b_inf)) begin
      y = FP16_QNAN;
    end else if (a_inf || b_inf) begin
      y = {s, FP16_INF[14:0]};
    end else if (a_zero || b_zero) begin
      y = {s, 15'b0};
    end else if (e_fin >= 8'sd31) begin
      y = {s, FP16_INF[14:0]};
    end else if (e_fin <= 8'sd0) begin
      y = {s, 15'b0};
    end else begin
      y = {s, e_fin[4:0], r[9:0]};
    end
  end

endmodule
