// fp16_ref_pkg: reference binary16 arithmetic for the testbenches, computed through
// double precision. Sums, differences and products of two binary16 numbers are
// exact in double precision; r2h then rounds once to binary16 with the processor's
// rules: round to nearest, ties to even; subnormal inputs read as zero; a rounded
// result below 2^-14 becomes a signed zero; overflow gives infinity; NaN is 16'h7E00.
package fp16_ref_pkg;

  function automatic real h2r(logic [15:0] h);
    real m;
    int  e;
    if (h[14:10] == 0) return $bitstoreal({h[15], 63'b0});
    if (h[14:10] == 31) begin
      if (h[9:0] != 0) return 0.0 / 0.0;
      return h[15] ? -1.0 / 0.0 : 1.0 / 0.0;
    end
    m = 1.0 + real'(h[9:0]) / 1024.0;
    e = int'(h[14:10]) - 15;
    m = m * (2.0 ** e);
    return h[15] ? -m : m;
  endfunction

  function automatic logic [15:0] r2h(real r);
    logic [63:0] bits;
    logic        s, g, st, up;
    int          e, val, ef;
    logic [51:0] m;
    bits = $realtobits(r);
    s = bits[63];
    if (bits[62:52] == 11'h7FF) return (bits[51:0] != 0) ? 16'h7E00 : {s, 15'h7C00};
    if (bits[62:0] == 0) return {s, 15'b0};
    e  = int'(bits[62:52]) - 1023;
    m  = bits[51:0];
    g  = m[41];
    st = |m[40:0];
    up = g & (st | m[42]);
    val = (e + 15) * 1024 + int'(m[51:42]) + int'(up);
    ef  = val >>> 10;
    if (ef >= 31) return {s, 15'h7C00};
    if (ef <= 0) return {s, 15'b0};
    return {s, val[14:0]};
  endfunction

  // op: 0 add, 1 subtract, 2 multiply
  function automatic logic [15:0] fp_ref(int op, logic [15:0] a, logic [15:0] b);
    real ra = h2r(a), rb = h2r(b);
    case (op)
      0:       return r2h(ra + rb);
      1:       return r2h(ra - rb);
      default: return r2h(ra * rb);
    endcase
  endfunction

endpackage
