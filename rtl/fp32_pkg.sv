// fp32_pkg: IEEE-754 single-precision multiply and add for the floating-point
// convolution pipeline.
//
// What it provides. fp32_mul(a, b) and fp32_add(a, b) return the product and
// the sum of two single-precision numbers, rounded to nearest with ties to
// even. Each is one combinational function; the pipeline puts a register
// after each.
//
// How it works. The multiply forms the 48-bit product of the two 24-bit
// significands, normalises it by at most one place and rounds. The add
// orders the operands by magnitude and shifts the smaller one right. The bits
// shifted out are kept as a sticky bit. It then adds or subtracts, normalises
// with a leading-zero count and rounds on the guard, round and sticky bits.
//
// Number range. Subnormal inputs and results are flushed to zero. A result
// too large for the format becomes infinity of the right sign. Infinity and
// NaN inputs are not treated specially, because image pixels and kernels are
// finite. An exact zero sum is +0.
//
// From the design description: single-precision multiply and add, as done by
// one hard floating-point DSP block. The flush to zero and the treatment of
// special values are this implementation's own choices.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  // Pack sign, unbiased-offset exponent and a 24-bit significand with its
  // rounding bits (guard, sticky). exp is the biased exponent before rounding.
  function automatic fp32_t fp32_pack(input logic sign, input int exp,
                                      input logic [23:0] sig, input logic guard,
                                      input logic sticky);
    logic [24:0] r;
    int          e;
    r = {1'b0, sig} + 25'(guard && (sticky || sig[0]));
    e = exp;
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e >= 255) return {sign, 8'hff, 23'd0};
    if (e <= 0)   return {sign, 31'd0};
    return {sign, 8'(e), r[22:0]};
  endfunction

  function automatic fp32_t fp32_mul(input fp32_t a, input fp32_t b);
    logic        sign;
    logic [47:0] m;
    int          e;
    sign = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {sign, 31'd0};
    m = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (m[47]) begin
      e = e + 1;
      return fp32_pack(sign, e, m[47:24], m[23], |m[22:0]);
    end
    return fp32_pack(sign, e, m[46:23], m[22], |m[21:0]);
  endfunction

  function automatic fp32_t fp32_add(input fp32_t a, input fp32_t b);
    fp32_t       x, y;
    logic [26:0] mx, my;     // significand followed by guard, round, sticky
    logic [27:0] s;
    int          d, e, lz;
    logic        sticky;
    // Flush subnormal inputs to zero.
    x = (a[30:23] == 8'd0) ? {a[31], 31'd0} : a;
    y = (b[30:23] == 8'd0) ? {b[31], 31'd0} : b;
    if (x[30:0] == 31'd0 && y[30:0] == 31'd0) return {x[31] & y[31], 31'd0};
    if (x[30:0] == 31'd0) return y;
    if (y[30:0] == 31'd0) return x;
    // x becomes the operand of larger magnitude.
    if (y[30:0] > x[30:0]) begin
      fp32_t t;
      t = x; x = y; y = t;
    end
    d  = int'(x[30:23]) - int'(y[30:23]);
    e  = int'(x[30:23]);
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    if (d >= 27) my = 27'd1;
    else if (d > 0) begin
      sticky = 1'b0;
      for (int i = 0; i < 27; i++) if (i < d && my[i]) sticky = 1'b1;
      my = (my >> d) | 27'(sticky);
    end
    s = (x[31] == y[31]) ? {1'b0, mx} + {1'b0, my} : {1'b0, mx} - {1'b0, my};
    if (s == 28'd0) return 32'd0;
    if (s[27]) begin
      s = {1'b0, s[27:2], s[1] | s[0]};
      e = e + 1;
    end else begin
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (s[i]) break;
        lz++;
      end
      s = s << lz;
      e = e - lz;
    end
    return fp32_pack(x[31], e, s[26:3], s[2], s[1] | s[0]);
  endfunction

endpackage
