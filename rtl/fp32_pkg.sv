// fp32_pkg: IEEE-754 single-precision arithmetic used by every datapath of the
// PCA engine.
//
// The engine computes in floating point, not in integers, so that the
// eigen-decomposition, the energy selection and the projection keep their
// accuracy over large data. This package gives that arithmetic as
// combinational functions: add, subtract, multiply, divide, square root,
// compare, plus a few constants. Each function is one block of logic; the
// modules that call them register the result, so one call costs one clock
// cycle of combinational depth.
//
// Simplifications (this design's own choice): subnormal inputs and results
// are flushed to zero, NaN is never produced by the engine (square roots and
// divisions are only called on valid operands), overflow saturates to
// infinity. Rounding is round-to-nearest-even for add, multiply, divide and
// square root.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_TWO  = 32'h4000_0000;
  localparam fp32_t FP_HUND = 32'h42C8_0000;  // 100.0

  // Pack sign, unbiased-plus-127 exponent and a 24-bit mantissa (hidden bit
  // included) with 3 extra low bits (guard, round, sticky) into a rounded
  // float. exp_b is the biased exponent of the value m[26:3] * 2^-23.
  function automatic fp32_t fp_pack(input logic s, input int exp_b, input logic [26:0] m);
    logic [24:0] r;
    int          e;
    logic        up;
    e  = exp_b;
    up = m[2] & (m[1] | m[0] | m[3]);
    r  = {1'b0, m[26:3]} + 25'(up);
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (r == 25'd0 || e <= 0) return FP_ZERO;
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), r[22:0]};
  endfunction

  function automatic logic fp_is_zero(input fp32_t a);
    return a[30:23] == 8'd0;
  endfunction

  function automatic fp32_t fp_neg(input fp32_t a);
    return fp_is_zero(a) ? FP_ZERO : {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t fp_abs(input fp32_t a);
    return {1'b0, a[30:0]};
  endfunction

  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t       x, y;
    logic [27:0] mx, my, sum;
    int          d, e, lz;
    logic        sticky;
    if (fp_is_zero(a)) return fp_is_zero(b) ? FP_ZERO : b;
    if (fp_is_zero(b)) return a;
    // x gets the larger magnitude
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    d  = int'(x[30:23]) - int'(y[30:23]);
    mx = {1'b0, 1'b1, x[22:0], 3'b000};
    my = {1'b0, 1'b1, y[22:0], 3'b000};
    if (d >= 27) begin
      my = 28'd1;  // only the sticky bit survives
    end else if (d > 0) begin
      sticky = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < d && my[i]) sticky = 1'b1;
      my = (my >> d) | 28'(sticky);
    end
    if (x[31] == y[31]) sum = mx + my;
    else                sum = mx - my;
    if (sum == 28'd0) return FP_ZERO;
    e = int'(x[30:23]);
    if (sum[27]) begin
      sum = (sum >> 1) | 28'(sum[0]);
      e   = e + 1;
    end else begin
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e   = e - lz;
    end
    return fp_pack(x[31], e, sum[26:0]);
  endfunction

  function automatic fp32_t fp_sub(input fp32_t a, input fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic [47:0] p;
    logic [26:0] m;
    int          e;
    logic        s;
    s = a[31] ^ b[31];
    if (fp_is_zero(a) || fp_is_zero(b)) return FP_ZERO;
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      m = {p[47:22], |p[21:0]};
      e = e + 1;
    end else begin
      m = {p[46:21], |p[20:0]};
    end
    return fp_pack(s, e, m);
  endfunction

  function automatic fp32_t fp_div(input fp32_t a, input fp32_t b);
    logic [50:0] n, q, r;
    logic [26:0] m;
    int          e;
    logic        s;
    s = a[31] ^ b[31];
    if (fp_is_zero(a)) return FP_ZERO;
    if (fp_is_zero(b)) return {s, 8'hFF, 23'd0};
    n = {1'b1, a[22:0], 27'd0};
    q = n / 51'({1'b1, b[22:0]});
    r = n % 51'({1'b1, b[22:0]});
    // q lies in [2^26, 2^28)
    e = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (q[27]) m = {q[27:2], |{q[1:0], r}};
    else begin
      m = {q[26:1], |{q[0], r}};
      e = e - 1;
    end
    return fp_pack(s, e, m);
  endfunction

  function automatic fp32_t fp_sqrt(input fp32_t a);
    logic [53:0] rad, rem, root, trial;
    logic [26:0] m;
    int          e;
    if (fp_is_zero(a) || a[31]) return FP_ZERO;
    e = int'(a[30:23]) - 127;
    // radicand = 1.f * 2^52 (even exponent) or 2 * 1.f * 2^52 (odd exponent),
    // so that its integer root has 27 bits
    if (e[0]) rad = {1'b1, a[22:0], 30'd0};
    else      rad = {1'b0, 1'b1, a[22:0], 29'd0};
    // integer square root, bit by bit
    rem  = rad;
    root = 54'd0;
    for (int i = 26; i >= 0; i--) begin
      trial = (root << (i + 1)) + (54'd1 << (2 * i));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | (54'd1 << i);
      end
    end
    // root lies in [2^26, 2^27)
    m = {root[26:1], root[0] | (rem != 0)};
    e = ((e - (e[0] ? 1 : 0)) >>> 1) + 127;
    return fp_pack(1'b0, e, m);
  endfunction

  // a < b
  function automatic logic fp_lt(input fp32_t a, input fp32_t b);
    logic za, zb;
    za = fp_is_zero(a);
    zb = fp_is_zero(b);
    if (za && zb) return 1'b0;
    if (za) return ~b[31];
    if (zb) return a[31];
    if (a[31] != b[31]) return a[31];
    if (a[31]) return a[30:0] > b[30:0];
    return a[30:0] < b[30:0];
  endfunction

endpackage
