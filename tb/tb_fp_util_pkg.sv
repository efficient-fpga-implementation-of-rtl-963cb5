// tb_fp_util_pkg: helpers shared by the testbenches.
//
// Conversions between real (double) and single-precision bit patterns, done
// through the double-precision encoding so that the reference values do not
// depend on the arithmetic under test, and small real-number helpers.
package tb_fp_util_pkg;

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return 32'd0;
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0) return 32'd0;
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    m = {1'b0, 1'b1, d[51:29]};
    // round to nearest even
    if (d[28] && (d[27:0] != 0 || d[29])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic real f2r(input logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  // 2^e for -1000 < e < 1000
  function automatic real pow2(input int e);
    return $bitstoreal({1'b0, 11'(e + 1023), 52'd0});
  endfunction

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // uniform in [lo, hi)
  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction


endpackage
