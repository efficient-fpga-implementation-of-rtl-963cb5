// tb_fp32_pkg: checks the single-precision functions of fp32_pkg (add,
// subtract, multiply, divide, square root, compare) on random operands against
// double-precision results rounded to single precision. A result must be
// within one unit in the last place of the reference.
module tb_fp32_pkg;
  import fp32_pkg::*;
  import tb_fp_util_pkg::*;

  int checks = 0, failures = 0;

  function automatic real ulp_err(input logic [31:0] got, input real ref_v);
    logic [31:0] rf;
    rf = r2f(ref_v);
    if (rf[30:23] == 0) return (got[30:23] == 0) ? 0.0 : 1.0e9;
    return rabs(f2r(got) - f2r(rf)) / pow2(int'(rf[30:23]) - 127 - 23);
  endfunction

  task automatic check(input string what, input logic [31:0] got, input real ref_v);
    real e;
    e = ulp_err(got, ref_v);
    checks++;
    if (e > 1.0) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h (%g) ref %g", what, got, f2r(got), ref_v);
    end
  endtask

  initial begin
    real a, b;
    logic [31:0] fa, fb;
    for (int n = 0; n < 4000; n++) begin
      a = urand(-1.0, 1.0) * pow2(int'($urandom_range(0, 40)) - 20);
      b = urand(-1.0, 1.0) * pow2(int'($urandom_range(0, 40)) - 20);
      if (n % 7 == 0) b = -a * urand(0.999, 1.001);   // near cancellation
      fa = r2f(a);
      fb = r2f(b);
      a  = f2r(fa);
      b  = f2r(fb);
      check("add", fp_add(fa, fb), a + b);
      check("sub", fp_sub(fa, fb), a - b);
      check("mul", fp_mul(fa, fb), a * b);
      if (b != 0.0) check("div", fp_div(fa, fb), a / b);
      check("sqrt", fp_sqrt(fp_abs(fa)), $sqrt(rabs(a)));
      checks++;
      if (fp_lt(fa, fb) != (a < b)) begin
        failures++;
        $display("FAIL lt %g %g", a, b);
      end
    end
    // exact cases
    check("1+1", fp_add(FP_ONE, FP_ONE), 2.0);
    check("sqrt4", fp_sqrt(32'h4080_0000), 2.0);
    check("x-x", fp_sub(32'h4049_0FDB, 32'h4049_0FDB), 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
