// tb_fp_pkg: reference helpers for the float16 testbenches.
//
// Converts between real numbers and the {sign, 5-bit exponent, 10-bit
// fraction} format of the library (bias 15, no subnormals, truncation), and
// offers a relative/absolute tolerance compare. Works independently of the
// RTL so that the testbenches can compute expected values on their own.
package tb_fp_pkg;

  localparam int BIAS = 15;

  function automatic real fp_to_real(logic [15:0] x);
    real m;
    if (x[14:10] == 5'd0) return 0.0;
    m = 1.0 + real'(x[9:0]) / 1024.0;
    m = m * $pow(2.0, real'(int'(x[14:10]) - BIAS));
    return x[15] ? -m : m;
  endfunction

  // Truncating conversion; values below the smallest normal give zero and
  // values past the largest finite number give infinity.
  function automatic logic [15:0] real_to_fp(real r);
    logic s;
    int   e;
    real  a;
    s = (r < 0.0);
    a = s ? -r : r;
    if (a == 0.0) return {s, 15'd0};
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    if (e + BIAS >= 31) return {s, 5'h1F, 10'd0};
    if (e + BIAS <= 0)  return {s, 15'd0};
    return {s, 5'(e + BIAS), 10'($rtoi((a - 1.0) * 1024.0))};
  endfunction

  function automatic bit is_nan(logic [15:0] x);
    return x[14:10] == 5'h1F && x[9:0] != 0;
  endfunction

  function automatic bit is_inf(logic [15:0] x);
    return x[14:10] == 5'h1F && x[9:0] == 0;
  endfunction

  function automatic bit close(real got, real want, real rel, real abs_tol);
    real diff, mag;
    diff = got - want;
    if (diff < 0.0) diff = -diff;
    mag = (want < 0.0) ? -want : want;
    return diff <= abs_tol + rel * mag;
  endfunction

  // Random finite float16 with an unbiased exponent in [emin, emax].
  function automatic logic [15:0] rand_fp(int emin, int emax, bit allow_neg);
    logic s;
    int   e;
    s = allow_neg ? 1'($urandom_range(0, 1)) : 1'b0;
    e = int'($urandom_range(0, emax - emin)) + emin;
    return {s, 5'(e + BIAS), 10'($urandom_range(0, 1023))};
  endfunction

endpackage
