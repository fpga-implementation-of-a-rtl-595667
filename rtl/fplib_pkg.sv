// fplib_pkg: shared constants, types and coefficient tables of the
// floating-point library.
//
// Number format. Every operator works on a small custom float made of a sign
// bit, an EW-bit biased exponent and an MW-bit fraction with a hidden leading
// one: value = (-1)^s * 2^(e-bias) * 1.m, bias = 2^(EW-1)-1. The default
// format is the 16-bit one used for the video pixels (EW=5, MW=10). An
// exponent field of all zeros is read as zero (no subnormals) and an exponent
// field of all ones as infinity (fraction 0) or not-a-number (fraction != 0).
// Rounding is by truncation everywhere, as in the library's converters.
//
// Polynomial approximations. The reciprocal, log2, 2^x and square-root units
// evaluate y = sum_j C(k,j) * x^(d-j) on segment k of a fixed input range
// (degree d, n equal segments). For d=2, n=4 the coefficients and ranges are
// the published tables below. For the other degree/segment choices of the
// library (d=3 and/or n=8) the coefficients are computed at elaboration time
// by interpolating the exact function at the Chebyshev nodes of each segment;
// that fitting method is this design's own choice.
package fplib_pkg;

  // Default float16 format of the video datapath.
  localparam int unsigned EXP_W = 5;
  localparam int unsigned MAN_W = 10;

  // Fixed-point format used inside the polynomial approximator.
  localparam int unsigned POLY_F = 16;  // fractional bits
  localparam int unsigned POLY_W = 24;  // total bits, two's complement

  typedef enum logic [1:0] {
    POLY_RECIP = 2'd0,  // 1/x,     x in [0,1) as the fraction of 1.x
    POLY_LOG2  = 2'd1,  // log2(1+x), x in [0,1]
    POLY_EXP2  = 2'd2,  // 2^x,     x in [-1,1]
    POLY_SQRT  = 2'd3   // sqrt(x), x in [1,4]
  } poly_func_e;

  // Selector of the composite pixel functions.
  typedef enum logic [1:0] {
    OP_F1 = 2'd0,
    OP_F2 = 2'd1,
    OP_F3 = 2'd2,
    OP_F4 = 2'd3
  } op_e;

  function automatic real range_lo(poly_func_e f);
    case (f)
      POLY_RECIP: return 0.0;
      POLY_LOG2:  return 0.0;
      POLY_EXP2:  return -1.0;
      default:    return 1.0;
    endcase
  endfunction

  function automatic real range_hi(poly_func_e f);
    case (f)
      POLY_RECIP: return 1.0;
      POLY_LOG2:  return 1.0;
      POLY_EXP2:  return 1.0;
      default:    return 4.0;
    endcase
  endfunction

  // Exact function, used only to fit coefficients at elaboration time.
  function automatic real func_ref(poly_func_e f, real x);
    case (f)
      POLY_RECIP: return 1.0 / (1.0 + x);
      POLY_LOG2:  return $ln(1.0 + x) / $ln(2.0);
      POLY_EXP2:  return $exp(x * $ln(2.0));
      default:    return $sqrt(x);
    endcase
  endfunction

  // Published degree-2, 4-segment coefficients; row k is the segment, column
  // j multiplies x^(2-j).
  function automatic real pub_coef(poly_func_e f, int k, int j);
    real t [12];
    case (f)
      POLY_RECIP: t = '{0.70986, -0.9735, 0.99947,
                        0.38742, -0.82214, 0.98109,
                        0.23424, -0.67285, 0.94441,
                        0.15228, -0.55171, 0.89948};
      POLY_LOG2:  t = '{-0.573, 1.42883, 0.00028,
                        -0.3829, 1.33815, 0.0147,
                        -0.27387, 1.2312, 0.03792,
                        -0.20558, 1.12988, 0.07564};
      POLY_EXP2:  t = '{0.14315, 0.62811, 0.98516,
                        0.20244, 0.68584, 0.9997,
                        0.28629, 0.68363, 1.0004,
                        0.40488, 0.56192, 1.0326};
      default:    t = '{-0.07913, 0.64644, 0.43337,
                        -0.04069, 0.51676, 0.54339,
                        -0.02576, 0.44338, 0.63378,
                        -0.01816, 0.39451, 0.71252};
    endcase
    return t[3*k+j];
  endfunction

  // Interpolating polynomial through d+1 Chebyshev nodes of segment k,
  // returned in the same column order as the published tables.
  function automatic real fit_coef(poly_func_e f, int d, int n, int k, int j);
    real a [20];  // augmented Vandermonde system, row r at a[5*r], degree <= 3
    real lo, hi, xn, piv, fac;
    lo = range_lo(f) + (range_hi(f) - range_lo(f)) * k / n;
    hi = range_lo(f) + (range_hi(f) - range_lo(f)) * (k + 1) / n;
    for (int r = 0; r <= d; r++) begin
      xn = (lo + hi) / 2.0 + (hi - lo) / 2.0 *
           $cos(3.14159265358979 * (2.0 * r + 1.0) / (2.0 * (d + 1)));
      for (int col = 0; col <= d; col++) a[5*r+col] = $pow(xn, d - col);
      a[5*r+d+1] = func_ref(f, xn);
    end
    // Gauss-Jordan elimination; the Chebyshev nodes are distinct.
    for (int p = 0; p <= d; p++) begin
      piv = a[5*p+p];
      for (int col = 0; col <= d + 1; col++) a[5*p+col] = a[5*p+col] / piv;
      for (int r = 0; r <= d; r++) begin
        if (r != p) begin
          fac = a[5*r+p];
          for (int col = 0; col <= d + 1; col++) a[5*r+col] = a[5*r+col] - fac * a[5*p+col];
        end
      end
    end
    return a[5*j+d+1];
  endfunction

  function automatic real coef(poly_func_e f, int d, int n, int k, int j);
    if (d == 2 && n == 4) return pub_coef(f, k, j);
    return fit_coef(f, d, n, k, j);
  endfunction

  // Real to signed fixed point with `frac` fractional bits, rounded to nearest.
  function automatic longint to_fix(real r, int frac);
    real s;
    s = r * (2.0 ** frac);
    return (s >= 0.0) ? longint'($rtoi(s + 0.5)) : -longint'($rtoi(-s + 0.5));
  endfunction

endpackage
