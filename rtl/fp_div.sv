// fp_div: floating-point divider built on the polynomial approximator.
//
// a/b = (-1)^(sa^sb) * 2^(ea-eb) * 1.ma * (1/1.mb). The reciprocal of the
// divisor's significand comes from a degree-D, NSEG-segment polynomial over
// the divisor fraction mb in [0,1) (reciprocal table of the library). The
// reciprocal r lies in (0.5,1]; the datapath multiplies 1.ma by 2r, which lies
// in [1,4), and starts from the exponent ea - eb + bias - 1. A product of 2
// or more is shifted right by one and the exponent incremented, as in the
// library's divider. An exception stage then handles NaN, division by zero,
// infinities, overflow (to infinity) and underflow (to zero). The fixed-point
// widths, truncation and the product < 1 guard are this design's choices.
//
// Interface: a (dividend), b (divisor) and q are {sign, exponent, fraction}.
// Timing: fully pipelined, one quotient per clock, latency D+4 cycles
// (D+1 polynomial, 1 multiply, 1 normalise, 1 exception handling).
module fp_div
  import fplib_pkg::*;
#(
  parameter int unsigned EW   = EXP_W,
  parameter int unsigned MW   = MAN_W,
  parameter int unsigned D    = 2,
  parameter int unsigned NSEG = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic           out_valid,
  output logic [EW+MW:0] q
);

  localparam int unsigned W    = POLY_W;
  localparam int unsigned F    = POLY_F;
  localparam int          BIAS = (1 << (EW - 1)) - 1;
  localparam int          EMAX = (1 << EW) - 1;
  localparam int unsigned PW   = (MW + 1) + (F + 1);   // 1.ma * 2r, MW+F-1 fraction bits; top bit always 0

  typedef enum logic [2:0] {EX_NONE, EX_NAN, EX_INF, EX_ZERO} exc_e;

  // ---- polynomial reciprocal of 1.mb --------------------------------------
  logic signed [W-1:0] x_poly, r;
  logic                r_valid;
  assign x_poly = W'({b[MW-1:0], {(F - MW){1'b0}}});

  poly_approx #(.FUNC(POLY_RECIP), .D(D), .NSEG(NSEG), .W(W), .F(F)) u_recip (
    .clk, .rst, .in_valid, .x(x_poly), .out_valid(r_valid), .y(r)
  );

  // Classification of the operands, carried along the polynomial latency.
  logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  exc_e exc_in;
  logic sign_in;
  int   exp_in;
  logic unused_bits;   // sign bits of r and the upper bits of exp_in
  assign unused_bits = ^{r, exp_in};
  always_comb begin
    a_nan  = (a[EW+MW-1 -: EW] == EW'(EMAX)) && (a[MW-1:0] != '0);
    b_nan  = (b[EW+MW-1 -: EW] == EW'(EMAX)) && (b[MW-1:0] != '0);
    a_inf  = (a[EW+MW-1 -: EW] == EW'(EMAX)) && (a[MW-1:0] == '0);
    b_inf  = (b[EW+MW-1 -: EW] == EW'(EMAX)) && (b[MW-1:0] == '0);
    a_zero = (a[EW+MW-1 -: EW] == '0);
    b_zero = (b[EW+MW-1 -: EW] == '0);
    if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf)) exc_in = EX_NAN;
    else if (a_inf || b_zero)                                     exc_in = EX_INF;
    else if (a_zero || b_inf)                                     exc_in = EX_ZERO;
    else                                                          exc_in = EX_NONE;
    sign_in = a[EW+MW] ^ b[EW+MW];
    // -1 * eb, added to ea, plus the bias less one for the 2r scaling.
    exp_in  = int'(a[EW+MW-1 -: EW]) + (-1) * int'(b[EW+MW-1 -: EW]) + BIAS - 1;
  end

  localparam int unsigned SIDE = 3 + 1 + (EW + 2) + MW;
  logic [SIDE-1:0] side_d, side_q;
  exc_e            exc_p;
  logic            sign_p;
  logic [EW+1:0]   exp_p;
  logic [MW-1:0]   ma_p;
  assign side_d = {exc_in, sign_in, (EW + 2)'(exp_in), a[MW-1:0]};
  pipe_delay #(.W(SIDE), .N(D + 1)) u_side (.clk, .rst, .d(side_d), .q(side_q));
  assign {exc_p, sign_p, exp_p, ma_p} = side_q;

  // ---- stage: multiply 1.ma by 2r -----------------------------------------
  logic          v_m, sign_m;
  exc_e          exc_m;
  int            exp_m;
  logic [PW-1:0] prod_m;
  always_ff @(posedge clk) begin
    exc_m  <= exc_p;
    sign_m <= sign_p;
    exp_m  <= int'(signed'(exp_p));
    // r is in (0.5,1] with F fractional bits; the same bits read with F-1
    // fractional bits are 2r.
    prod_m <= {1'b1, ma_p} * r[F:0];
  end

  // ---- stage: normalise -----------------------------------------------------
  logic          v_n, sign_n;
  exc_e          exc_n;
  int            exp_n;
  logic [MW-1:0] man_n;
  always_ff @(posedge clk) begin
    exc_n  <= exc_m;
    sign_n <= sign_m;
    if (prod_m[PW-2]) begin                  // 2 <= p < 4
      exp_n <= exp_m + 1;
      man_n <= prod_m[PW-3 -: MW];
    end else if (prod_m[PW-3]) begin         // 1 <= p < 2
      exp_n <= exp_m;
      man_n <= prod_m[PW-4 -: MW];
    end else begin                           // p < 1 (approximation error only)
      exp_n <= exp_m - 1;
      man_n <= prod_m[PW-5 -: MW];
    end
  end

  // ---- stage: exception handling ------------------------------------------
  always_ff @(posedge clk) begin
    case (exc_n)
      EX_NAN:  q <= {1'b0, {EW{1'b1}}, 1'b1, {(MW - 1){1'b0}}};
      EX_INF:  q <= {sign_n, {EW{1'b1}}, {MW{1'b0}}};
      EX_ZERO: q <= {sign_n, {(EW + MW){1'b0}}};
      default:
        if (exp_n >= EMAX)  q <= {sign_n, {EW{1'b1}}, {MW{1'b0}}};
        else if (exp_n <= 0) q <= {sign_n, {(EW + MW){1'b0}}};
        else                 q <= {sign_n, EW'(exp_n), man_n};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) {v_m, v_n, out_valid} <= '0;
    else     {v_m, v_n, out_valid} <= {r_valid, v_m, v_n};
  end

endmodule
