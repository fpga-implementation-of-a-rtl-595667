// fp_log2: floating-point base-2 logarithm built on the polynomial
// approximator.
//
// For x = 2^(e-bias) * 1.m with a clear sign bit, log2(x) = (e-bias) +
// log2(1.m). log2(1.m) comes from a degree-D, NSEG-segment polynomial over the
// fraction m in [0,1]. The unbiased exponent, shifted up to the polynomial's
// fixed-point scale, is added to it; the sign of the result is set when the
// exponent field is below the bias, the magnitude of the fixed-point sum is
// converted back to floating point with fix2float, and an exception stage
// gives NaN for negative inputs and NaN, -inf for zero and +inf for +inf.
// This follows the library's logarithm unit; the fixed-point widths are this
// design's own choice.
//
// Interface: a and y are {sign, exponent, fraction}.
// Timing: fully pipelined, one result per clock, latency D+3 cycles
// (D+1 polynomial, 1 exponent add, 1 fix2float with exception handling).
module fp_log2
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
  output logic           out_valid,
  output logic [EW+MW:0] y
);

  localparam int unsigned W    = POLY_W;
  localparam int unsigned F    = POLY_F;
  localparam int          BIAS = (1 << (EW - 1)) - 1;
  localparam int          EMAX = (1 << EW) - 1;
  localparam int unsigned IW   = EW + 1;     // integer bits of |log2|

  typedef enum logic [2:0] {EX_NONE, EX_NAN, EX_PINF, EX_NINF} exc_e;

  // ---- log2(1.m) -----------------------------------------------------------
  logic signed [W-1:0] x_poly, lg;
  logic                lg_valid;
  assign x_poly = W'({a[MW-1:0], {(F - MW){1'b0}}});

  poly_approx #(.FUNC(POLY_LOG2), .D(D), .NSEG(NSEG), .W(W), .F(F)) u_log (
    .clk, .rst, .in_valid, .x(x_poly), .out_valid(lg_valid), .y(lg)
  );

  exc_e exc_in;
  always_comb begin
    if (a[EW+MW-1 -: EW] == EW'(EMAX) && a[MW-1:0] != '0) exc_in = EX_NAN;
    else if (a[EW+MW-1 -: EW] == '0)                     exc_in = EX_NINF;
    else if (a[EW+MW])                                   exc_in = EX_NAN;
    else if (a[EW+MW-1 -: EW] == EW'(EMAX))              exc_in = EX_PINF;
    else                                                 exc_in = EX_NONE;
  end

  logic [3+EW-1:0] side_q;
  exc_e            exc_p;
  logic [EW-1:0]   e_p;
  pipe_delay #(.W(3 + EW), .N(D + 1)) u_side (
    .clk, .rst, .d({exc_in, a[EW+MW-1 -: EW]}), .q(side_q)
  );
  assign {exc_p, e_p} = side_q;

  // ---- stage: add the exponent ---------------------------------------------
  localparam int unsigned SW = IW + F + 1;   // signed sum
  logic signed [SW-1:0] sum_c;
  logic [IW+F-1:0]      mag_a;
  logic                 sign_a, v_a;
  exc_e                 exc_a;
  always_comb begin
    sum_c = (SW'(signed'(int'(e_p) - BIAS)) <<< F) + SW'(lg);
  end
  always_ff @(posedge clk) begin
    sign_a <= (e_p < EW'(BIAS));
    mag_a  <= (IW + F)'(sum_c[SW-1] ? -sum_c : sum_c);
    exc_a  <= exc_p;
  end

  // ---- stage: back to floating point ---------------------------------------
  logic [EW+MW:0] flt_b;
  logic           v_b, sign_b;
  exc_e           exc_b;
  logic           unused_bits;   // sign bits of the polynomial and of fix2float
  assign unused_bits = ^{lg, flt_b};
  fix2float #(.IW(IW), .FW(F), .SIGNED(1'b0), .EW(EW), .MW(MW)) u_f2f (
    .clk, .rst, .in_valid(v_a), .fix_in(mag_a), .out_valid(v_b), .flt_out(flt_b)
  );
  always_ff @(posedge clk) begin
    sign_b <= sign_a;
    exc_b  <= exc_a;
  end

  always_comb begin
    case (exc_b)
      EX_NAN:  y = {1'b0, {EW{1'b1}}, 1'b1, {(MW - 1){1'b0}}};
      EX_PINF: y = {1'b0, {EW{1'b1}}, {MW{1'b0}}};
      EX_NINF: y = {1'b1, {EW{1'b1}}, {MW{1'b0}}};
      default: y = {sign_b && (flt_b[EW+MW-1:0] != '0), flt_b[EW+MW-1:0]};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) v_a <= 1'b0;
    else     v_a <= lg_valid;
  end
  assign out_valid = v_b;

endmodule
