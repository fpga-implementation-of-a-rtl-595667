// fp_sqrt: floating-point square root built on the polynomial approximator.
//
// With e the unbiased exponent, sqrt(x) = 2^(e/2) * sqrt(1.m) when e is even
// and 2^((e-1)/2) * sqrt(2 * 1.m) when e is odd. A first stage (EXP_IS_EVEN)
// looks at the exponent's parity, forms t = 1.m or 2*1.m in [1,4) and halves
// the (decremented when odd) exponent with a shift. sqrt(t) comes from a
// degree-D, NSEG-segment polynomial over [1,4]. A last stage normalises the
// polynomial value into [1,2) and handles exceptions: NaN for a negative or
// NaN operand, zero for zero, +inf for +inf. This follows the library's
// square-root unit; the fixed-point widths are this design's own choice.
//
// Interface: a and y are {sign, exponent, fraction}.
// Timing: fully pipelined, one result per clock, latency D+3 cycles
// (1 parity/halving, D+1 polynomial, 1 normalise with exception handling).
module fp_sqrt
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

  typedef enum logic [1:0] {EX_NONE, EX_NAN, EX_INF, EX_ZERO} exc_e;

  // ---- stage: EXP_IS_EVEN ----------------------------------------------------
  exc_e                exc_c, exc_e1;
  logic                sign_c, sign_e1, v_e1;
  logic signed [EW+1:0] eu, eh;
  logic signed [W-1:0] t_c, t_e1;
  logic [EW-1:0]       ef_c, ef_e1;
  always_comb begin
    if (a[EW+MW-1 -: EW] == EW'(EMAX) && a[MW-1:0] != '0) exc_c = EX_NAN;
    else if (a[EW+MW-1 -: EW] == '0)                     exc_c = EX_ZERO;
    else if (a[EW+MW])                                   exc_c = EX_NAN;
    else if (a[EW+MW-1 -: EW] == EW'(EMAX))              exc_c = EX_INF;
    else                                                 exc_c = EX_NONE;
    sign_c = a[EW+MW];
    eu     = (EW + 2)'(a[EW+MW-1 -: EW]) - (EW + 2)'(BIAS);
    // 1.m with F fractional bits, doubled when the exponent is odd.
    t_c    = W'({1'b1, a[MW-1:0], {(F - MW){1'b0}}}) <<< eu[0];
    // Decrement by one when odd, then halve with a shift.
    eh     = (eu - (EW + 2)'(eu[0])) >>> 1;
    ef_c   = EW'(eh + (EW + 2)'(BIAS));
  end
  always_ff @(posedge clk) begin
    exc_e1  <= exc_c;
    sign_e1 <= sign_c;
    t_e1    <= t_c;
    ef_e1   <= ef_c;
  end

  // ---- sqrt(t) ---------------------------------------------------------------
  logic signed [W-1:0] r;
  logic                r_valid;
  poly_approx #(.FUNC(POLY_SQRT), .D(D), .NSEG(NSEG), .W(W), .F(F)) u_sqrt (
    .clk, .rst, .in_valid(v_e1), .x(t_e1), .out_valid(r_valid), .y(r)
  );

  logic [2+1+EW-1:0] side_q;
  exc_e              exc_p;
  logic              sign_p;
  logic [EW-1:0]     ef_p;
  pipe_delay #(.W(3 + EW), .N(D + 1)) u_side (
    .clk, .rst, .d({exc_e1, sign_e1, ef_e1}), .q(side_q)
  );
  assign {exc_p, sign_p, ef_p} = side_q;

  // ---- stage: shift, normalise and exception handling -------------------------
  always_ff @(posedge clk) begin
    case (exc_p)
      EX_NAN:  y <= {1'b0, {EW{1'b1}}, 1'b1, {(MW - 1){1'b0}}};
      EX_INF:  y <= {1'b0, {EW{1'b1}}, {MW{1'b0}}};
      EX_ZERO: y <= {sign_p, {(EW + MW){1'b0}}};
      default:
        if (r[F+1])     y <= {1'b0, ef_p + 1'b1, r[F -: MW]};
        else if (r[F])  y <= {1'b0, ef_p, r[F-1 -: MW]};
        else            y <= {1'b0, ef_p - 1'b1, r[F-2 -: MW]};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) {v_e1, out_valid} <= '0;
    else     {v_e1, out_valid} <= {in_valid, r_valid};
  end

endmodule
