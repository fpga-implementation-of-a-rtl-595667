// fp_exp2: floating-point base-2 exponentiation built on the polynomial
// approximator.
//
// The operand is first converted to fixed point (float2fix) and split into an
// integer part X_I and a fraction X_F, both taken towards zero so that they
// carry the operand's sign. Then 2^x = 2^(X_I) * 2^(X_F): X_I becomes the
// result exponent and 2^(X_F), with X_F in (-1,1), comes from a degree-D,
// NSEG-segment polynomial over [-1,1]. A negative operand therefore uses the
// negative half of the table, which gives 2^(-|X_F|) = 1/2^(|X_F|) directly.
// The polynomial value lies in [0.5,2]; a shift-and-normalise stage brings it
// to [1,2) and adjusts the exponent, and an exception stage maps overflow and
// +inf to +inf, underflow and -inf to zero and NaN to NaN. The result sign is
// always 0. This follows the library's exponentiation unit; the fixed-point widths
// are this design's own choice.
//
// Interface: a and y are {sign, exponent, fraction}.
// Timing: fully pipelined, one result per clock, latency D+4 cycles
// (1 float2fix, D+1 polynomial, 1 normalise, 1 exception handling).
module fp_exp2
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
  localparam int unsigned IW   = EW + 2;     // saturates well past overflow
  localparam int unsigned XW   = IW + F;

  typedef enum logic [1:0] {EX_NONE, EX_NAN, EX_INF, EX_ZERO} exc_e;

  // ---- stage: float2fix ----------------------------------------------------
  logic [XW-1:0] xfix;
  logic          v_f;
  float2fix #(.IW(IW), .FW(F), .EW(EW), .MW(MW)) u_f2x (
    .clk, .rst, .in_valid, .flt_in(a), .out_valid(v_f), .fix_out(xfix)
  );

  exc_e exc_in, exc_f;
  always_comb begin
    if (a[EW+MW-1 -: EW] == EW'(EMAX) && a[MW-1:0] != '0) exc_in = EX_NAN;
    else if (a[EW+MW-1 -: EW] == EW'(EMAX))               exc_in = a[EW+MW] ? EX_ZERO : EX_INF;
    else                                                  exc_in = EX_NONE;
  end
  always_ff @(posedge clk) exc_f <= exc_in;

  // Split into X_I and X_F, both with the operand's sign.
  logic                neg;
  logic [XW-1:0]       mag;
  logic signed [W-1:0] xf_poly;
  logic signed [IW:0]  xi;
  always_comb begin
    neg     = xfix[XW-1];
    mag     = neg ? (~xfix + 1'b1) : xfix;
    xf_poly = neg ? -W'(mag[F-1:0]) : W'(mag[F-1:0]);
    xi      = neg ? -(IW + 1)'(mag[XW-1:F]) : (IW + 1)'(mag[XW-1:F]);
  end

  // ---- 2^(X_F) ---------------------------------------------------------------
  logic signed [W-1:0] p;
  logic                p_valid;
  poly_approx #(.FUNC(POLY_EXP2), .D(D), .NSEG(NSEG), .W(W), .F(F)) u_pow (
    .clk, .rst, .in_valid(v_f), .x(xf_poly), .out_valid(p_valid), .y(p)
  );

  logic [2+IW:0] side_q;
  exc_e          exc_p;
  logic [IW:0]   xi_p;
  pipe_delay #(.W(3 + IW), .N(D + 1)) u_side (
    .clk, .rst, .d({exc_f, xi}), .q(side_q)
  );
  assign {exc_p, xi_p} = side_q;

  // ---- stage: shift and normalise --------------------------------------------
  logic          v_n;
  exc_e          exc_n;
  int            exp_n;
  logic [MW-1:0] man_n;
  always_ff @(posedge clk) begin
    exc_n <= exc_p;
    if (p[F+1]) begin                 // 2^X_F >= 2
      exp_n <= int'(signed'(xi_p)) + BIAS + 1;
      man_n <= p[F -: MW];
    end else if (p[F]) begin          // 1 <= 2^X_F < 2
      exp_n <= int'(signed'(xi_p)) + BIAS;
      man_n <= p[F-1 -: MW];
    end else begin                    // 0.5 <= 2^X_F < 1
      exp_n <= int'(signed'(xi_p)) + BIAS - 1;
      man_n <= p[F-2 -: MW];
    end
  end

  // ---- stage: exception handling ---------------------------------------------
  always_ff @(posedge clk) begin
    case (exc_n)
      EX_NAN:  y <= {1'b0, {EW{1'b1}}, 1'b1, {(MW - 1){1'b0}}};
      EX_INF:  y <= {1'b0, {EW{1'b1}}, {MW{1'b0}}};
      EX_ZERO: y <= '0;
      default:
        if (exp_n >= EMAX)   y <= {1'b0, {EW{1'b1}}, {MW{1'b0}}};
        else if (exp_n <= 0) y <= '0;
        else                 y <= {1'b0, EW'(exp_n), man_n};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) {v_n, out_valid} <= '0;
    else     {v_n, out_valid} <= {p_valid, v_n};
  end

endmodule
