// fp_mult: floating-point multiplier.
//
// The sign of the product is the XOR of the operand signs, the exponent is the
// sum of the operand exponents (minus one bias) and the significand is the
// product 1.ma * 1.mb. That product lies in [1,4); when it reaches 2 it is
// shifted right by one and the exponent incremented. The fraction is
// truncated. This follows the library's multiplier design. Special values
// (this design's own handling): zero times finite is zero, anything with NaN
// or zero times infinity is NaN, otherwise infinity times anything is
// infinity; exponent overflow gives infinity and underflow gives zero.
//
// Interface: a, b and p are {sign, exponent[EW], fraction[MW]}.
// Timing: one register stage, latency 1 cycle, one product per clock.
module fp_mult #(
  parameter int unsigned EW = fplib_pkg::EXP_W,
  parameter int unsigned MW = fplib_pkg::MAN_W
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic           out_valid,
  output logic [EW+MW:0] p
);

  localparam int BIAS = (1 << (EW - 1)) - 1;
  localparam int EMAX = (1 << EW) - 1;

  logic                sa, sb, sc;
  logic [EW-1:0]       ea, eb;
  logic [MW-1:0]       ma, mb, mc;
  logic [2*MW+1:0]     prod;
  int                  ec;
  logic                a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [EW+MW:0]      result;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sc     = sa ^ sb;
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == EW'(EMAX)) && (ma == '0);
    b_inf  = (eb == EW'(EMAX)) && (mb == '0);
    a_nan  = (ea == EW'(EMAX)) && (ma != '0);
    b_nan  = (eb == EW'(EMAX)) && (mb != '0);
    prod   = {1'b1, ma} * {1'b1, mb};
    ec     = int'(ea) + int'(eb) - BIAS;
    if (prod[2*MW+1]) begin
      mc = prod[2*MW -: MW];
      ec = ec + 1;
    end else begin
      mc = prod[2*MW-1 -: MW];
    end
    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      result = {1'b0, {EW{1'b1}}, 1'b1, {(MW - 1){1'b0}}};
    else if (a_inf || b_inf || ec >= EMAX)
      result = {sc, {EW{1'b1}}, {MW{1'b0}}};
    else if (a_zero || b_zero || ec <= 0)
      result = {sc, {(EW + MW){1'b0}}};
    else
      result = {sc, EW'(ec), mc};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      p         <= result;
    end
  end

endmodule
