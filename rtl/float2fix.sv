// float2fix: floating-point to fixed-point conversion.
//
// The value 1.m * 2^(e-bias) is turned into a two's complement number with
// FW fractional bits by shifting the significand 1.m: to the left by
// (e-bias) - MW + FW places when that is positive, otherwise to the right by
// the opposite amount (the two shifters and the selecting multiplexer of the
// library's float-to-fixed converter, where FRAC_DIFF = MW - FW). A negative sign
// negates the result. Results beyond the IW+FW-bit range saturate to the
// largest or smallest code, infinities included; NaN and zero give 0.
// Saturation and that special-value handling are this design's own choices.
//
// Interface: flt_in is {sign, exponent[EW], fraction[MW]}; fix_out has IW
// integer bits, the sign bit included, and FW fractional bits.
// Timing: one register stage, latency 1 cycle, one conversion per clock.
module float2fix #(
  parameter int unsigned IW = 9,
  parameter int unsigned FW = 0,
  parameter int unsigned EW = fplib_pkg::EXP_W,
  parameter int unsigned MW = fplib_pkg::MAN_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [EW+MW:0]   flt_in,
  output logic             out_valid,
  output logic [IW+FW-1:0] fix_out
);

  localparam int unsigned TW   = IW + FW;
  localparam int          BIAS = (1 << (EW - 1)) - 1;
  localparam int          EMAX = (1 << EW) - 1;
  localparam int          FRAC_DIFF = int'(MW) - int'(FW);
  // Wide enough for any left shift that can still fit in TW bits.
  localparam int unsigned XW = TW + MW + 2;

  logic          sign;
  logic [EW-1:0] exp_f;
  logic [MW-1:0] man;
  int            e;
  logic [XW-1:0] sig, shifted, limit;
  logic [TW-1:0] result;

  always_comb begin
    {sign, exp_f, man} = flt_in;
    e      = int'(exp_f) - BIAS;
    sig    = XW'({1'b1, man});
    limit  = XW'(1) << (TW - 1);      // magnitude that no longer fits
    if (FRAC_DIFF >= e) shifted = sig >> (FRAC_DIFF - e);
    else if (e - FRAC_DIFF >= int'(TW)) shifted = limit;
    else shifted = sig << (e - FRAC_DIFF);

    if (exp_f == '0 || (exp_f == EW'(EMAX) && man != '0))
      result = '0;
    else if (exp_f == EW'(EMAX) || shifted >= limit)
      result = sign ? {1'b1, {(TW - 1){1'b0}}} : {1'b0, {(TW - 1){1'b1}}};
    else
      result = sign ? TW'(~shifted + 1'b1) : TW'(shifted);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      fix_out   <= '0;
    end else begin
      out_valid <= in_valid;
      fix_out   <= result;
    end
  end

endmodule
