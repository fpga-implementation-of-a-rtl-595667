// fix2float: fixed-point to floating-point conversion.
//
// A leading-one detector finds the position p of the most significant one of
// the magnitude of the fixed-point input. The exponent is p - FW + bias (the
// position counted from the binary point, plus the bias) and the fraction is
// the MW bits that follow the leading one, truncated. A signed input in two's
// complement gives the sign from its top bit and is negated to a magnitude
// first. This is the conversion of the library's fixed-to-float converter; the
// handling of values too large for the exponent (infinity) and of zero (the
// all-zero float) is this design's own choice.
//
// Interface: fix_in is IW integer bits (sign included when SIGNED=1) and FW
// fractional bits. flt_out is {sign, exponent[EW], fraction[MW]}.
// Timing: one register stage, latency 1 cycle, one conversion per clock.
module fix2float #(
  parameter int unsigned IW     = 9,   // integer bits
  parameter int unsigned FW     = 0,   // fractional bits
  parameter bit          SIGNED = 1'b1,
  parameter int unsigned EW     = fplib_pkg::EXP_W,
  parameter int unsigned MW     = fplib_pkg::MAN_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [IW+FW-1:0]   fix_in,
  output logic               out_valid,
  output logic [EW+MW:0]     flt_out
);

  localparam int unsigned TW   = IW + FW;
  localparam int unsigned SW   = TW + MW;          // room to left-align
  localparam int unsigned PW   = $clog2(TW + 1);
  localparam int          BIAS = (1 << (EW - 1)) - 1;
  localparam int          EMAX = (1 << EW) - 1;

  logic          sign;
  logic [TW-1:0] mag;
  logic [PW-1:0] pos;
  logic          nonzero;
  logic [SW-1:0] aligned;
  int            exp_unb;
  logic [EW+MW:0] result;
  logic           unused_aligned;   // bits beyond the fraction are dropped
  assign unused_aligned = ^aligned;

  always_comb begin
    sign = SIGNED ? fix_in[TW-1] : 1'b0;
    mag  = sign ? (~fix_in + 1'b1) : fix_in;
    // Leading-one detector.
    pos     = '0;
    nonzero = 1'b0;
    for (int i = 0; i < TW; i++)
      if (mag[i]) begin
        pos     = PW'(i);
        nonzero = 1'b1;
      end
    // Left-align so that the leading one lands on bit SW-1.
    aligned = {mag, {MW{1'b0}}} << (TW - 1 - int'(pos));
    exp_unb = int'(pos) - int'(FW) + BIAS;
    if (!nonzero || exp_unb <= 0)
      result = {sign, {(EW + MW){1'b0}}};
    else if (exp_unb >= EMAX)
      result = {sign, {EW{1'b1}}, {MW{1'b0}}};
    else
      result = {sign, EW'(exp_unb), aligned[SW-2 -: MW]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      flt_out   <= '0;
    end else begin
      out_valid <= in_valid;
      flt_out   <= result;
    end
  end

endmodule
