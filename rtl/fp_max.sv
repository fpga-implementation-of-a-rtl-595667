// fp_max: max(x, 1) for the composite pixel functions.
//
// Returns x when x >= 1.0 and the constant 1.0 otherwise (zero and negative
// values included). Because the float fields are ordered like an unsigned
// integer for positive numbers, the test is a sign check plus one unsigned
// compare of {exponent, fraction} against {bias, 0}. A NaN of either sign
// passes through unchanged. The library uses max(.,1)
// to keep the divisor and the logarithm operand away from zero; the compare
// structure is this design's own.
//
// Interface: x and y are {sign, exponent, fraction}.
// Timing: purely combinational.
module fp_max #(
  parameter int unsigned EW = fplib_pkg::EXP_W,
  parameter int unsigned MW = fplib_pkg::MAN_W
) (
  input  logic [EW+MW:0] x,
  output logic [EW+MW:0] y
);

  localparam int unsigned BIAS = (1 << (EW - 1)) - 1;
  localparam logic [EW+MW:0] ONE = {1'b0, EW'(BIAS), {MW{1'b0}}};

  logic is_nan;
  assign is_nan = (x[EW+MW-1 -: EW] == '1) && (x[MW-1:0] != '0);
  assign y = ((!x[EW+MW] && (x[EW+MW-1:0] >= ONE[EW+MW-1:0])) || is_nan) ? x : ONE;

endmodule
