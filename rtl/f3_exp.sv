// f3_exp: composite function f3(c1,R) = 2^(c1*R).
//
// The pixel is scaled by the run-time coefficient c1 in fp_mult (1 cycle) and
// raised with fp_exp2 (D+4 cycles).
//
// Interface: c1, r and f are {sign, exponent, fraction}; c1 is a quasi-static
// setting.
// Timing: fully pipelined, one result per clock, latency D+5 cycles.
module f3_exp #(
  parameter int unsigned EW   = fplib_pkg::EXP_W,
  parameter int unsigned MW   = fplib_pkg::MAN_W,
  parameter int unsigned D    = 2,
  parameter int unsigned NSEG = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [EW+MW:0] c1,
  input  logic [EW+MW:0] r,
  output logic           out_valid,
  output logic [EW+MW:0] f
);

  logic [EW+MW:0] prod;
  logic           v_prod;

  fp_mult #(.EW(EW), .MW(MW)) u_mul (
    .clk, .rst, .in_valid, .a(c1), .b(r), .out_valid(v_prod), .p(prod)
  );

  fp_exp2 #(.EW(EW), .MW(MW), .D(D), .NSEG(NSEG)) u_exp (
    .clk, .rst, .in_valid(v_prod), .a(prod), .out_valid, .y(f)
  );

endmodule
