// f4_sqrt: composite function f4(c2,R) = sqrt(c2*R).
//
// The pixel is scaled by the run-time coefficient c2 in fp_mult (1 cycle) and
// its square root taken with fp_sqrt (D+3 cycles).
//
// Interface: c2, r and f are {sign, exponent, fraction}; c2 is a quasi-static
// setting.
// Timing: fully pipelined, one result per clock, latency D+4 cycles.
module f4_sqrt #(
  parameter int unsigned EW   = fplib_pkg::EXP_W,
  parameter int unsigned MW   = fplib_pkg::MAN_W,
  parameter int unsigned D    = 2,
  parameter int unsigned NSEG = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [EW+MW:0] c2,
  input  logic [EW+MW:0] r,
  output logic           out_valid,
  output logic [EW+MW:0] f
);

  logic [EW+MW:0] prod;
  logic           v_prod;

  fp_mult #(.EW(EW), .MW(MW)) u_mul (
    .clk, .rst, .in_valid, .a(c2), .b(r), .out_valid(v_prod), .p(prod)
  );

  fp_sqrt #(.EW(EW), .MW(MW), .D(D), .NSEG(NSEG)) u_sqrt (
    .clk, .rst, .in_valid(v_prod), .a(prod), .out_valid, .y(f)
  );

endmodule
