// f2_log: composite function f2(c0,R) = c0 * log2(max(R,1)).
//
// max(R,1) is registered once, fed to fp_log2 (D+3 cycles) and the logarithm
// is scaled by the run-time coefficient c0 in fp_mult (1 cycle). The register
// after the clamp is this design's choice, made so that the total matches the
// published D+5 cycles.
//
// Interface: c0, r and f are {sign, exponent, fraction}. c0 travels through a
// delay line beside the logarithm so that each result uses the c0 presented
// with its pixel (this design's choice), even when c0 changes mid-frame.
// Timing: fully pipelined, one result per clock, latency D+5 cycles.
module f2_log #(
  parameter int unsigned EW   = fplib_pkg::EXP_W,
  parameter int unsigned MW   = fplib_pkg::MAN_W,
  parameter int unsigned D    = 2,
  parameter int unsigned NSEG = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [EW+MW:0] c0,
  input  logic [EW+MW:0] r,
  output logic           out_valid,
  output logic [EW+MW:0] f
);

  logic [EW+MW:0] rm, rm_q, lg, c0_d;
  logic           v_q, v_lg;

  fp_max #(.EW(EW), .MW(MW)) u_max (.x(r), .y(rm));

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q  <= 1'b0;
      rm_q <= '0;
    end else begin
      v_q  <= in_valid;
      rm_q <= rm;
    end
  end

  fp_log2 #(.EW(EW), .MW(MW), .D(D), .NSEG(NSEG)) u_log (
    .clk, .rst, .in_valid(v_q), .a(rm_q), .out_valid(v_lg), .y(lg)
  );

  pipe_delay #(.W(EW + MW + 1), .N(D + 4)) u_c0 (.clk, .rst, .d(c0), .q(c0_d));

  fp_mult #(.EW(EW), .MW(MW)) u_mul (
    .clk, .rst, .in_valid(v_lg), .a(c0_d), .b(lg), .out_valid, .p(f)
  );

endmodule
