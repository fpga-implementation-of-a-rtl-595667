// f1_ratio: composite function f1(R,G,B) = max(R,1)*max(G,1) / (max(R,1)+max(B,1)).
//
// The three clamps are combinational. The product (fp_mult, 1 cycle) is
// delayed by five registers so that it meets the sum (fp_add, 6 cycles) at
// the divider (fp_div, D+4 cycles). The channel assignment follows the
// function's formula; the register balancing is this design's own choice,
// made so that the total matches the published D+10 cycles.
//
// Interface: r, g, b and f are {sign, exponent, fraction}.
// Timing: fully pipelined, one result per clock, latency D+10 cycles.
module f1_ratio #(
  parameter int unsigned EW   = fplib_pkg::EXP_W,
  parameter int unsigned MW   = fplib_pkg::MAN_W,
  parameter int unsigned D    = 2,
  parameter int unsigned NSEG = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [EW+MW:0] r,
  input  logic [EW+MW:0] g,
  input  logic [EW+MW:0] b,
  output logic           out_valid,
  output logic [EW+MW:0] f
);

  localparam int unsigned FW = EW + MW + 1;

  logic [FW-1:0] rm, gm, bm, prod, prod_d, sum;
  logic          v_prod, v_sum;

  fp_max #(.EW(EW), .MW(MW)) u_max_r (.x(r), .y(rm));
  fp_max #(.EW(EW), .MW(MW)) u_max_g (.x(g), .y(gm));
  fp_max #(.EW(EW), .MW(MW)) u_max_b (.x(b), .y(bm));

  fp_mult #(.EW(EW), .MW(MW)) u_mul (
    .clk, .rst, .in_valid, .a(rm), .b(gm), .out_valid(v_prod), .p(prod)
  );
  pipe_delay #(.W(FW), .N(5)) u_bal (.clk, .rst, .d(prod), .q(prod_d));

  fp_add #(.EW(EW), .MW(MW)) u_add (
    .clk, .rst, .in_valid, .a(rm), .b(bm), .out_valid(v_sum), .s(sum)
  );

  fp_div #(.EW(EW), .MW(MW), .D(D), .NSEG(NSEG)) u_div (
    .clk, .rst, .in_valid(v_sum), .a(prod_d), .b(sum), .out_valid, .q(f)
  );

  // v_prod is the product's valid one cycle in; the sum's valid paces the divider.
  logic unused_v;
  assign unused_v = v_prod;

endmodule
