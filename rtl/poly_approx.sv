// poly_approx: pipelined degree-D, NSEG-segment piecewise polynomial
// approximator.
//
// The input range [x_i, x_f] of function FUNC is cut into NSEG segments of
// equal width eta = (x_f - x_i)/NSEG. A priority encoder compares x with the
// NSEG-1 inner segment boundaries and yields the segment number k; k addresses
// D+1 small coefficient ROMs C_0..C_D. The polynomial
//   y = C(k,0)*x^D + C(k,1)*x^(D-1) + ... + C(k,D)
// is evaluated in Horner form with D multipliers and D adders, one
// multiply-add per pipeline stage, so the segment count does not change the
// latency. The structure (encoder, one ROM per coefficient column, chain of
// multipliers and adders) follows the library's approximator; the fixed-point
// widths and the Horner arrangement are this design's own choices.
//
// Interface: x and y are signed fixed point, W bits with F fractional bits.
// in_valid is carried alongside the data to out_valid.
// Timing: fully pipelined, one new x per clock, latency D+1 cycles (one cycle
// for segment selection and ROM read, one per multiply-add).
module poly_approx
  import fplib_pkg::*;
#(
  parameter poly_func_e FUNC = POLY_RECIP,
  parameter int unsigned D    = 2,   // polynomial degree (1..3)
  parameter int unsigned NSEG = 4,   // number of segments (power of two)
  parameter int unsigned W    = POLY_W,
  parameter int unsigned F    = POLY_F
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] y
);

  localparam int unsigned KW = (NSEG > 1) ? $clog2(NSEG) : 1;

  typedef logic signed [W-1:0] fix_t;

  typedef fix_t rom_t [NSEG*(D+1)];   // entry k*(D+1)+j is C(k,j)
  typedef fix_t bnd_t [NSEG];

  // Coefficient ROM contents, one row per segment, fixed at elaboration.
  function automatic rom_t rom_init();
    rom_t t;
    for (int k = 0; k < NSEG; k++)
      for (int j = 0; j <= D; j++)
        t[k*(D+1)+j] = fix_t'(to_fix(coef(FUNC, D, NSEG, k, j), F));
    return t;
  endfunction

  // Lower boundary x_i + k*eta of every segment.
  function automatic bnd_t bnd_init();
    bnd_t t;
    for (int k = 0; k < NSEG; k++)
      t[k] = fix_t'(to_fix(range_lo(FUNC) + (range_hi(FUNC) - range_lo(FUNC)) * k / NSEG, F));
    return t;
  endfunction

  localparam rom_t ROM = rom_init();
  localparam bnd_t BND = bnd_init();

  // Segment encoder: the highest segment whose lower boundary x has reached.
  logic [KW-1:0] seg;
  always_comb begin
    seg = '0;
    for (int k = 1; k < NSEG; k++)
      if (x >= BND[k]) seg = KW'(k);
  end

  // Pipeline registers: stage s holds the partial Horner sum after s steps.
  logic [KW-1:0] seg_q [D+1];
  fix_t          x_q   [D+1];
  fix_t          acc_q [D+1];
  logic          vld_q [D+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s <= D; s++) vld_q[s] <= 1'b0;
    end else begin
      vld_q[0] <= in_valid;
      for (int s = 1; s <= D; s++) vld_q[s] <= vld_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    seg_q[0] <= seg;
    x_q[0]   <= x;
    acc_q[0] <= ROM[int'(seg)*(D+1)];
    for (int s = 1; s <= D; s++) begin
      seg_q[s] <= seg_q[s-1];
      x_q[s]   <= x_q[s-1];
      acc_q[s] <= mac(acc_q[s-1], x_q[s-1], ROM[int'(seg_q[s-1])*(D+1)+s]);
    end
  end

  // acc*x + c with the product rescaled to F fractional bits.
  function automatic fix_t mac(fix_t acc, fix_t xv, fix_t c);
    logic signed [2*W-1:0] p;
    p = acc * xv;
    return fix_t'(p >>> F) + c;
  endfunction

  assign y         = acc_q[D];
  assign out_valid = vld_q[D];

endmodule
