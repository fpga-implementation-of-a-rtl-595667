// fp_add: six-stage pipelined floating-point adder.
//
// The operands are first ordered so that |x| >= |y| (the larger one gives the
// sign of the result and the exponent difference is never negative). The
// smaller significand is then shifted right by the exponent difference and
// added to, or for operands of opposite sign subtracted from, the larger one.
// A leading-one detector finds the most significant bit of the sum, which is
// shifted back to the hidden-bit position while the exponent is corrected.
// This is the swap/align/add/normalise structure of the library's adder
// design. Following the library, the alignment and normalisation shifts are
// not barrel shifters but a set of constant shifts computed in parallel, one
// of which is selected. The split into six register stages (swap, align, add, leading-one
// detection, normalise, pack) matches the published six-cycle latency; the
// three guard bits kept during alignment, truncation and the special-value
// rules (NaN in or inf-inf gives NaN, infinities pass, an exact zero sum is
// +0, overflow gives infinity, underflow zero) are this design's own choices.
//
// Interface: a, b and s are {sign, exponent[EW], fraction[MW]}; s = a + b.
// Timing: fully pipelined, one sum per clock, latency 6 cycles.
module fp_add #(
  parameter int unsigned EW = fplib_pkg::EXP_W,
  parameter int unsigned MW = fplib_pkg::MAN_W
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic           out_valid,
  output logic [EW+MW:0] s
);

  localparam int          EMAX = (1 << EW) - 1;
  localparam int unsigned G    = 3;               // guard bits
  localparam int unsigned SGW  = MW + 1 + G;      // aligned significand
  localparam int unsigned SUMW = SGW + 1;         // with carry
  localparam int unsigned LZW  = $clog2(SUMW + 1);

  typedef enum logic [1:0] {SP_NONE, SP_NAN, SP_INF} special_e;

  // Stage 1: classify and swap.
  logic           v1, sg1, sub1;
  logic [EW-1:0]  e1;
  logic [EW:0]    d1;
  logic [MW:0]    big1, small1;
  special_e       sp1;
  logic           sps1;
  // Stage 2: align.
  logic           v2, sg2, sub2, sps2;
  logic [EW-1:0]  e2;
  logic [SGW-1:0] big2, small2;
  special_e       sp2;
  // Stage 3: add.
  logic           v3, sg3, sps3;
  logic [EW-1:0]  e3;
  logic [SUMW-1:0] sum3;
  special_e       sp3;
  // Stage 4: leading-one detection.
  logic           v4, sg4, sps4;
  logic [EW-1:0]  e4;
  logic [SUMW-1:0] sum4;
  logic [LZW-1:0] lz4;
  special_e       sp4;
  // Stage 5: normalise.
  logic           v5, sg5, sps5, zero5;
  int             e5;
  logic [SUMW-1:0] norm5;
  logic           unused_norm5;    // hidden one and guard bits are dropped
  assign unused_norm5 = ^norm5;
  special_e       sp5;

  // ---- stage 1 -----------------------------------------------------------
  logic           sa, sb;
  logic [EW-1:0]  ea, eb;
  logic [MW-1:0]  ma, mb;
  logic           a_big, a_nan, b_nan, a_inf, b_inf;
  special_e       sp_c;
  logic           sps_c;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    a_nan = (ea == EW'(EMAX)) && (ma != '0);
    b_nan = (eb == EW'(EMAX)) && (mb != '0);
    a_inf = (ea == EW'(EMAX)) && (ma == '0);
    b_inf = (eb == EW'(EMAX)) && (mb == '0);
    a_big = {ea, ma} >= {eb, mb};
    sp_c  = SP_NONE;
    sps_c = 1'b0;
    if (a_nan || b_nan || (a_inf && b_inf && sa != sb)) sp_c = SP_NAN;
    else if (a_inf) begin sp_c = SP_INF; sps_c = sa; end
    else if (b_inf) begin sp_c = SP_INF; sps_c = sb; end
  end

  always_ff @(posedge clk) begin
    sg1    <= a_big ? sa : sb;
    sub1   <= sa ^ sb;
    e1     <= a_big ? ea : eb;
    d1     <= a_big ? (EW + 1)'(ea - eb) : (EW + 1)'(eb - ea);
    // A zero exponent field means zero: no hidden one.
    big1   <= a_big ? {ea != '0, ma} : {eb != '0, mb};
    small1 <= a_big ? {eb != '0, mb} : {ea != '0, ma};
    sp1    <= sp_c;
    sps1   <= sps_c;
  end

  // ---- shifters ------------------------------------------------------------
  // Instead of a barrel shifter, every constant shift of the operand is formed
  // in parallel and the exponent difference (or leading-zero count) selects
  // one of them.
  function automatic logic [SGW-1:0] align_shr(logic [SGW-1:0] v, logic [EW:0] amt);
    logic [SGW-1:0] cand [SGW];
    for (int k = 0; k < SGW; k++) cand[k] = v >> k;
    return (amt >= (EW + 1)'(SGW)) ? '0 : cand[$clog2(SGW)'(amt)];
  endfunction

  function automatic logic [SUMW-1:0] norm_shl(logic [SUMW-1:0] v, logic [LZW-1:0] amt);
    logic [SUMW-1:0] cand [SUMW];
    for (int k = 0; k < SUMW; k++) cand[k] = v << k;
    return (amt >= LZW'(SUMW)) ? '0 : cand[amt];
  endfunction

  // ---- stage 2: align the smaller significand ------------------------------
  always_ff @(posedge clk) begin
    sg2    <= sg1;
    sub2   <= sub1;
    e2     <= e1;
    big2   <= {big1, {G{1'b0}}};
    small2 <= align_shr({small1, {G{1'b0}}}, d1);
    sp2    <= sp1;
    sps2   <= sps1;
  end

  // ---- stage 3: add or subtract -------------------------------------------
  always_ff @(posedge clk) begin
    sg3  <= sg2;
    e3   <= e2;
    sum3 <= sub2 ? ({1'b0, big2} - {1'b0, small2}) : ({1'b0, big2} + {1'b0, small2});
    sp3  <= sp2;
    sps3 <= sps2;
  end

  // ---- stage 4: leading-one detector --------------------------------------
  logic [LZW-1:0] lz_c;
  always_comb begin
    lz_c = LZW'(SUMW);
    for (int i = 0; i < SUMW; i++)
      if (sum3[i]) lz_c = LZW'(SUMW - 1 - i);
  end

  always_ff @(posedge clk) begin
    sg4  <= sg3;
    e4   <= e3;
    sum4 <= sum3;
    lz4  <= lz_c;
    sp4  <= sp3;
    sps4 <= sps3;
  end

  // ---- stage 5: normalise -------------------------------------------------
  // The sum has its binary point below bit SUMW-2; a leading one at bit
  // SUMW-1 (carry out) raises the exponent by one, each leading zero after
  // that lowers it by one.
  always_ff @(posedge clk) begin
    sg5   <= sg4;
    e5    <= int'(e4) + 1 - int'(lz4);
    norm5 <= norm_shl(sum4, lz4);
    zero5 <= (sum4 == '0);
    sp5   <= sp4;
    sps5  <= sps4;
  end

  // ---- stage 6: pack ------------------------------------------------------
  logic [EW+MW:0] result;
  always_comb begin
    if (sp5 == SP_NAN)
      result = {1'b0, {EW{1'b1}}, 1'b1, {(MW - 1){1'b0}}};
    else if (sp5 == SP_INF)
      result = {sps5, {EW{1'b1}}, {MW{1'b0}}};
    else if (zero5)
      result = '0;
    else if (e5 >= EMAX)
      result = {sg5, {EW{1'b1}}, {MW{1'b0}}};
    else if (e5 <= 0)
      result = {sg5, {(EW + MW){1'b0}}};
    else
      result = {sg5, EW'(e5), norm5[SUMW-2 -: MW]};
  end

  always_ff @(posedge clk) begin
    s <= result;
  end

  // Valid pipeline with reset.
  logic v6;
  always_ff @(posedge clk) begin
    if (rst) {v1, v2, v3, v4, v5, v6} <= '0;
    else     {v1, v2, v3, v4, v5, v6} <= {in_valid, v1, v2, v3, v4, v5};
  end
  assign out_valid = v6;

endmodule
