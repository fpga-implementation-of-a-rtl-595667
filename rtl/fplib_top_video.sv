// fplib_top_video: floating-point video framework.
//
// A 24-bit RGB video stream (8 bits per channel, 1080p60 at a 148.5 MHz
// pixel clock in the reference system) enters from an HDMI receiver. Each
// channel is converted to float16 (fix2float, 1 cycle). Four composite
// functions are computed on every pixel:
//   f1 = max(R,1)*max(G,1) / (max(R,1)+max(B,1))     (D+10 cycles)
//   f2 = c0 * log2(max(R,1))                          (D+5 cycles)
//   f3 = 2^(c1*R)                                     (D+5 cycles)
//   f4 = sqrt(c2*R)                                   (D+4 cycles)
// and each of them exists in every combination of polynomial degree
// D in DEG and segment count in SEGS (by default d = 2, 3 and n = 4, 8): 16
// operations that all run in parallel, one pixel per clock each. Four more
// operation codes select results computed outside this module (comparison
// implementations of the same four functions), which receive the float
// pixels and coefficients through the ext_* ports.
//
// Operation code (8-bit register written over SPI):
//   op[1:0] function f1..f4, op[2] degree DEG[0]/DEG[1], op[3] segments
//   SEGS[0]/SEGS[1]  for op 0..15;  op 16..19: ext_g_i[0..3];  others: 0.
// The registered multiplexer output is turned back into an integer by
// float2fix, clamped to 0..255 and sent to all three output channels (a
// grey-level picture). HSYNC/VSYNC/VDE travel through a delay line of the
// same length, so the output stream is a delayed copy of the input timing.
//
// An SPI slave sets c0, c1, c2 and the operation on the fly and reads back the
// pixel at a chosen (row, col): the 24-bit input pixel and the float16 result
// right after the multiplexer.
//
// What follows the library: the function set and its 16 degree/segment
// variants, the float16 format (5-bit exponent, 10-bit fraction), the
// per-block latencies, the multiplexer and the SPI-controlled parameters.
// This design's own choices: every result is padded to one common latency
// LAT_F, the longest of f1 at the largest degree and of the external
// operations (EXT_LAT, 15 cycles by default, the longest latency published
// for them), so that switching operations never shifts the picture against
// the sync signals; the operation code layout; pixel byte
// order {R,G,B}; saturation to 0..255; the SPI framing (see spi_interface);
// a single clock domain (the pixel clock), with the SPI pins resynchronised.
//
// Timing: one pixel per clock; pixel and sync latency LAT_F+4 cycles, 19 by
// default (1 fix2float, LAT_F = max(max(DEG)+10, EXT_LAT) functions,
// 1 multiplexer, 1 float2fix, 1 clamp). ext_g_i must carry the result for
// the pixel shown on ext_rgb_o EXT_LAT cycles earlier.
// The sign bits of ext_rgb_o are always 0: video pixels are unsigned.
module fplib_top_video
  import fplib_pkg::*;
#(
  parameter int unsigned EW    = EXP_W,
  parameter int unsigned MW    = MAN_W,
  parameter int unsigned DEG  [2] = '{2, 3},   // polynomial degrees
  parameter int unsigned SEGS [2] = '{4, 8},   // polynomial segment counts
  parameter int unsigned EXT_LAT  = 15,         // latency of the external operations
  parameter int unsigned POS_W    = 16
) (
  input  logic        clk,            // pixel clock
  input  logic        rst,
  // Video in (from the HDMI receiver)
  input  logic [23:0] vid_pData_i,
  input  logic        vid_pHSync_i,
  input  logic        vid_pVSync_i,
  input  logic        vid_pVDE_i,
  // Video out (to the HDMI transmitter)
  output logic [23:0] vid_pData_o,
  output logic        vid_pHSync_o,
  output logic        vid_pVSync_o,
  output logic        vid_pVDE_o,
  // SPI from the host computer
  input  logic        spi_sck,
  input  logic        spi_ss_n,
  input  logic        spi_mosi,
  output logic        spi_miso,
  // Externally computed comparison operations (op 16..19)
  output logic [EW+MW:0] ext_rgb_o  [3],   // float R, G, B
  output logic [EW+MW:0] ext_coef_o [3],   // c0, c1, c2
  input  logic [EW+MW:0] ext_g_i    [4]
);

  localparam int unsigned FW    = EW + MW + 1;
  localparam int unsigned DMAX  = (DEG[0] > DEG[1]) ? DEG[0] : DEG[1];
  localparam int unsigned LAT_F = (DMAX + 10 > EXT_LAT) ? DMAX + 10 : EXT_LAT;
  localparam int unsigned LAT   = 1 + LAT_F + 1 + 1 + 1;

  // ---- SPI registers --------------------------------------------------------
  logic [FW-1:0]    c0, c1, c2, float_pix;
  logic [7:0]       op_reg;
  logic [POS_W-1:0] req_row, req_col;
  logic [23:0]      fix_pix;

  spi_interface #(.FLT_W(FW), .POS_W(POS_W),
                  .C_RESET(FW'({1'b0, EW'((1 << (EW - 1)) - 1), {MW{1'b0}}}))) u_spi (
    .clk, .rst, .sck(spi_sck), .ss_n(spi_ss_n), .mosi(spi_mosi), .miso(spi_miso),
    .c0, .c1, .c2, .op(op_reg), .row(req_row), .col(req_col),
    .fix_pix, .float_pix
  );


  // ---- fix2float on each channel --------------------------------------------
  logic [FW-1:0] r_f, g_f, b_f;
  logic          v_in;
  logic [2:0]    v_ch;

  fix2float #(.IW(8), .FW(0), .SIGNED(1'b0), .EW(EW), .MW(MW)) u_f2f_r (
    .clk, .rst, .in_valid(vid_pVDE_i), .fix_in(vid_pData_i[23:16]), .out_valid(v_ch[2]), .flt_out(r_f)
  );
  fix2float #(.IW(8), .FW(0), .SIGNED(1'b0), .EW(EW), .MW(MW)) u_f2f_g (
    .clk, .rst, .in_valid(vid_pVDE_i), .fix_in(vid_pData_i[15:8]), .out_valid(v_ch[1]), .flt_out(g_f)
  );
  fix2float #(.IW(8), .FW(0), .SIGNED(1'b0), .EW(EW), .MW(MW)) u_f2f_b (
    .clk, .rst, .in_valid(vid_pVDE_i), .fix_in(vid_pData_i[7:0]), .out_valid(v_ch[0]), .flt_out(b_f)
  );
  assign v_in = v_ch[2];

  assign ext_rgb_o  = '{r_f, g_f, b_f};
  assign ext_coef_o = '{c0, c1, c2};

  // ---- the four composite functions in every degree/segment variant -----------
  // res[{seg, deg, func}] holds each result aligned to LAT_F.
  logic [FW-1:0] res [16];
  logic [15:0]   v_res;

  for (genvar si = 0; si < 2; si++) begin : g_seg
    for (genvar di = 0; di < 2; di++) begin : g_deg
      localparam int unsigned DV = DEG[di];
      localparam int unsigned NV = SEGS[si];
      localparam int unsigned BASE = si * 8 + di * 4;
      logic [FW-1:0] f1, f2, f3, f4;

      f1_ratio #(.EW(EW), .MW(MW), .D(DV), .NSEG(NV)) u_f1 (
        .clk, .rst, .in_valid(v_in), .r(r_f), .g(g_f), .b(b_f), .out_valid(v_res[BASE]), .f(f1)
      );
      f2_log #(.EW(EW), .MW(MW), .D(DV), .NSEG(NV)) u_f2 (
        .clk, .rst, .in_valid(v_in), .c0, .r(r_f), .out_valid(v_res[BASE+1]), .f(f2)
      );
      f3_exp #(.EW(EW), .MW(MW), .D(DV), .NSEG(NV)) u_f3 (
        .clk, .rst, .in_valid(v_in), .c1, .r(r_f), .out_valid(v_res[BASE+2]), .f(f3)
      );
      f4_sqrt #(.EW(EW), .MW(MW), .D(DV), .NSEG(NV)) u_f4 (
        .clk, .rst, .in_valid(v_in), .c2, .r(r_f), .out_valid(v_res[BASE+3]), .f(f4)
      );

      // Pad every result to the common latency LAT_F.
      pipe_delay #(.W(FW), .N(LAT_F - (DV + 10))) u_pad1 (.clk, .rst, .d(f1), .q(res[BASE]));
      pipe_delay #(.W(FW), .N(LAT_F - (DV + 5)))  u_pad2 (.clk, .rst, .d(f2), .q(res[BASE+1]));
      pipe_delay #(.W(FW), .N(LAT_F - (DV + 5)))  u_pad3 (.clk, .rst, .d(f3), .q(res[BASE+2]));
      pipe_delay #(.W(FW), .N(LAT_F - (DV + 4)))  u_pad4 (.clk, .rst, .d(f4), .q(res[BASE+3]));
    end
  end

  // External results, padded to LAT_F.
  logic [FW-1:0] ext_q [4];
  for (genvar i = 0; i < 4; i++) begin : g_ext
    pipe_delay #(.W(FW), .N(LAT_F - EXT_LAT)) u_pad (.clk, .rst, .d(ext_g_i[i]), .q(ext_q[i]));
  end

  // ---- operation multiplexer ---------------------------------------------------
  logic [FW-1:0] sel_q;
  always_ff @(posedge clk) begin
    if (rst)                sel_q <= '0;
    else if (op_reg < 8'd16) sel_q <= res[op_reg[3:0]];
    else if (op_reg < 8'd20) sel_q <= ext_q[op_reg[1:0]];
    else                    sel_q <= '0;
  end

  // ---- back to 8-bit video -------------------------------------------------------
  logic [8:0] fix_q;
  logic       v_fix;
  logic [7:0] pix_q;
  float2fix #(.IW(9), .FW(0), .EW(EW), .MW(MW)) u_f2x (
    .clk, .rst, .in_valid(1'b1), .flt_in(sel_q), .out_valid(v_fix), .fix_out(fix_q)
  );
  always_ff @(posedge clk) begin
    if (rst) pix_q <= '0;
    else     pix_q <= fix_q[8] ? 8'd0 : fix_q[7:0];
  end
  assign vid_pData_o = {pix_q, pix_q, pix_q};

  // ---- sync delay -------------------------------------------------------------
  logic [2:0] sync_mid, sync_out;
  // Sync aligned with the multiplexer output (for pixel read-back) ...
  pipe_delay #(.W(3), .N(1 + LAT_F + 1)) u_sync_a (
    .clk, .rst, .d({vid_pHSync_i, vid_pVSync_i, vid_pVDE_i}), .q(sync_mid)
  );
  // ... and with the output pixel.
  pipe_delay #(.W(3), .N(LAT - (1 + LAT_F + 1))) u_sync_b (
    .clk, .rst, .d(sync_mid), .q(sync_out)
  );
  assign {vid_pHSync_o, vid_pVSync_o, vid_pVDE_o} = sync_out;

  // ---- pixel read-back -----------------------------------------------------------
  read_pixel #(.FLT_W(FW), .POS_W(POS_W)) u_read (
    .clk, .rst, .req_row, .req_col,
    .in_vde(vid_pVDE_i), .in_vsync(vid_pVSync_i), .in_pix(vid_pData_i),
    .out_vde(sync_mid[0]), .out_vsync(sync_mid[1]), .out_pix(sel_q),
    .fix_pix, .float_pix
  );

  // Valid flags are implied by the sync delay; only the data-enable is used.
  logic unused;
  assign unused = ^{v_ch[1:0], v_res, v_fix};

endmodule
