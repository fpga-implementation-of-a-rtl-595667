// tb_fplib_top_video: end-to-end test of the floating-point video framework
// with all parameters at their defaults.
//
// Small video frames (FRAME_COLS x FRAME_ROWS active pixels with horizontal
// blanking and a vertical sync pulse) of random RGB pixels are streamed one
// pixel per clock. Between frames a mode-0 SPI host writes c0, c1, c2, the
// operation and the pixel position to read back, exactly as a host program
// would. Each of the 20 operation codes is used for one frame: the 16
// degree/segment variants of f1..f4 and the 4 codes that select the external
// comparison results (modelled here as the float R, G, B and R pixels delayed
// by the 15-clock external latency). For every output pixel the testbench
// computes the selected function of the input pixel in real arithmetic,
// truncates and clamps it to 0..255 and accepts a difference of one grey
// level plus 0.6 %. It also checks: the pixel latency (19 clocks) and that
// HSYNC/VSYNC/VDE come out as the same delayed copy; that the read-back returns the requested input pixel
// and a float16 result close to the exact one.
// Counted mechanisms, each of which must occur: every operation selected,
// coefficients changed on the fly, max(x,1) clamping of a zero channel,
// output saturation at 255 and at 0, and pixel read-back.
module tb_fplib_top_video;
  import tb_fp_pkg::*;

  localparam int FRAME_COLS = 24;
  localparam int FRAME_ROWS = 4;
  localparam int HBLANK     = 6;
  localparam int LAT        = 19;      // LAT_F+4
  localparam int LAT_F      = 15;      // EXT_LAT: latency of the external operations
  localparam int NOPS       = 20;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] din = '0, dout;
  logic        hs_i = 1'b0, vs_i = 1'b0, de_i = 1'b0, hs_o, vs_o, de_o;
  logic        sck = 1'b0, ss_n = 1'b1, mosi = 1'b0, miso;

  fplib_top_video dut (
    .clk, .rst,
    .vid_pData_i(din), .vid_pHSync_i(hs_i), .vid_pVSync_i(vs_i), .vid_pVDE_i(de_i),
    .vid_pData_o(dout), .vid_pHSync_o(hs_o), .vid_pVSync_o(vs_o), .vid_pVDE_o(de_o),
    .spi_sck(sck), .spi_ss_n(ss_n), .spi_mosi(mosi), .spi_miso(miso),
    .ext_rgb_o(ext_rgb), .ext_coef_o(ext_coef), .ext_g_i(ext_g)
  );

  // Model of the external comparison block: returns R, G, B, R as float16,
  // LAT_F cycles after the pixel appears on ext_rgb_o.
  logic [15:0] ext_rgb [3], ext_coef [3], ext_g [4];
  logic [15:0] ext_hist [LAT_F][3];
  always @(posedge clk) begin
    ext_hist[0] <= ext_rgb;
    for (int i = 1; i < LAT_F; i++) ext_hist[i] <= ext_hist[i-1];
  end
  assign ext_g = '{ext_hist[LAT_F-1][0], ext_hist[LAT_F-1][1], ext_hist[LAT_F-1][2], ext_hist[LAT_F-1][0]};

  // Current settings, as written over SPI.
  logic [15:0] c0 = 16'h3C00, c1 = 16'h3C00, c2 = 16'h3C00;
  int          op = 0;

  // Mechanism counters.
  int n_op [NOPS];
  int n_coef_change = 0, n_max_clamp = 0, n_sat_hi = 0, n_sat_lo = 0, n_readback = 0;

  function automatic real func(int o, logic [23:0] px);
    real r, g, b, m;
    r = real'(px[23:16]);
    g = real'(px[15:8]);
    b = real'(px[7:0]);
    if (o >= 16) return (o == 17) ? g : (o == 18) ? b : r;
    case (o % 4)
      0: begin
        if (r < 1.0) r = 1.0;
        if (g < 1.0) g = 1.0;
        if (b < 1.0) b = 1.0;
        return r * g / (r + b);
      end
      1: begin
        if (r < 1.0) r = 1.0;
        return fp_to_real(c0) * $ln(r) / $ln(2.0);
      end
      2: begin
        m = fp_to_real(real_to_fp(fp_to_real(c1) * r));
        return (m > 16.0) ? 1.0e6 : $pow(2.0, m);
      end
      default: begin
        m = fp_to_real(real_to_fp(fp_to_real(c2) * r));
        return $sqrt(m);
      end
    endcase
  endfunction

  // ---- output checking --------------------------------------------------------
  typedef struct { logic [23:0] px; int cyc; } pix_t;
  pix_t        exp_q [$];
  logic [2:0]  sync_hist [LAT+1];

  always @(posedge clk) begin
    if (!rst) begin
      for (int i = LAT; i > 0; i--) sync_hist[i] <= sync_hist[i-1];
      sync_hist[0] <= {hs_i, vs_i, de_i};
      if (cycle > LAT + 8) begin
        checks++;
        if ({hs_o, vs_o, de_o} !== sync_hist[LAT-1]) begin
          failures++;
          if (failures < 10) $display("sync mismatch at cycle %0d", cycle);
        end
      end
      if (de_i) begin
        exp_q.push_back('{din, cycle});
        if ((op % 4 == 0 && op < 16 && (din[23:16] == 0 || din[15:8] == 0 || din[7:0] == 0)) ||
            (op % 4 == 1 && op < 16 && din[23:16] == 0))
          n_max_clamp++;
      end
      if (de_o) begin
        pix_t p;
        real  v;
        int   want, got;
        p = exp_q.pop_front();
        v = func(op, p.px);
        if (v >= 255.0) begin want = 255; n_sat_hi++; end
        else if (v < 0.0) begin want = 0; if (v <= -1.0) n_sat_lo++; end
        else want = $rtoi(v);
        got = int'(dout[7:0]);
        checks++;
        if (got - want > 1 + $rtoi(0.006 * want) || want - got > 1 + $rtoi(0.006 * want) ||
            dout[23:16] != dout[7:0] || dout[15:8] != dout[7:0]) begin
          failures++;
          if (failures < 10) $display("op %0d pixel %h: got %0d want %0d (%f)", op, p.px, got, want, v);
        end
        checks++;
        if (cycle - p.cyc != LAT) begin
          failures++;
          if (failures < 10) $display("latency %0d", cycle - p.cyc);
        end
        n_op[op]++;
      end
    end
  end

  // ---- stimulus -------------------------------------------------------------------
  logic [23:0] frame_px [FRAME_ROWS][FRAME_COLS];

  task automatic frame();
    for (int r = 0; r < FRAME_ROWS; r++)
      for (int c = 0; c < FRAME_COLS; c++) begin
        logic [7:0] ch [3];
        for (int k = 0; k < 3; k++) ch[k] = ($urandom_range(0, 9) == 0) ? 8'd0 : 8'($urandom);
        frame_px[r][c] = {ch[0], ch[1], ch[2]};
      end
    @(negedge clk) vs_i = 1'b1;
    repeat (4) @(negedge clk);
    vs_i = 1'b0;
    for (int r = 0; r < FRAME_ROWS; r++) begin
      hs_i = 1'b1;
      repeat (2) @(negedge clk);
      hs_i = 1'b0;
      repeat (HBLANK - 2) @(negedge clk);
      for (int c = 0; c < FRAME_COLS; c++) begin
        de_i = 1'b1;
        din  = frame_px[r][c];
        @(negedge clk);
      end
      de_i = 1'b0;
      din  = '0;
    end
    repeat (LAT + 8) @(negedge clk);
  endtask

  byte unsigned rx [$];
  task automatic xfer(byte unsigned tx [$]);
    rx.delete();
    ss_n = 1'b0;
    repeat (8) @(posedge clk);
    foreach (tx[i]) begin
      byte unsigned rb;
      rb = 0;
      for (int bit_i = 7; bit_i >= 0; bit_i--) begin
        mosi = tx[i][bit_i];
        repeat (4) @(posedge clk);
        sck = 1'b1;
        rb = {rb[6:0], miso};
        repeat (4) @(posedge clk);
        sck = 1'b0;
      end
      rx.push_back(rb);
    end
    repeat (8) @(posedge clk);
    ss_n = 1'b1;
    repeat (8) @(posedge clk);
  endtask

  task automatic set_coef(int idx, logic [15:0] v);
    xfer('{8'(idx + 1), v[15:8], v[7:0]});
    case (idx)
      0: c0 = v;
      1: c1 = v;
      default: c2 = v;
    endcase
    n_coef_change++;
  endtask

  initial begin
    logic [15:0] coef_set [4][3];
    // (c0, c1, c2) per group of four operation codes, so every coefficient
    // really changes while video runs.
    coef_set[0] = '{16'h518D, 16'h2717, 16'h5554};  // 44.4, 0.0277, 85.3
    coef_set[1] = '{16'h4500, 16'h2C00, 16'h3C00};  // 5, 0.0625, 1
    coef_set[2] = '{16'hC000, 16'h2400, 16'h4A00};  // -2, 0.0156, 12
    coef_set[3] = '{16'h3800, 16'h3000, 16'h5000};  // 0.5, 0.125, 32
    for (int i = 0; i <= LAT; i++) sync_hist[i] = '0;
    for (int i = 0; i < NOPS; i++) n_op[i] = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    frame();   // default settings: operation f1
    for (int pass = 0; pass < NOPS; pass++) begin
      int          rr, cc;
      logic [23:0] px;
      real         want;
      logic [15:0] fl;
      for (int k = 0; k < 3; k++) set_coef(k, coef_set[(pass / 4) % 4][k]);
      xfer('{8'h04, 8'(pass)});
      op = pass;
      rr = int'($urandom_range(0, FRAME_ROWS - 1));
      cc = int'($urandom_range(0, FRAME_COLS - 1));
      xfer('{8'h05, 8'h00, 8'(rr), 8'h00, 8'(cc)});
      frame();
      // Read back the chosen pixel.
      xfer('{8'h06, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00});
      px   = frame_px[rr][cc];
      fl   = {rx[4], rx[5]};
      want = func(op, px);
      checks += 2;
      if ({rx[1], rx[2], rx[3]} !== px) begin
        failures++;
        $display("read-back fixed pixel %h%h%h, want %h", rx[1], rx[2], rx[3], px);
      end
      if (!(want >= 65504.0 ? is_inf(fl) : close(fp_to_real(fl), want, 6.0e-3, 4.0e-3 * (fp_to_real(c0) < 0.0 ? -fp_to_real(c0) : fp_to_real(c0)) + 1.0e-3))) begin
        failures++;
        $display("read-back float %h (%f), want %f", fl, fp_to_real(fl), want);
      end else n_readback++;
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d pixels never came out", exp_q.size());
    end
    for (int i = 0; i < NOPS; i++) $display("mechanism: operation %0d used on %0d pixels", i, n_op[i]);
    $display("mechanisms: f1 %0d, f2 %0d, f3 %0d, f4 %0d pixels (d=2,n=4); coefficient writes %0d; max(x,1) clamps %0d; saturation high %0d low %0d; read-backs %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_coef_change, n_max_clamp, n_sat_hi, n_sat_lo, n_readback);
    for (int i = 0; i < NOPS; i++) begin
      checks++;
      if (n_op[i] == 0) failures++;
    end
    checks += 5;
    if (n_coef_change == 0) failures++;
    if (n_max_clamp == 0) failures++;
    if (n_sat_hi == 0) failures++;
    if (n_sat_lo == 0) failures++;
    if (n_readback == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
