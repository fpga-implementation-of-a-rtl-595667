// tb_fplib_top_video_1080p: one complete 1920x1080 frame through the video
// framework at its default parameters.
//
// The stimulus uses the standard 1080p60 raster (2200 x 1125 clocks per frame
// including blanking, 148.5 MHz pixel clock, positive syncs): horizontal
// front porch 88, sync 44, back porch 148; vertical front porch 4, sync 5,
// back porch 36. Pixels are a position hash, so nothing is stored. The host
// selects f1 at degree 2, 4 segments (the divider path) and asks for pixel (row 123, column 456) over
// SPI before the frame; afterwards the pixel is read back. Every output pixel
// is checked against the exact f1 value (one grey level plus 0.6 %), the
// pixel latency is checked, the number of output pixels must be exactly
// 1920*1080, and the frame must take 2,475,000 clocks, i.e. one pixel per
// clock and 60 frames per second at 148.5 MHz.
module tb_fplib_top_video_1080p;
  import tb_fp_pkg::*;

  localparam int H_ACT = 1920, H_FP = 88, H_SYNC = 44, H_BP = 148;
  localparam int V_ACT = 1080, V_FP = 4, V_SYNC = 5, V_BP = 36;
  localparam int H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = V_ACT + V_FP + V_SYNC + V_BP;
  localparam int LAT   = 19;
  localparam int READ_ROW = 123, READ_COL = 456;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (H_TOT * V_TOT + 100000) @(posedge clk);
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
    .ext_rgb_o(ext_rgb), .ext_coef_o(ext_coef), .ext_g_i('{4{16'h0000}})
  );
  logic [15:0] ext_rgb [3], ext_coef [3];

  function automatic logic [23:0] pixel(int r, int c);
    logic [31:0] h;
    h = 32'(r) * 32'd2654435761 ^ 32'(c) * 32'd40503 ^ 32'h9E3779B9;
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;
    return h[31:8];
  endfunction

  function automatic real f1(logic [23:0] px);
    real r, g, b;
    r = (px[23:16] == 0) ? 1.0 : real'(px[23:16]);
    g = (px[15:8] == 0) ? 1.0 : real'(px[15:8]);
    b = (px[7:0] == 0) ? 1.0 : real'(px[7:0]);
    return r * g / (r + b);
  endfunction

  typedef struct { logic [23:0] px; int cyc; } pix_t;
  pix_t exp_q [$];
  int   n_out = 0, first_in = -1, first_out = -1;

  always @(posedge clk) begin
    if (!rst) begin
      if (de_i) begin
        exp_q.push_back('{din, cycle});
        if (first_in < 0) first_in = cycle;
      end
      if (de_o) begin
        pix_t p;
        int   want, got;
        real  v;
        p = exp_q.pop_front();
        v = f1(p.px);
        want = (v >= 255.0) ? 255 : $rtoi(v);
        got  = int'(dout[7:0]);
        checks++;
        if (got - want > 1 + $rtoi(0.006 * want) || want - got > 1 + $rtoi(0.006 * want)) begin
          failures++;
          if (failures < 10) $display("pixel %h: got %0d want %0d", p.px, got, want);
        end
        if (cycle - p.cyc != LAT) begin
          failures++;
          if (failures < 10) $display("latency %0d", cycle - p.cyc);
        end
        if (first_out < 0) first_out = cycle;
        n_out++;
      end
    end
  end

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

  initial begin
    int frame_start, frame_end;
    logic [23:0] px;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    xfer('{8'h04, 8'h00});
    xfer('{8'h05, 8'(READ_ROW >> 8), 8'(READ_ROW), 8'(READ_COL >> 8), 8'(READ_COL)});
    @(negedge clk);
    frame_start = cycle;
    for (int v = 0; v < V_TOT; v++) begin
      for (int h = 0; h < H_TOT; h++) begin
        // Active area first, then front porch, sync, back porch.
        vs_i = (v >= V_ACT + V_FP) && (v < V_ACT + V_FP + V_SYNC);
        hs_i = (h >= H_ACT + H_FP) && (h < H_ACT + H_FP + H_SYNC);
        de_i = (v < V_ACT) && (h < H_ACT);
        din  = de_i ? pixel(v, h) : 24'd0;
        @(negedge clk);
      end
    end
    frame_end = cycle;
    de_i = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    xfer('{8'h06, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00});
    px = pixel(READ_ROW, READ_COL);
    checks += 4;
    if ({rx[1], rx[2], rx[3]} !== px) begin
      failures++;
      $display("read-back fixed pixel %h%h%h, want %h", rx[1], rx[2], rx[3], px);
    end
    if (!close(fp_to_real({rx[4], rx[5]}), f1(px), 6.0e-3, 0.0)) begin
      failures++;
      $display("read-back float %h, want %f", {rx[4], rx[5]}, f1(px));
    end
    if (n_out != H_ACT * V_ACT) begin
      failures++;
      $display("%0d output pixels", n_out);
    end
    if (frame_end - frame_start != H_TOT * V_TOT || first_out - first_in != LAT) begin
      failures++;
      $display("frame took %0d clocks", frame_end - frame_start);
    end
    $display("frame of %0d clocks, %0d pixels out, %.2f frames/s at 148.5 MHz",
             frame_end - frame_start, n_out, 148.5e6 / real'(frame_end - frame_start));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
