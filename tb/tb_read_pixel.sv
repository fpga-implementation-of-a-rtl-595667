// tb_read_pixel: feeds small video frames (8 active pixels per line, 6 lines,
// blanking between lines and a vertical sync pulse between frames) on the
// input stream and a copy delayed by 13 clocks on the processed stream, with
// pixel values that encode their own position. For several requested
// positions (60 frames, including the first and last pixel) it checks that
// both held values are those of the requested pixel after one frame. Every
// tenth request lies outside the picture: the held values must then stay
// those of the previous request.
module tb_read_pixel;

  localparam int COLS = 8, ROWS = 6, HBLANK = 3, DELAY = 13;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] req_row = '0, req_col = '0;
  logic        in_vde = 1'b0, in_vsync = 1'b0;
  logic [23:0] in_pix = '0;
  logic [17:0] dly [DELAY];       // {vde, vsync, float pixel}
  logic [23:0] fix_pix;
  logic [15:0] float_pix;

  always_ff @(posedge clk) begin
    dly[0] <= {in_vde, in_vsync, in_pix[15:0] ^ 16'hA5A5};
    for (int i = 1; i < DELAY; i++) dly[i] <= dly[i-1];
  end

  read_pixel dut (
    .clk, .rst, .req_row, .req_col,
    .in_vde, .in_vsync, .in_pix,
    .out_vde(dly[DELAY-1][17]), .out_vsync(dly[DELAY-1][16]), .out_pix(dly[DELAY-1][15:0]),
    .fix_pix, .float_pix
  );

  task automatic frame();
    @(negedge clk) in_vsync = 1'b1;
    repeat (3) @(negedge clk);
    in_vsync = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      repeat (HBLANK) @(negedge clk);
      for (int c = 0; c < COLS; c++) begin
        in_vde = 1'b1;
        in_pix = {8'h5A, 8'(r), 8'(c)};
        @(negedge clk);
      end
      in_vde = 1'b0;
      in_pix = '0;
    end
    repeat (DELAY + 4) @(negedge clk);
  endtask

  logic [15:0] last_rc;
  initial begin
    for (int i = 0; i < DELAY; i++) dly[i] = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    frame();
    for (int t = 0; t < 60; t++) begin
      int r, c;
      r = (t == 0) ? 0 : (t == 1) ? ROWS - 1 : int'($urandom_range(0, ROWS - 1));
      c = (t == 0) ? 0 : (t == 1) ? COLS - 1 : int'($urandom_range(0, COLS - 1));
      if (t % 10 == 9) begin
        // Outside the picture: nothing is captured.
        req_row = (t % 20 == 9) ? 16'(ROWS + 3) : 16'(r);
        req_col = (t % 20 == 9) ? 16'(c) : 16'(COLS + 1);
        frame();
        checks++;
        if (fix_pix !== {8'h5A, last_rc} || float_pix !== (last_rc ^ 16'hA5A5)) begin
          failures++;
          $display("request outside the picture changed the held pixel to %h / %h", fix_pix, float_pix);
        end
        continue;
      end
      req_row = 16'(r);
      req_col = 16'(c);
      last_rc = {8'(r), 8'(c)};
      frame();
      checks += 2;
      if (fix_pix !== {8'h5A, 8'(r), 8'(c)}) begin
        failures++;
        $display("(%0d,%0d) fixed pixel %h", r, c, fix_pix);
      end
      if (float_pix !== ({8'(r), 8'(c)} ^ 16'hA5A5)) begin
        failures++;
        $display("(%0d,%0d) float pixel %h", r, c, float_pix);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
