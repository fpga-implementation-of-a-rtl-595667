// tb_fp_sqrt: checks the floating-point square root in the published
// degree-2 / 4-segment configuration and in the degree-3 / 8-segment one.
// Random operands and special values (zero, negative, infinity, NaN, range
// limits) are streamed one per clock into both instances; each result is
// compared with the exact value computed in real arithmetic, within the
// accuracy of the polynomial plus float16 truncation, and the D+3-cycle
// latency is checked for both.
module tb_fp_sqrt;
  import tb_fp_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        in_valid = 1'b0;
  logic [15:0] x = '0;

  function automatic bit ok(logic [15:0] x, logic [15:0] got);
    real want;
    if (is_nan(x)) return is_nan(got);
    if (x[14:10] == 0) return got == {x[15], 15'd0};
    if (x[15]) return is_nan(got);
    if (is_inf(x)) return got == 16'h7C00;
    want = $sqrt(fp_to_real(x));
    return close(fp_to_real(got), want, 3.0e-3, 0.0);
  endfunction

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int DEG = (c == 0) ? 2 : 3;
    localparam int NS  = (c == 0) ? 4 : 8;
    localparam int LAT = DEG + 3;
    logic        ov;
    logic [15:0] y;
    fp_sqrt #(.D(DEG), .NSEG(NS)) dut (.clk, .rst, .in_valid, .a(x), .out_valid(ov), .y(y));

    logic [15:0] xq [$];
    int          cq [$];
    always @(posedge clk) begin
      if (!rst) begin
        if (in_valid) begin
          xq.push_back(x);
          cq.push_back(cycle);
        end
        if (ov) begin
          logic [15:0] xi;
          int          ci;
          xi = xq.pop_front();
          ci = cq.pop_front();
          checks++;
          if (!ok(xi, y)) begin
            failures++;
            if (failures < 10) $display("d=%0d n=%0d: %h (%f) -> %h (%f)", DEG, NS, xi, fp_to_real(xi), y, fp_to_real(y));
          end
          checks++;
          if (cycle - ci != LAT) begin
            failures++;
            $display("latency %0d, want %0d", cycle - ci, LAT);
          end
        end
      end
    end
  end

  task automatic send(logic [15:0] v);
    @(negedge clk);
    x = v;
    in_valid = 1'b1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    send(16'h3C00);
    send(16'h4000);
    send(16'h4400);
    send(16'h0000);
    send(16'h8000);
    send(16'hC000);
    send(16'h7C00);
    send(16'h7E00);
    send(16'h7BFF);
    send(16'h0400);
    for (int i = 0; i < 2000; i++) send(rand_fp(-14, 15, i % 8 == 0));
    @(negedge clk) in_valid = 1'b0;
    repeat (12) @(posedge clk);
    checks++;
    if (g_cfg[0].xq.size() != 0 || g_cfg[1].xq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
