// tb_fp_div: checks the floating-point divider in the published degree-2 /
// 4-segment configuration and in the degree-3 / 8-segment one. Random
// operand pairs and special cases (division by zero, 0/0, infinities, NaN,
// overflow, underflow) are streamed one per clock; quotients are compared with
// the exact value within the polynomial accuracy plus float16 truncation, and
// the D+4-cycle latency is checked.
module tb_fp_div;
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
  logic [15:0] a = '0, b = '0;

  function automatic bit ok(logic [15:0] x, logic [15:0] y, logic [15:0] got);
    real want;
    logic s;
    s = x[15] ^ y[15];
    if (is_nan(x) || is_nan(y)) return is_nan(got);
    if (x[14:10] == 0 && y[14:10] == 0) return is_nan(got);
    if (is_inf(x) && is_inf(y)) return is_nan(got);
    if (is_inf(x) || y[14:10] == 0) return got == {s, 5'h1F, 10'd0};
    if (x[14:10] == 0 || is_inf(y)) return got == {s, 15'd0};
    want = fp_to_real(x) / fp_to_real(y);
    if (want >= 65504.0 || want <= -65504.0) return is_inf(got) || close(fp_to_real(got), want, 3.0e-3, 0.0);
    if (want < $pow(2.0, -14.0) && want > -$pow(2.0, -14.0))
      return got[14:0] == 0 || close(fp_to_real(got), want, 3.0e-3, 0.0);
    return close(fp_to_real(got), want, 3.0e-3, 0.0);
  endfunction

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int DEG = (c == 0) ? 2 : 3;
    localparam int NS  = (c == 0) ? 4 : 8;
    logic        ov;
    logic [15:0] q;
    fp_div #(.D(DEG), .NSEG(NS)) dut (.clk, .rst, .in_valid, .a, .b, .out_valid(ov), .q);

    logic [31:0] opq [$];
    int          cq [$];
    always @(posedge clk) begin
      if (!rst) begin
        if (in_valid) begin
          opq.push_back({a, b});
          cq.push_back(cycle);
        end
        if (ov) begin
          logic [31:0] ops;
          int          ci;
          ops = opq.pop_front();
          ci  = cq.pop_front();
          checks++;
          if (!ok(ops[31:16], ops[15:0], q)) begin
            failures++;
            if (failures < 10) $display("d=%0d: %h / %h = %h (%f)", DEG, ops[31:16], ops[15:0], q, fp_to_real(q));
          end
          checks++;
          if (cycle - ci != DEG + 4) begin
            failures++;
            $display("latency %0d", cycle - ci);
          end
        end
      end
    end
  end

  task automatic send(logic [15:0] x, logic [15:0] y);
    @(negedge clk);
    a = x; b = y; in_valid = 1'b1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    send(16'h3C00, 16'h3C00);   // 1/1
    send(16'h4200, 16'h4000);   // 3/2
    send(16'hC500, 16'h3555);   // -5/0.333
    send(16'h4000, 16'h0000);   // 2/0
    send(16'h0000, 16'h0000);   // 0/0
    send(16'h0000, 16'h4000);   // 0/2
    send(16'h7C00, 16'h4000);   // inf/2
    send(16'h4000, 16'h7C00);   // 2/inf
    send(16'h7E00, 16'h4000);   // NaN/2
    send(16'h7800, 16'h0800);   // overflow
    send(16'h0800, 16'h7800);   // underflow
    for (int i = 0; i < 2000; i++) send(rand_fp(-7, 7, 1'b1), rand_fp(-7, 7, 1'b1));
    @(negedge clk) in_valid = 1'b0;
    repeat (12) @(posedge clk);
    checks++;
    if (g_cfg[0].opq.size() != 0 || g_cfg[1].opq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
