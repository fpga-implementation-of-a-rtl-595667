// tb_f3_exp: checks the composite function f3 = 2^(c1*R)
// for the published degree-2 / 4-segment configuration and the degree-3 /
// 8-segment one. 8-bit pixel values (converted to float16 here) and random
// coefficients are streamed one per clock; results are compared with the
// exact function in real arithmetic and the D+5-cycle latency is checked.
module tb_f3_exp;
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
  logic [15:0] fp_r = '0, fp_g = '0, fp_b = '0, coef = '0;

  function automatic bit ok(logic [15:0] x_r, logic [15:0] x_g, logic [15:0] x_b,
                            logic [15:0] x_c, logic [15:0] got);
    real arg, want;
    arg  = fp_to_real(real_to_fp(fp_to_real(x_c) * fp_to_real(x_r)));
    want = $pow(2.0, arg);
    if (want >= 65536.0) return got == 16'h7C00;
    return close(fp_to_real(got), want, 5.0e-3, 0.0);
  endfunction

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int DEG = (c == 0) ? 2 : 3;
    localparam int NS  = (c == 0) ? 4 : 8;
    logic        ov;
    logic [15:0] f;
    f3_exp #(.D(DEG), .NSEG(NS)) dut (.clk, .rst, .in_valid, .c1(coef), .r(fp_r), .out_valid(ov), .f(f));

    logic [63:0] opq [$];
    int          cq [$];
    always @(posedge clk) begin
      if (!rst) begin
        if (in_valid) begin
          opq.push_back({fp_r, fp_g, fp_b, coef});
          cq.push_back(cycle);
        end
        if (ov) begin
          logic [63:0] o;
          int          ci;
          o  = opq.pop_front();
          ci = cq.pop_front();
          checks++;
          if (!ok(o[63:48], o[47:32], o[31:16], o[15:0], f)) begin
            failures++;
            if (failures < 10) $display("d=%0d: in %h -> %h (%f)", DEG, o, f, fp_to_real(f));
          end
          checks++;
          if (cycle - ci != DEG + 5) begin
            failures++;
            $display("latency %0d", cycle - ci);
          end
        end
      end
    end
  end

  task automatic send(logic [7:0] r8, logic [7:0] g8, logic [7:0] b8, logic [15:0] cf);
    @(negedge clk);
    fp_r = real_to_fp(real'(r8));
    fp_g = real_to_fp(real'(g8));
    fp_b = real_to_fp(real'(b8));
    coef = cf;
    in_valid = 1'b1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    send(8'd100, 8'd0, 8'd0, 16'h2717);
    send(8'd0, 8'd0, 8'd0, 16'h2717);
    send(8'd255, 8'd0, 8'd0, 16'h3C00);
    for (int i = 0; i < 2000; i++)
      send(8'($urandom), 8'($urandom), 8'($urandom), rand_fp(-9, -5, i % 4 == 0));
    @(negedge clk) in_valid = 1'b0;
    repeat (16) @(posedge clk);
    checks++;
    if (g_cfg[0].opq.size() != 0 || g_cfg[1].opq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
