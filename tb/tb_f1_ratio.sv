// tb_f1_ratio: checks the composite function f1 = max(R,1)*max(G,1)/(max(R,1)+max(B,1))
// for the published degree-2 / 4-segment configuration and the degree-3 /
// 8-segment one. 8-bit pixel values (converted to float16 here) and random
// coefficients are streamed one per clock; results are compared with the
// exact function in real arithmetic and the D+10-cycle latency is checked.
module tb_f1_ratio;
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
    real r, g, b;
    r = fp_to_real(x_r); if (r < 1.0) r = 1.0;
    g = fp_to_real(x_g); if (g < 1.0) g = 1.0;
    b = fp_to_real(x_b); if (b < 1.0) b = 1.0;
    return close(fp_to_real(got), r * g / (r + b), 6.0e-3, 0.0);
  endfunction

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int DEG = (c == 0) ? 2 : 3;
    localparam int NS  = (c == 0) ? 4 : 8;
    logic        ov;
    logic [15:0] f;
    f1_ratio #(.D(DEG), .NSEG(NS)) dut (.clk, .rst, .in_valid, .r(fp_r), .g(fp_g), .b(fp_b), .out_valid(ov), .f(f));

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
          if (cycle - ci != DEG + 10) begin
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
    send(8'd210, 8'd211, 8'd213, 16'h3C00);
    send(8'd0, 8'd0, 8'd0, 16'h3C00);
    send(8'd255, 8'd255, 8'd0, 16'h3C00);
    for (int i = 0; i < 2000; i++)
      send(8'($urandom), 8'($urandom), 8'($urandom), 16'h3C00);
    @(negedge clk) in_valid = 1'b0;
    repeat (16) @(posedge clk);
    checks++;
    if (g_cfg[0].opq.size() != 0 || g_cfg[1].opq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
