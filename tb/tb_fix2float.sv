// tb_fix2float: checks fixed-to-float conversion in two configurations:
// 9-bit signed integers (every code, exhaustively) and unsigned numbers with
// 6 integer and 16 fractional bits (random, as used by the logarithm). The
// reference is the truncated float16 of the exact value. Also checks the
// 1-cycle latency.
module tb_fix2float;
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
  logic [8:0]  xi = '0;
  logic [21:0] xf = '0;
  logic        vi, vf;
  logic [15:0] yi, yf;

  fix2float #(.IW(9), .FW(0), .SIGNED(1'b1)) dut_i (
    .clk, .rst, .in_valid, .fix_in(xi), .out_valid(vi), .flt_out(yi)
  );
  fix2float #(.IW(6), .FW(16), .SIGNED(1'b0)) dut_f (
    .clk, .rst, .in_valid, .fix_in(xf), .out_valid(vf), .flt_out(yf)
  );

  typedef struct { logic [8:0] xi; logic [21:0] xf; int cyc; } item_t;
  item_t q [$];

  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid) q.push_back('{xi, xf, cycle});
      if (vi) begin
        item_t it;
        logic [15:0] wi, wf;
        it = q.pop_front();
        wi = real_to_fp(real'(signed'(it.xi)));
        wf = real_to_fp(real'(it.xf) / 65536.0);
        checks += 3;
        if (yi !== wi) begin
          failures++;
          if (failures < 10) $display("int %0d -> %h, want %h", signed'(it.xi), yi, wi);
        end
        if (yf !== wf || !vf) begin
          failures++;
          if (failures < 10) $display("fix %h -> %h, want %h", it.xf, yf, wf);
        end
        if (cycle - it.cyc != 1) failures++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      xi = 9'(i);
      xf = (i < 22) ? (22'd1 << i) : 22'($urandom);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
