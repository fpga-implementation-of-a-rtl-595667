// tb_fp_add: checks the six-stage floating-point adder against the exact sum
// computed in real arithmetic (within one unit in the last place, since the
// adder truncates after keeping three guard bits), covering like and unlike
// signs, cancellation to zero, large exponent differences, infinities and
// NaN, and checks the 6-cycle latency with a stream of one sum per clock.
module tb_fp_add;
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

  logic        in_valid = 1'b0, out_valid;
  logic [15:0] a = '0, b = '0, s;

  fp_add dut (.clk, .rst, .in_valid, .a, .b, .out_valid, .s);

  typedef struct { logic [15:0] a, b; int cyc; } item_t;
  item_t q [$];

  function automatic bit ok(logic [15:0] x, logic [15:0] y, logic [15:0] got);
    real want;
    if (is_nan(x) || is_nan(y) || (is_inf(x) && is_inf(y) && x[15] != y[15])) return is_nan(got);
    if (is_inf(x)) return got == x;
    if (is_inf(y)) return got == y;
    want = fp_to_real(x) + fp_to_real(y);
    if (want == 0.0) return got == 16'h0000;
    return close(fp_to_real(got), want, 2.0 ** -9, 0.0);
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid) q.push_back('{a, b, cycle});
      if (out_valid) begin
        item_t it;
        it = q.pop_front();
        checks++;
        if (!ok(it.a, it.b, s)) begin
          failures++;
          if (failures < 10) $display("%h + %h = %h (%f)", it.a, it.b, s, fp_to_real(s));
        end
        checks++;
        if (cycle - it.cyc != 6) begin
          failures++;
          $display("latency %0d", cycle - it.cyc);
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
    send(16'h3C00, 16'h3C00);          // 1 + 1
    send(16'h4200, 16'hC200);          // 3 - 3 = 0
    send(16'h5BF8, 16'h5BF8);          // 255 + 255
    send(16'h6000, 16'h1400);          // huge exponent difference
    send(16'h7C00, 16'h4000);          // inf + 2
    send(16'h7C00, 16'hFC00);          // inf - inf
    send(16'h3C01, 16'hBC00);          // cancellation to one ulp
    send(16'h0000, 16'h4500);          // 0 + 5
    for (int i = 0; i < 3000; i++) send(rand_fp(-6, 8, 1'b1), rand_fp(-6, 8, 1'b1));
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
