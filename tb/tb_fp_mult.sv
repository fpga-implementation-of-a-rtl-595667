// tb_fp_mult: checks the floating-point multiplier against the truncated
// exact product computed in real arithmetic, including zero, infinity, NaN,
// overflow and underflow operands, and checks the 1-cycle latency.
module tb_fp_mult;
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
  logic [15:0] a = '0, b = '0, p;

  fp_mult dut (.clk, .rst, .in_valid, .a, .b, .out_valid, .p);

  typedef struct { logic [15:0] a, b; int cyc; } item_t;
  item_t q [$];

  function automatic logic [15:0] expected(logic [15:0] x, logic [15:0] y);
    if (is_nan(x) || is_nan(y)) return 16'h7E00;
    if ((is_inf(x) && y[14:10] == 0) || (is_inf(y) && x[14:10] == 0)) return 16'h7E00;
    if (is_inf(x) || is_inf(y)) return {x[15] ^ y[15], 5'h1F, 10'd0};
    return {x[15] ^ y[15], 15'd0} | (real_to_fp(fp_to_real(x) * fp_to_real(y)) & 16'h7FFF);
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid) q.push_back('{a, b, cycle});
      if (out_valid) begin
        item_t it;
        logic [15:0] want;
        it   = q.pop_front();
        want = expected(it.a, it.b);
        checks++;
        if (p !== want) begin
          failures++;
          if (failures < 10) $display("%h * %h = %h, want %h", it.a, it.b, p, want);
        end
        checks++;
        if (cycle - it.cyc != 1) begin
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
    send(16'h3C00, 16'h3C00);          // 1 * 1
    send(16'h4000, 16'hC200);          // 2 * -3
    send(16'h0000, 16'h5000);          // 0 * 32
    send(16'h7C00, 16'h4000);          // inf * 2
    send(16'h7C00, 16'h0000);          // inf * 0
    send(16'h7E00, 16'h3C00);          // NaN * 1
    send(16'h7800, 16'h7800);          // overflow
    send(16'h0400, 16'h0400);          // underflow
    for (int i = 0; i < 2000; i++) send(rand_fp(-7, 7, 1'b1), rand_fp(-7, 7, 1'b1));
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
