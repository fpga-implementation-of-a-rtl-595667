// tb_float2fix: checks float-to-fixed conversion in two configurations:
// 9-bit signed integers (used for the video output) over every float16 code,
// and 7 integer + 16 fractional bits (used by 2^x) on random codes. The
// reference truncates the exact value towards zero and saturates at the
// range limits; NaN and zero give 0. Also checks the 1-cycle latency.
module tb_float2fix;
  import tb_fp_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        in_valid = 1'b0;
  logic [15:0] x = '0, x2 = '0;
  logic        v1, v2;
  logic [8:0]  y1;
  logic [22:0] y2;

  float2fix #(.IW(9), .FW(0)) dut_i (
    .clk, .rst, .in_valid, .flt_in(x), .out_valid(v1), .fix_out(y1)
  );
  float2fix #(.IW(7), .FW(16)) dut_f (
    .clk, .rst, .in_valid, .flt_in(x2), .out_valid(v2), .fix_out(y2)
  );

  function automatic longint ref_fix(logic [15:0] f, int iw, int fw);
    real    v;
    longint hi, lo, t;
    hi = (longint'(1) << (iw + fw - 1)) - 1;
    lo = -(longint'(1) << (iw + fw - 1));
    if (is_nan(f) || f[14:10] == 0) return 0;
    if (is_inf(f)) return f[15] ? lo : hi;
    v = fp_to_real(f) * $pow(2.0, real'(fw));
    if (v >= real'(hi)) return hi;
    if (v <= real'(lo)) return lo;
    t = (v >= 0.0) ? longint'($rtoi(v)) : -longint'($rtoi(-v));
    return t;
  endfunction

  typedef struct { logic [15:0] x, x2; int cyc; } item_t;
  item_t q [$];

  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid) q.push_back('{x, x2, cycle});
      if (v1) begin
        item_t it;
        longint w1, w2;
        it = q.pop_front();
        w1 = ref_fix(it.x, 9, 0);
        w2 = ref_fix(it.x2, 7, 16);
        checks += 3;
        if (longint'(signed'(y1)) !== w1) begin
          failures++;
          if (failures < 10) $display("%h -> %0d, want %0d", it.x, signed'(y1), w1);
        end
        if (longint'(signed'(y2)) !== w2 || !v2) begin
          failures++;
          if (failures < 10) $display("%h -> %0d, want %0d (Q16)", it.x2, signed'(y2), w2);
        end
        if (cycle - it.cyc != 1) failures++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      x  = 16'(i);
      x2 = 16'($urandom);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
