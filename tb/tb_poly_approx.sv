// tb_poly_approx: checks the piecewise polynomial approximator.
//
// Eight instances cover the four functions (reciprocal, log2, 2^x, sqrt) in
// the degree-2 / 4-segment configuration with the published coefficients and
// in the degree-3 / 8-segment configuration with elaboration-time fitted
// coefficients. Random inputs across each range are streamed one per clock;
// every output is compared with the exact function computed in real
// arithmetic here, and the latency (D+1 cycles) is checked.
module tb_poly_approx;
  import fplib_pkg::*;

  localparam int W = POLY_W;
  localparam int F = POLY_F;
  localparam int NV = 400;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real exact(int fsel, real x);
    case (fsel)
      0: return 1.0 / (1.0 + x);
      1: return $ln(1.0 + x) / $ln(2.0);
      2: return $pow(2.0, x);
      default: return $sqrt(x);
    endcase
  endfunction

  function automatic real lo_of(int fsel);
    return (fsel == 2) ? -1.0 : (fsel == 3) ? 1.0 : 0.0;
  endfunction
  function automatic real hi_of(int fsel);
    return (fsel == 3) ? 4.0 : 1.0;
  endfunction

  logic                in_valid;
  logic signed [W-1:0] xin [4];
  logic [7:0]          done;

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    for (genvar fsel = 0; fsel < 4; fsel++) begin : g_fn
      localparam int DEG = (c == 0) ? 2 : 3;
      localparam int NS  = (c == 0) ? 4 : 8;
      // Absolute tolerances: the published degree-2 tables are good to about
      // 3e-3 (log2 is the worst); the fitted cubics are limited by the
      // 16-bit fixed-point coefficients, still below float16 resolution.
      localparam real TOL = (c == 0) ? 4.0e-3 : 1.0e-3;
      logic                ov;
      logic signed [W-1:0] y;
      poly_approx #(.FUNC(poly_func_e'(fsel)), .D(DEG), .NSEG(NS), .W(W), .F(F)) dut (
        .clk, .rst, .in_valid, .x(xin[fsel]), .out_valid(ov), .y(y)
      );
      // Expected values and launch cycles in order of issue.
      real exp_q [$];
      int  cyc_q [$];
      always @(posedge clk) begin
        if (in_valid) begin
          exp_q.push_back(exact(fsel, real'(xin[fsel]) / (2.0 ** F)));
          cyc_q.push_back(cycle);
        end
        if (ov && !rst) begin
          real want, got;
          int  c0;
          want = exp_q.pop_front();
          c0   = cyc_q.pop_front();
          got  = real'(y) / (2.0 ** F);
          checks++;
          if (!(got - want <= TOL && want - got <= TOL)) begin
            failures++;
            if (failures < 20) $display("d=%0d n=%0d f=%0d: got %f want %f", DEG, NS, fsel, got, want);
          end
          checks++;
          if (cycle - c0 != DEG + 1) begin
            failures++;
            $display("latency %0d, want %0d", cycle - c0, DEG + 1);
          end
        end
      end
      assign done[c*4+fsel] = (exp_q.size() == 0);
    end
  end

  initial begin
    in_valid = 1'b0;
    for (int f = 0; f < 4; f++) xin[f] = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int f = 0; f < 4; f++) begin
        real lo, hi, xr;
        lo = lo_of(f);
        hi = hi_of(f);
        // Include both ends of the range in the first two samples.
        if (i == 0)      xr = lo;
        else if (i == 1) xr = hi - 1.0 / (2.0 ** F);
        else             xr = lo + (hi - lo) * real'($urandom_range(0, 65535)) / 65536.0;
        xin[f] = W'($rtoi(xr * (2.0 ** F) + ((xr < 0.0) ? -0.5 : 0.5)));
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    if (done != 8'hFF) begin
      failures++;
      $display("missing outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
