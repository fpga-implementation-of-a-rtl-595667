// tb_fp_max: checks max(x,1) exhaustively over all 65536 float16 codes
// against a real-valued reference.
module tb_fp_max;
  import tb_fp_pkg::*;

  int checks = 0, failures = 0;
  logic [15:0] x, y;

  fp_max dut (.x, .y);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      logic [15:0] want;
      x = 16'(i);
      #1;
      if (is_nan(x))                 want = x;
      else if (is_inf(x))            want = x[15] ? 16'h3C00 : x;
      else if (fp_to_real(x) >= 1.0) want = x;
      else                           want = 16'h3C00;
      checks++;
      if (y !== want) begin
        failures++;
        if (failures < 10) $display("max(%h,1) = %h, want %h", x, y, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
