// pipe_delay: N-stage register chain used to keep side information (signs,
// exponents, flags, video sync) aligned with a pipelined datapath.
//
// Interface: d enters, q leaves N clock cycles later; N = 0 is a plain wire.
// All stages clear to zero on a synchronous reset.
module pipe_delay #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (N == 0) begin : g_wire
    assign q = d;
    logic unused_clk_rst;
    assign unused_clk_rst = clk ^ rst;
  end else begin : g_regs
    logic [W-1:0] r [N];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < N; i++) r[i] <= '0;
      end else begin
        r[0] <= d;
        for (int i = 1; i < N; i++) r[i] <= r[i-1];
      end
    end
    assign q = r[N-1];
  end

endmodule
