// read_pixel: captures the pixel at a requested (row, col) so that the host
// can read it over SPI for numerical checks while video runs.
//
// Two position counters follow the video timing: one on the incoming stream
// (the 24-bit fixed-point RGB pixel) and one on the processed stream (the
// float16 result, whose sync signals are delayed by the datapath latency).
// When a counter reaches the requested position while its data-enable is
// high, the pixel of that stream is copied into a holding register, once per
// frame. Following the library's pixel read-back block; the two counters and
// the holding registers are this design's own arrangement.
//
// Interface: in_* is the input stream, out_* the processed stream; req_row,
// req_col the position; fix_pix/float_pix the held values.
// Timing: the holding registers update one clock after the pixel is present.
module read_pixel #(
  parameter int unsigned FLT_W = 16,
  parameter int unsigned POS_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [POS_W-1:0] req_row,
  input  logic [POS_W-1:0] req_col,
  input  logic             in_vde,
  input  logic             in_vsync,
  input  logic [23:0]      in_pix,
  input  logic             out_vde,
  input  logic             out_vsync,
  input  logic [FLT_W-1:0] out_pix,
  output logic [23:0]      fix_pix,
  output logic [FLT_W-1:0] float_pix
);

  logic [POS_W-1:0] in_row, in_col, out_row, out_col;

  pixel_position #(.POS_W(POS_W)) u_pos_in (
    .clk, .rst, .vde(in_vde), .vsync(in_vsync), .row(in_row), .col(in_col)
  );
  pixel_position #(.POS_W(POS_W)) u_pos_out (
    .clk, .rst, .vde(out_vde), .vsync(out_vsync), .row(out_row), .col(out_col)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      fix_pix   <= '0;
      float_pix <= '0;
    end else begin
      if (in_vde && in_row == req_row && in_col == req_col)
        fix_pix <= in_pix;
      if (out_vde && out_row == req_row && out_col == req_col)
        float_pix <= out_pix;
    end
  end

endmodule
