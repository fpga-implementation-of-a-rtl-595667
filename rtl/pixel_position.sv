// pixel_position: row/column counter driven by the video timing signals.
//
// The column counts the pixels of a line while the data-enable (VDE) is high
// and returns to 0 when VDE falls; the fall also advances the row. A high
// vertical sync returns the row to 0 for the next frame. So (row, col) is the
// position of the pixel presented together with VDE.
//
// Interface: vde and vsync from the video stream; row/col are valid while vde
// is high. Timing: one register stage; row/col refer to the current pixel.
module pixel_position #(
  parameter int unsigned POS_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             vde,
  input  logic             vsync,
  output logic [POS_W-1:0] row,
  output logic [POS_W-1:0] col
);

  logic vde_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      vde_q <= 1'b0;
      row   <= '0;
      col   <= '0;
    end else begin
      vde_q <= vde;
      if (vde) col <= col + 1'b1;
      else     col <= '0;
      if (vsync)             row <= '0;
      else if (vde_q && !vde) row <= row + 1'b1;
    end
  end

endmodule
