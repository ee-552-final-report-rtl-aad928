// syncgen: horizontal and vertical sync generator for the VGA test unit.
//
// hcount runs 0..H_TOTAL-1 once per line, vcount 0..V_TOTAL-1 once per
// frame, both on the pixel clock. A line is H_VISIBLE active pixels, a front
// porch, an H_SYNC-wide sync pulse and a back porch; a frame likewise in
// lines. The defaults shorten the standard 800 x 525 raster to 500 x 271
// clocks and lines, which at 25.175 MHz refreshes at about 186 Hz: fast
// enough that the three-frame colour dithering of the test unit does not
// flicker. The totals come from that measured setting; the visible area,
// porches and sync widths are this design's choice. Syncs are active low.
module syncgen #(
  parameter int unsigned H_VISIBLE = 400,
  parameter int unsigned H_FRONT   = 10,
  parameter int unsigned H_SYNC    = 60,
  parameter int unsigned H_TOTAL   = 500,
  parameter int unsigned V_VISIBLE = 240,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_TOTAL   = 271
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       video_on
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (32'(hcount) == H_TOTAL - 1) begin
      hcount <= '0;
      vcount <= (32'(vcount) == V_TOTAL - 1) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign hsync_n  = !((32'(hcount) >= H_VISIBLE + H_FRONT) &&
                      (32'(hcount) <  H_VISIBLE + H_FRONT + H_SYNC));
  assign vsync_n  = !((32'(vcount) >= V_VISIBLE + V_FRONT) &&
                      (32'(vcount) <  V_VISIBLE + V_FRONT + V_SYNC));
  assign video_on = (32'(hcount) < H_VISIBLE) && (32'(vcount) < V_VISIBLE);

endmodule
