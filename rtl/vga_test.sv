// vga_test: 64-colour VGA display test unit.
//
// Shows a test pattern of all 64 colours that 2 bits per component give,
// on a VGA port with one bit per component. syncgen makes the raster
// (500 x 271 at the pixel clock by default, about 186 Hz), clock_rgb counts
// frames modulo 3, and rgb_gen dithers each 2-bit level over those three
// frames. The pattern is an 8 x 8 grid of colour tiles, 64 pixels wide and
// 32 lines high, colour = {row[2:0], column[2:0]} read as {R,G,B} with two
// bits each (the pattern is this design's choice). clk is the pixel clock.
module vga_test #(
  parameter int unsigned H_VISIBLE = 400,
  parameter int unsigned H_TOTAL   = 500,
  parameter int unsigned V_VISIBLE = 240,
  parameter int unsigned V_TOTAL   = 271
) (
  input  logic clk,
  input  logic rst_n,
  output logic red,
  output logic green,
  output logic blue,
  output logic hsync_n,
  output logic vsync_n
);

  logic [9:0] hcount, vcount;
  logic       video_on;
  logic [1:0] phase;
  logic [5:0] colour;

  syncgen #(
    .H_VISIBLE(H_VISIBLE), .H_TOTAL(H_TOTAL),
    .V_VISIBLE(V_VISIBLE), .V_TOTAL(V_TOTAL)
  ) u_sync (
    .clk, .rst_n, .hcount, .vcount, .hsync_n, .vsync_n, .video_on
  );

  clock_rgb u_phase (.clk, .rst_n, .vsync_n, .phase);

  assign colour = {vcount[7:5], hcount[8:6]};

  rgb_gen u_rgb (
    .r2(colour[5:4]), .g2(colour[3:2]), .b2(colour[1:0]), .phase, .video_on,
    .r(red), .g(green), .b(blue)
  );

endmodule
