// tb_vga_test: the 64-colour pattern over three frames.
// For every visible pixel the number of frames (out of three consecutive
// ones) in which each of R, G, B is lit must equal that pixel's 2-bit
// level in the 8 x 8 tile pattern; outside the picture nothing is lit.
// The frame boundaries are taken from the vsync output.
module tb_vga_test;
  logic clk = 0, rst_n = 0, red, green, blue, hsync_n, vsync_n;
  int checks = 0, failures = 0;
  logic [1:0] cnt [3][240][400];

  vga_test dut (.*);
  always #5ns clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int x = 0, y = 0, frame = -1, lit_outside = 0;
    automatic logic vs_q = 1, hs_q = 1;
    for (int c = 0; c < 3; c++) for (int j = 0; j < 240; j++) for (int i = 0; i < 400; i++) cnt[c][j][i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // follow the raster from the outputs: x counts pixels after hsync
    // ends, y lines after vsync ends; the visible area starts 30 clocks
    // after hsync ends and 19 lines after the line in which vsync ends
    while (frame < 4) begin
      @(negedge clk);
      if (vs_q && !vsync_n) frame++;
      if (!vs_q && vsync_n) y = -19;
      if (!hs_q && hsync_n) begin x = -30; y++; end
      vs_q = vsync_n; hs_q = hsync_n;
      if (frame >= 1 && frame <= 3) begin
        if (x >= 0 && x < 400 && y >= 0 && y < 240) begin
          cnt[0][y][x] += 2'(red); cnt[1][y][x] += 2'(green); cnt[2][y][x] += 2'(blue);
        end else if (red || green || blue) lit_outside++;
      end
      x++;
    end
    for (int j = 0; j < 240; j++)
      for (int i = 0; i < 400; i++) begin
        automatic logic [5:0] colour = {3'(j / 32), 3'(i / 64)};
        checks++;
        if (cnt[0][j][i] != colour[5:4] || cnt[1][j][i] != colour[3:2] || cnt[2][j][i] != colour[1:0]) begin
          failures++;
          if (failures < 5) $display("FAIL pixel (%0d,%0d): %0d%0d%0d expected %0d%0d%0d", i, j,
                                      cnt[0][j][i], cnt[1][j][i], cnt[2][j][i],
                                      colour[5:4], colour[3:2], colour[1:0]);
        end
      end
    checks++;
    if (lit_outside != 0) begin failures++; $display("FAIL %0d lit samples outside", lit_outside); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
