// tb_syncgen: raster timing at the default 500 x 271 setting.
// Measures line and frame periods, sync widths and positions and the number
// of visible pixels per line and per frame over three frames.
module tb_syncgen;
  logic clk = 0, rst_n = 0;
  logic [9:0] hcount, vcount;
  logic hsync_n, vsync_n, video_on;
  int checks = 0, failures = 0;

  syncgen dut (.*);
  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int t = 0, last_h = -1, last_v = -1, hlow = 0, vlow = 0, vis = 0, lines = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (t = 0; t < 3 * 500 * 271 + 10; t++) begin
      @(negedge clk);
      if (!hsync_n) hlow++;
      if (!vsync_n) vlow++;
      if (video_on) vis++;
      // falling edge of hsync
      if (!hsync_n && hlow == 1) begin
        if (last_h >= 0) check(t - last_h == 500, $sformatf("line period %0d", t - last_h));
        check(hcount == 410, $sformatf("hsync starts at %0d", hcount));
        last_h = t; lines++;
      end
      if (hsync_n && hlow > 0) begin check(hlow == 60, $sformatf("hsync width %0d", hlow)); hlow = 0; end
      if (!vsync_n && vlow == 1) begin
        if (last_v >= 0) begin
          check(t - last_v == 500 * 271, $sformatf("frame period %0d", t - last_v));
          check(vis == 400 * 240, $sformatf("visible pixels %0d", vis));
        end
        check(vcount == 250 && hcount == 0, "vsync starts at line 250");
        last_v = t; vis = 0;
      end
      if (vsync_n && vlow > 0) begin check(vlow == 2 * 500, $sformatf("vsync width %0d", vlow)); vlow = 0; end
    end
    check(lines > 800, "lines counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
