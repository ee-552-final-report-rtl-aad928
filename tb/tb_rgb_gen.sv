// tb_rgb_gen: every level and phase against the dithering table
// (rows: phase 0,1,2; columns: level 0..3), and dark outside the picture.
module tb_rgb_gen;
  logic [1:0] r2, g2, b2, phase;
  logic video_on, r, g, b;
  int checks = 0, failures = 0;
  // table[phase][level]
  bit table_ [3][4] = '{'{0, 0, 0, 1}, '{0, 0, 1, 1}, '{0, 1, 1, 1}};

  rgb_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++)
      for (int n = 0; n < 64; n++) begin
        {r2, g2, b2} = 6'(n); phase = 2'(p); video_on = 1; #1;
        checks++;
        if ({r, g, b} !== {table_[p][r2], table_[p][g2], table_[p][b2]}) begin
          failures++;
          $display("FAIL phase %0d levels %0d%0d%0d -> %b", p, r2, g2, b2, {r, g, b});
        end
        video_on = 0; #1;
        checks++;
        if ({r, g, b} !== 3'b000) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
