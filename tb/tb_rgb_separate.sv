// tb_rgb_separate: loads random pixels and checks each selected component.
module tb_rgb_separate;
  logic clk = 0, rst_n = 0, load = 0;
  logic [23:0] pix = '0;
  logic [1:0] comp_sel = '0;
  logic [7:0] comp;
  int checks = 0, failures = 0;

  rgb_separate dut (.*);
  always #5ns clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] held;
    logic [7:0] exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    held = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      pix = $urandom;
      load = ($urandom_range(3) != 0);
      @(negedge clk);
      if (load) held = pix;
      load = 0;
      pix = $urandom;            // must not leak through without load
      for (int c = 0; c < 4; c++) begin
        comp_sel = 2'(c);
        #1;
        exp = (c == 0) ? held[23:16] : (c == 1) ? held[15:8] : (c == 2) ? held[7:0] : 8'h00;
        checks++;
        if (comp !== exp) begin
          failures++;
          $display("FAIL pixel %06h sel %0d: got %02h expected %02h", held, c, comp, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
