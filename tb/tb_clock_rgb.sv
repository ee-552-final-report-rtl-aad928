// tb_clock_rgb: phase steps 0,1,2,0,... once per vsync pulse start, and
// holds through long pulses and between pulses.
module tb_clock_rgb;
  logic clk = 0, rst_n = 0, vsync_n = 1;
  logic [1:0] phase;
  int checks = 0, failures = 0;

  clock_rgb dut (.*);
  always #5ns clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (phase != 0) failures++;
    for (int n = 1; n <= 30; n++) begin
      repeat ($urandom_range(20, 3)) @(negedge clk);
      vsync_n = 0;
      repeat ($urandom_range(10, 1)) @(negedge clk);
      vsync_n = 1;
      @(negedge clk);
      checks++;
      if (phase != 2'(n % 3)) begin failures++; $display("FAIL pulse %0d phase %0d", n, phase); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
