// tb_clock_scaledown: the divided clock has period 4 input clocks, 50 % duty.
module tb_clock_scaledown;
  logic clk_in = 0, clk_out;
  int checks = 0, failures = 0;

  clock_scaledown #(.DIV_LOG2(2)) dut (.*);
  always #5ns clk_in = ~clk_in;

  initial begin
    repeat (10000) @(posedge clk_in);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int run = 0, runs = 0;
    automatic logic prev;
    repeat (3) @(negedge clk_in);
    @(negedge clk_in);
    prev = clk_out;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk_in);
      run++;
      if (clk_out != prev) begin
        if (runs > 0) begin
          checks++;
          if (run != 2) begin failures++; $display("FAIL level held %0d input clocks", run); end
        end
        runs++; run = 0; prev = clk_out;
      end
    end
    checks++;
    if (runs < 150) begin failures++; $display("FAIL only %0d edges", runs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
