// tb_index_counter: counts candidates up to the database limit.
// Increments MAX+3 times with gaps, checking idx after each step and that
// full rises exactly after MAX increments and then holds; then clear.
module tb_index_counter;
  localparam int IDX_W = 6, MAX = 64;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0;
  logic [IDX_W-1:0] idx;
  logic full;
  int checks = 0, failures = 0;

  index_counter #(.IDX_W(IDX_W), .MAX(MAX)) dut (.*);
  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      check(idx == 0 && !full, "after clear");
      for (int n = 1; n <= MAX + 3; n++) begin
        @(negedge clk) inc = 1;
        @(negedge clk) inc = 0;
        repeat ($urandom_range(2)) @(negedge clk);
        if (n < MAX) check(idx == IDX_W'(n) && !full, $sformatf("count %0d", n));
        else         check(full && idx == IDX_W'(MAX - 1), $sformatf("full at %0d", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
