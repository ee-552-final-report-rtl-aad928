// tb_cand_mem_init: checks the clearing pass of cand_mem_init.
// A model RAM filled with non-zero words is attached; after go, every one of
// the 48 words must be written with 0 exactly once, done must come WORDS+1
// cycles after go, stay high while go is held and drop after go falls.
// Three passes are run.
module tb_cand_mem_init;
  localparam int AW = 6, WORDS = 48;
  logic clk = 0, rst_n = 0, go = 0, done, we;
  logic [AW-1:0] addr;
  int writes [WORDS];
  logic [7:0] mem [WORDS];
  int checks = 0, failures = 0;

  cand_mem_init #(.AW(AW), .WORDS(WORDS)) dut (.*);
  always #5ns clk = ~clk;

  always @(posedge clk) if (we) begin
    if (int'(addr) < WORDS) begin
      writes[addr]++;
      mem[addr] <= 8'h00;
    end else begin
      failures++;
      $display("FAIL write outside memory: %0d", addr);
    end
  end

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
    for (int pass = 0; pass < 3; pass++) begin
      automatic int cyc = 0;
      for (int a = 0; a < WORDS; a++) begin writes[a] = 0; mem[a] = 8'(a + 1); end
      @(negedge clk);
      check(!done && !we, "idle before go");
      go = 1;
      do begin @(negedge clk); cyc++; end while (!done && cyc < 200);
      check(cyc == WORDS + 1, $sformatf("latency %0d", cyc));
      for (int a = 0; a < WORDS; a++)
        check(writes[a] == 1 && mem[a] == 0, $sformatf("word %0d written %0d times", a, writes[a]));
      repeat (3) @(negedge clk);
      check(done && !we, "ready holds until go drops");
      go = 0;
      @(negedge clk);
      @(negedge clk);
      check(!done && !we, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
