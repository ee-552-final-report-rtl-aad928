// tb_eab_ram: checks the histogram RAM's registered read and write-through.
// Writes random words to every address, reads them back (data one cycle
// after the address), and checks that a write shows its data on rdata.
module tb_eab_ram;
  localparam int DW = 12, AW = 6, WORDS = 48;
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  eab_ram #(.DW(DW), .AW(AW), .WORDS(WORDS)) dut (.*);

  always #5ns clk = ~clk;

  task automatic check(input logic [DW-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 3; round++) begin
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk);
        we = 1; addr = AW'(a); wdata = DW'($urandom); ref_mem[a] = wdata;
        @(posedge clk); #1;
        check(rdata, ref_mem[a], "write-through");
      end
      @(negedge clk) we = 0;
      for (int k = 0; k < 100; k++) begin
        automatic int a = $urandom_range(WORDS - 1);
        @(negedge clk) addr = AW'(a);
        @(posedge clk); #1;
        check(rdata, ref_mem[a], "read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
