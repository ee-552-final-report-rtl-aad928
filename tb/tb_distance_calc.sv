// tb_distance_calc: L1 distance against a software sum.
// Two model RAMs (one-cycle registered read) hold random histograms; the
// result must equal sum |q - c| over the 48 words, capped at 2^DW - 1, and
// arrive WORDS + 2 cycles after go (one pass plus pipeline drain).
// Includes identical histograms (distance 0) and a saturating case.
module tb_distance_calc;
  localparam int DW = 12, AW = 6, WORDS = 48;
  logic clk = 0, rst_n = 0, go = 0, done;
  logic [AW-1:0] addr;
  logic [DW-1:0] q_rdata, c_rdata, l1_dist;
  logic [DW-1:0] qm [WORDS], cm [WORDS];
  int checks = 0, failures = 0;

  distance_calc #(.DW(DW), .AW(AW), .WORDS(WORDS)) dut (.*);
  always #5ns clk = ~clk;
  always_ff @(posedge clk) begin
    q_rdata <= qm[addr];
    c_rdata <= cm[addr];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      automatic int sum = 0, cyc = 0, lim = (t % 3 == 0) ? 4095 : 150;
      for (int a = 0; a < WORDS; a++) begin
        qm[a] = DW'($urandom_range(lim));
        cm[a] = (t == 1) ? qm[a] : DW'($urandom_range(lim));
        sum += (qm[a] > cm[a]) ? qm[a] - cm[a] : cm[a] - qm[a];
      end
      if (sum > 4095) sum = 4095;
      @(negedge clk) go = 1;
      do begin @(negedge clk); cyc++; end while (!done && cyc < 200);
      check(cyc == WORDS + 2, $sformatf("latency %0d", cyc));
      check(int'(l1_dist) == sum, $sformatf("test %0d: dist %0d expected %0d", t, l1_dist, sum));
      go = 0;
      repeat (2) @(negedge clk);
      check(int'(l1_dist) == sum, "result held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
