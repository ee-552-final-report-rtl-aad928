// tb_rank_sorter: insertion list against a software sorted list.
// Random (distance, label) pairs, with many ties, are inserted; after each
// insertion the list must hold the RANKS smallest distances in ascending
// order, with an earlier label ahead of a later one on equal distance, and
// empty positions marked invalid. Runs for RANKS = 2 and RANKS = 4.
module tb_rank_sorter;
  localparam int DW = 12, IDX_W = 6;
  logic clk = 0, rst_n = 0, clear = 0, ins = 0;
  logic [DW-1:0] new_dist = '0;
  logic [IDX_W-1:0] new_idx = '0;
  int checks = 0, failures = 0;

  logic [DW-1:0]    d2 [2], d4 [4];
  logic [IDX_W-1:0] i2 [2], i4 [4];
  logic [1:0] v2;
  logic [3:0] v4;

  rank_sorter #(.DW(DW), .RANKS(2), .IDX_W(IDX_W)) dut2 (.clk, .rst_n, .clear, .ins,
    .new_dist, .new_idx, .rank_dist(d2), .rank_idx(i2), .rank_valid(v2));
  rank_sorter #(.DW(DW), .RANKS(4), .IDX_W(IDX_W)) dut4 (.clk, .rst_n, .clear, .ins,
    .new_dist, .new_idx, .rank_dist(d4), .rank_idx(i4), .rank_valid(v4));
  always #5ns clk = ~clk;

  int ref_d [$], ref_i [$];

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
    for (int op = 0; op < 20; op++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      ref_d.delete(); ref_i.delete();
      check(v2 == 0 && v4 == 0, "cleared");
      for (int n = 0; n < 64; n++) begin
        automatic int d = (op % 2) ? $urandom_range(4095) : $urandom_range(20);
        automatic int pos = ref_d.size();
        new_dist = DW'(d); new_idx = IDX_W'(n); ins = 1;
        @(negedge clk) ins = 0;
        for (int k = 0; k < ref_d.size(); k++)
          if (ref_d[k] > d) begin pos = k; break; end
        ref_d.insert(pos, d); ref_i.insert(pos, n);
        for (int k = 0; k < 4; k++) begin
          automatic bit ev = (k < ref_d.size());
          if (k < 2) begin
            check(v2[k] == ev, "valid, 2 ranks");
            if (ev) check(int'(d2[k]) == ref_d[k] && int'(i2[k]) == ref_i[k],
                          $sformatf("op %0d n %0d rank %0d of 2: %0d/%0d vs %0d/%0d",
                                    op, n, k, d2[k], i2[k], ref_d[k], ref_i[k]));
          end
          check(v4[k] == ev, "valid, 4 ranks");
          if (ev) check(int'(d4[k]) == ref_d[k] && int'(i4[k]) == ref_i[k],
                        $sformatf("op %0d n %0d rank %0d of 4", op, n, k));
        end
        repeat ($urandom_range(1)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
