// tb_engine_controller: sequencing of the indexing engine.
// The testbench stands in for the sub-modules (each answers its act signal
// with done after a few cycles and holds done until act drops) and walks
// the controller through: start, memory init, two query pixels, query end,
// candidate pixels, candidate end (distance, rank, clear, next), finish,
// restart, and a run that stops by itself when the database is full.
// It checks that exactly one sub-module is enabled at a time and that the
// order of activities matches the expected trace.
module tb_engine_controller;
  logic clk = 0, rst_n = 0;
  logic start = 0, finish = 0, pix_valid = 0, img_end = 0, full = 0;
  logic init_done, hist_done, dist_done, clr_done;
  logic ready, done, pix_load, init_act, hist_act, hist_query, dist_act;
  logic clear_act, rank_ins, idx_inc, op_clear;
  int checks = 0, failures = 0;
  string trace = "";

  engine_controller dut (.*);
  always #5ns clk = ~clk;

  // sub-module stand-ins: done two cycles after act, held while act
  logic [1:0] ci, ch, cd, cc;
  always_ff @(posedge clk) begin
    ci <= init_act  ? ((ci == 2) ? ci : ci + 1) : 0;
    ch <= hist_act  ? ((ch == 2) ? ch : ch + 1) : 0;
    cd <= dist_act  ? ((cd == 2) ? cd : cd + 1) : 0;
    cc <= clear_act ? ((cc == 2) ? cc : cc + 1) : 0;
  end
  assign init_done = (ci == 2);
  assign hist_done = (ch == 2);
  assign dist_done = (cd == 2);
  assign clr_done  = (cc == 2);

  // record each activity once per entry
  logic [7:0] prev;
  always @(posedge clk) begin
    prev <= {init_act, hist_act & hist_query, hist_act & !hist_query, dist_act, rank_ins, clear_act, idx_inc, done};
    if (init_act && !prev[7]) trace = {trace, "I"};
    if (hist_act && hist_query && !prev[6]) trace = {trace, "q"};
    if (hist_act && !hist_query && !prev[5]) trace = {trace, "c"};
    if (dist_act && !prev[4]) trace = {trace, "D"};
    if (rank_ins && !prev[3]) trace = {trace, "R"};
    if (clear_act && !prev[2]) trace = {trace, "C"};
    if (idx_inc && !prev[1]) trace = {trace, "N"};
    if (done && !prev[0]) trace = {trace, "F"};
    if (rst_n && ($countones({init_act, hist_act, dist_act, clear_act, rank_ins, idx_inc}) > 1)) begin
      failures++;
      $display("FAIL two activities at once");
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_ready();
    automatic int n = 0;
    while (!ready && n < 100) begin @(negedge clk); n++; end
    check(ready, "ready reached");
  endtask

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  task automatic pixel();
    wait_ready();
    pix_valid = 1;
    #1 check(pix_load, "pixel accepted while ready");
    @(negedge clk); pix_valid = 0;
    check(!ready, "busy after pixel");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!ready && !done, "idle after reset");
    pulse(start);
    check(op_clear, "ranker/counter cleared at start");
    pixel(); pixel();
    wait_ready(); pulse(img_end);            // query image ends
    pixel(); pixel(); pixel();
    wait_ready(); pulse(img_end);            // candidate 0 ends
    pixel();
    wait_ready(); pulse(img_end);            // candidate 1 ends
    wait_ready(); pulse(finish);
    @(negedge clk);
    check(done, "done after finish");
    check(trace == "IqqcccDRCNcDRCNF", {"trace 1: ", trace});
    trace = "";
    pulse(start);                            // restart from DONE
    wait_ready(); pulse(img_end);            // empty query
    full = 1;                                // counter reports full
    wait_ready(); pulse(img_end);            // last candidate
    repeat (20) @(negedge clk);
    check(done, "done when database full");
    check(trace == "IDRCNF", {"trace 2: ", trace});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
