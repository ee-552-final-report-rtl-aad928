// tb_tcu_controller: directed walk through the control unit's states.
// Drives the decoded byte kinds directly and checks the control outputs:
// reset line, start pulse on a query header, data bytes taken only while
// the pixel register is ready, image end only once the last pixel has gone
// and the engine is ready, finish on end-of-database, and DONE on a full
// database.
module tb_tcu_controller;
  logic clk = 0, rst_n = 0, transfer = 1;
  logic byte_valid = 0, hdr_valid = 0, dat_valid = 0, end_valid = 0;
  logic is_query = 0, is_cand = 0, is_last = 0;
  logic pr_in_ready = 1, pr_pix_valid = 0, eng_ready = 0, eng_done = 0, push_done = 0;
  logic byte_taken, pr_in_valid, pr_clear, eng_start, eng_img_end, eng_finish, pc_reset, op_active;
  int checks = 0, failures = 0;

  tcu_controller dut (.*);
  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle_inputs();
    byte_valid = 0; hdr_valid = 0; dat_valid = 0; end_valid = 0;
    is_query = 0; is_cand = 0; is_last = 0;
  endtask

  task automatic hdr(input int kind);   // 1 query, 2 cand, 3 last
    byte_valid = 1; hdr_valid = 1;
    is_query = (kind == 1); is_cand = (kind == 2); is_last = (kind == 3);
    #1 check(byte_taken, "header taken at once");
    @(negedge clk) idle_inputs();
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
    repeat (3) @(negedge clk);
    check(pc_reset, "reset line held while TRANSFER high");
    transfer = 0;
    @(negedge clk);
    check(!pc_reset, "reset line released");
    transfer = 1;
    hdr(1);
    check(eng_start && pr_clear, "start pulse");
    @(negedge clk);
    check(!eng_start, "start is one cycle");
    byte_valid = 1; dat_valid = 1;
    #1 check(!byte_taken, "data waits for the engine to be ready");
    @(negedge clk) eng_ready = 1;
    @(negedge clk);
    #1 check(byte_taken && pr_in_valid, "data byte to pixel register");
    pr_in_ready = 0;
    #1 check(!byte_taken, "data byte held while pixel register full");
    @(negedge clk) pr_in_ready = 1;
    #1 check(byte_taken, "data byte taken again");
    @(negedge clk) idle_inputs();
    byte_valid = 1; end_valid = 1; pr_pix_valid = 1;
    @(negedge clk);
    #1 check(!byte_taken && !eng_img_end, "image end waits for the last pixel");
    pr_pix_valid = 0; eng_ready = 0;
    @(negedge clk);
    #1 check(!eng_img_end, "image end waits for the engine");
    eng_ready = 1;
    #1 check(eng_img_end && byte_taken && pr_clear, "image end");
    @(negedge clk) idle_inputs();
    hdr(2);
    check(!eng_start, "candidate header does not restart");
    byte_valid = 1; end_valid = 1;
    @(negedge clk);
    #1 check(eng_img_end, "empty candidate image");
    @(negedge clk) idle_inputs();
    hdr(3);
    #1 check(eng_finish, "finish on end-of-database header");
    @(negedge clk);
    @(negedge clk);
    check(!op_active, "operation over");
    // second operation ends by a full database
    hdr(1);
    @(negedge clk);
    check(op_active, "operation active");
    byte_valid = 1; end_valid = 1;
    forever begin #1; if (byte_taken) break; @(negedge clk); end
    @(negedge clk) idle_inputs();
    eng_done = 1;
    repeat (2) @(negedge clk);
    check(!op_active, "full database ends the operation");
    eng_done = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
