// tb_ppi2pc: parallel-port handshake seen from the PC side.
// A PC model sends random bytes with random IMGEND / IS_HEAD flags: data and
// flags first, then STROBE, wait for ACK, drop STROBE, wait for ACK low.
// The consumer takes each byte after a random delay. Checks: every byte and
// its flags arrive once and in order; ACK never rises before the byte was
// taken; strobes while TRANSFER is low are ignored.
module tb_ppi2pc;
  logic clk = 0, rst_n = 0;
  logic [7:0] pc_data = '0;
  logic pc_strobe = 0, pc_imgend = 0, pc_is_head = 0, pc_transfer = 0;
  logic byte_valid, byte_is_head, byte_imgend, byte_taken = 0, pc_ack, transfer_s;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;
  logic [9:0] sent [$];
  int received = 0, taken_total = 0;

  ppi2pc dut (.*);
  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer
  always @(negedge clk) begin
    if (byte_valid && !byte_taken && $urandom_range(3) == 0) begin
      logic [9:0] exp;
      exp = sent.pop_front();
      check({byte_data, byte_imgend, byte_is_head} == exp,
            $sformatf("byte %0d: %0h expected %0h", received, {byte_data, byte_imgend, byte_is_head}, exp));
      received++;
      byte_taken = 1;
    end else byte_taken = 0;
  end
  always @(posedge clk) if (byte_taken) taken_total++;
  int ack_rises = 0;
  logic ack_q = 0;
  always @(posedge clk) begin
    ack_q <= pc_ack;
    if (pc_ack && !ack_q) begin
      ack_rises++;
      if (ack_rises > taken_total) begin failures++; $display("FAIL ack before byte taken"); end
    end
  end

  task automatic pc_send(input logic [7:0] d, input bit ie, input bit hd);
    pc_data = d; pc_imgend = ie; pc_is_head = hd;
    repeat ($urandom_range(3)) @(negedge clk);
    pc_strobe = 1;
    while (!pc_ack) @(negedge clk);
    pc_strobe = 0;
    while (pc_ack) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // strobes with TRANSFER low are ignored
    pc_data = 8'hAA; pc_strobe = 1;
    repeat (20) @(negedge clk);
    check(!byte_valid && !pc_ack, "ignored without TRANSFER");
    pc_strobe = 0;
    repeat (5) @(negedge clk);
    pc_transfer = 1;
    repeat (4) @(negedge clk);
    check(transfer_s, "transfer synchronised");
    for (int n = 0; n < 300; n++) begin
      automatic logic [7:0] d = $urandom;
      automatic bit ie = ($urandom_range(7) == 0), hd = ($urandom_range(5) == 0);
      sent.push_back({d, ie, hd});
      pc_send(d, ie, hd);
    end
    repeat (10) @(negedge clk);
    check(received == 300 && sent.size() == 0, $sformatf("received %0d of 300", received));
    check(ack_rises == 300, $sformatf("ack pulses %0d", ack_rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
