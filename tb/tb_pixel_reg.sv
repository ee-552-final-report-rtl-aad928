// tb_pixel_reg: byte stream to pixels with a slow, random consumer.
// Random bytes are offered every cycle the register is ready; the consumer
// takes pixels after random delays. Pixels must come out as {R,G,B} of
// consecutive byte triples, none lost or repeated, and no byte may be
// accepted while a pixel waits. clear in the middle drops a partial pixel.
module tb_pixel_reg;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_ready, pix_valid, pix_taken = 0;
  logic [7:0] in_byte = '0;
  logic [23:0] pix;
  int checks = 0, failures = 0, stalls = 0;
  logic [7:0] bytes [$];

  pixel_reg dut (.*);
  always #5ns clk = ~clk;

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

  always @(negedge clk) begin
    if (pix_valid && !pix_taken && $urandom_range(4) == 0) begin
      logic [23:0] exp;
      exp = {bytes[0], bytes[1], bytes[2]};
      repeat (3) void'(bytes.pop_front());
      check(pix == exp, $sformatf("pixel %06h expected %06h", pix, exp));
      pix_taken = 1;
    end else pix_taken = 0;
  end
  always @(posedge clk) begin
    if (in_valid && !in_ready) stalls++;
    if (in_valid && in_ready) check(!pix_valid, "byte accepted while a pixel waits");
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 900; n++) begin
      in_byte = $urandom; in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      bytes.push_back(in_byte);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (30) @(negedge clk);
    check(bytes.size() == 0 && !pix_valid, "all pixels delivered");
    check(stalls > 0, "byte stream was held off at least once");
    // partial pixel dropped by clear
    in_byte = 8'h11; in_valid = 1; @(negedge clk);
    in_valid = 0; clear = 1; @(negedge clk); clear = 0;
    bytes = {8'h21, 8'h22, 8'h23};
    for (int k = 0; k < 3; k++) begin in_byte = bytes[k]; in_valid = 1; @(negedge clk); end
    in_valid = 0;
    repeat (40) @(negedge clk);
    check(bytes.size() == 0, "pixel after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
