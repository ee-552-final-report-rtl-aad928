// tb_parport_test: a PC model sends random bytes through the four-phase
// handshake; after each one the two digits must show it in hexadecimal.
module tb_parport_test;
  logic clk = 0, rst_n = 0, pc_strobe = 0, pc_transfer = 1, pc_ack;
  logic [7:0] pc_data = '0, led0, led1;
  int checks = 0, failures = 0;
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  parport_test dut (.*);
  always #5ns clk = ~clk;

  function automatic logic [7:0] pattern(input string s);
    logic [7:0] p = 8'hFF;
    for (int i = 0; i < s.len(); i++) p[s[i] - "a"] = 1'b0;
    return p;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      pc_data = $urandom;
      @(negedge clk) pc_strobe = 1;
      while (!pc_ack) @(negedge clk);
      pc_strobe = 0;
      while (pc_ack) @(negedge clk);
      checks++;
      if (led0 !== pattern(lit[pc_data[7:4]]) || led1 !== pattern(lit[pc_data[3:0]])) begin
        failures++;
        $display("FAIL byte %02h shown as %b %b", pc_data, led0, led1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
