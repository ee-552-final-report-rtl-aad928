// tb_led_hex: each digit's lit segments against a segment-letter table.
// The expected patterns are written as the letters of the lit segments
// (a top, b upper right, c lower right, d bottom, e lower left, f upper
// left, g middle), so the check does not reuse the decoder's bit encoding.
module tb_led_hex;
  logic [3:0] val;
  logic dash;
  logic [7:0] seg;
  int checks = 0, failures = 0;
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  led_hex dut (.*);

  function automatic logic [7:0] pattern(input string s);
    logic [7:0] p = 8'hFF;            // active low, all off
    for (int i = 0; i < s.len(); i++) p[s[i] - "a"] = 1'b0;
    return p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      val = 4'(v); dash = 0; #1;
      checks++;
      if (seg !== pattern(lit[v])) begin failures++; $display("FAIL digit %h: %b", v, seg); end
      dash = 1; #1;
      checks++;
      if (seg !== pattern("g")) begin failures++; $display("FAIL dash with %h", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
