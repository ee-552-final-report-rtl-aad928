// tb_disp_led: the rank picked by the switch shown in decimal.
// Random labels for each rank; the two digits must read tens and units of
// the selected label once show is high, and dashes before that or for an
// empty rank. Runs with RANKS = 4 (two switch bits).
module tb_disp_led;
  localparam int RANKS = 4, IDX_W = 6;
  logic [1:0] position;
  logic show;
  logic [IDX_W-1:0] rank_idx [RANKS];
  logic [RANKS-1:0] rank_valid;
  logic [7:0] led0, led1;
  int checks = 0, failures = 0;
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg"};

  disp_led #(.RANKS(RANKS), .IDX_W(IDX_W)) dut (.*);

  function automatic logic [7:0] pattern(input string s);
    logic [7:0] p = 8'hFF;
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
    for (int n = 0; n < 400; n++) begin
      for (int k = 0; k < RANKS; k++) rank_idx[k] = IDX_W'($urandom);
      rank_valid = 4'($urandom);
      show = ($urandom_range(3) != 0);
      position = 2'($urandom);
      #1;
      checks++;
      if (show && rank_valid[position]) begin
        automatic int l = rank_idx[position];
        if (led0 !== pattern(lit[l / 10]) || led1 !== pattern(lit[l % 10])) begin
          failures++;
          $display("FAIL label %0d shown as %b %b", l, led0, led1);
        end
      end else if (led0 !== pattern("g") || led1 !== pattern("g")) begin
        failures++;
        $display("FAIL dashes expected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
