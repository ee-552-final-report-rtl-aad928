// tb_head_dec: all 256 header bytes against the header format.
module tb_head_dec;
  logic [7:0] hdr;
  logic is_query, is_cand, is_last, is_valid;
  int checks = 0, failures = 0;

  head_dec dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      automatic int kind = n / 64;
      hdr = 8'(n);
      #1;
      checks++;
      if ({is_query, is_cand, is_last, is_valid} !== {kind == 1, kind == 2, kind == 3, kind != 0}) begin
        failures++;
        $display("FAIL header %02h", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
