// tb_splitter: every flag combination with random bytes; exactly one
// output kind per valid byte, with image end taking priority over header.
module tb_splitter;
  logic in_valid, in_is_head, in_imgend;
  logic [7:0] in_data;
  logic hdr_valid, dat_valid, end_valid;
  logic [7:0] hdr_data, dat_data;
  int checks = 0, failures = 0;

  splitter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 512; n++) begin
      {in_valid, in_is_head, in_imgend} = 3'(n);
      in_data = $urandom;
      #1;
      check(end_valid == (in_valid && in_imgend), "end_valid");
      check(hdr_valid == (in_valid && in_is_head && !in_imgend), "hdr_valid");
      check(dat_valid == (in_valid && !in_is_head && !in_imgend), "dat_valid");
      if (hdr_valid) check(hdr_data == in_data, "header byte");
      if (dat_valid) check(dat_data == in_data, "data byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
