// tb_ram_manager: port multiplexers of the two histogram RAMs.
// Random requests from all four users and random control combinations;
// each RAM port must carry the request of the owner the decode rule picks
// (init > clear > histogram > distance; clear and a candidate histogram
// never reach the query RAM), with write data 0 for the clearing blocks
// and no write for the distance reader.
module tb_ram_manager;
  localparam int DW = 12, AW = 6;
  logic init_act, clear_act, hist_act, hist_query;
  logic [AW-1:0] init_addr, clr_addr, hist_addr, dist_addr;
  logic init_we, clr_we, hist_we;
  logic [DW-1:0] hist_wdata;
  logic [AW-1:0] q_addr, c_addr;
  logic q_we, c_we;
  logic [DW-1:0] q_wdata, c_wdata;
  int checks = 0, failures = 0;

  ram_manager #(.DW(DW), .AW(AW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [AW+DW:0] eq, ec;
      {init_act, clear_act, hist_act, hist_query} = 4'($urandom);
      init_addr = AW'($urandom); clr_addr = AW'($urandom);
      hist_addr = AW'($urandom); dist_addr = AW'($urandom);
      init_we = 1'($urandom); clr_we = 1'($urandom); hist_we = 1'($urandom);
      hist_wdata = DW'($urandom);
      #1;
      // expected query port
      if (init_act)                    eq = {init_addr, init_we, {DW{1'b0}}};
      else if (hist_act && hist_query) eq = {hist_addr, hist_we, hist_wdata};
      else                             eq = {dist_addr, 1'b0, {DW{1'b0}}};
      // expected candidate port
      if (init_act)                     ec = {init_addr, init_we, {DW{1'b0}}};
      else if (clear_act)               ec = {clr_addr, clr_we, {DW{1'b0}}};
      else if (hist_act && !hist_query) ec = {hist_addr, hist_we, hist_wdata};
      else                              ec = {dist_addr, 1'b0, {DW{1'b0}}};
      check({q_addr, q_we, q_wdata} == eq, $sformatf("query port, ctl %b", {init_act, clear_act, hist_act, hist_query}));
      check({c_addr, c_we, c_wdata} == ec, $sformatf("cand port, ctl %b", {init_act, clear_act, hist_act, hist_query}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
