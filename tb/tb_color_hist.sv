// tb_color_hist: histogram builder against a software histogram.
// A model RAM with one-cycle registered read is attached; the testbench
// plays rgb_separate (comp follows comp_sel from a held pixel). Random
// pixels are added one at a time; after each, go-to-done latency must be 7
// cycles, and at the end every one of the 48 bins must equal the count of
// pixels whose component falls in that 16-wide interval. A second run with
// DW = 3 checks that bins saturate at 7.
module tb_color_hist;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clk = 0;
  always #5ns clk = ~clk;

  // ---- unit under test, full width ----
  localparam int DW = 12, AW = 6;
  logic rst_n = 0, go = 0, done, we;
  logic [1:0] comp_sel;
  logic [7:0] comp;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata, rdata;
  logic [23:0] pix;
  logic [DW-1:0] mem [48];

  color_hist #(.DW(DW), .AW(AW)) dut (.*);
  assign comp = (comp_sel == 0) ? pix[23:16] : (comp_sel == 1) ? pix[15:8] : pix[7:0];
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= we ? wdata : mem[addr];
  end

  // ---- second instance, 3-bit bins ----
  logic go3 = 0, done3, we3;
  logic [1:0] sel3;
  logic [7:0] comp3;
  logic [AW-1:0] addr3;
  logic [2:0] wdata3, rdata3;
  logic [2:0] mem3 [48];
  color_hist #(.DW(3), .AW(AW)) dut3 (.clk, .rst_n, .go(go3), .done(done3),
    .comp_sel(sel3), .comp(comp3), .addr(addr3), .we(we3), .wdata(wdata3), .rdata(rdata3));
  assign comp3 = pix[23:16];   // same value on all three components
  always_ff @(posedge clk) begin
    if (we3) mem3[addr3] <= wdata3;
    rdata3 <= we3 ? wdata3 : mem3[addr3];
  end

  int ref_h [48];

  task automatic add_pixel(input logic [23:0] p, input bit narrow);
    automatic int cyc = 0;
    @(negedge clk);
    pix = p;
    if (narrow) go3 = 1; else go = 1;
    do begin @(negedge clk); cyc++; end while (!(narrow ? done3 : done) && cyc < 50);
    check(cyc == 7, $sformatf("latency %0d", cyc));
    go = 0; go3 = 0;
    @(negedge clk);
  endtask

  initial begin
    for (int a = 0; a < 48; a++) begin mem[a] = '0; mem3[a] = '0; ref_h[a] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      automatic logic [23:0] p = $urandom;
      if (n % 7 == 0) p[23:16] = 8'hFF;   // corner of the last interval
      if (n % 11 == 0) p[7:0] = 8'h00;
      add_pixel(p, 0);
      ref_h[0  + p[23:20]]++;
      ref_h[16 + p[15:12]]++;
      ref_h[32 + p[7:4]]++;
    end
    for (int a = 0; a < 48; a++)
      check(int'(mem[a]) == ref_h[a], $sformatf("bin %0d: %0d vs %0d", a, mem[a], ref_h[a]));
    // saturation: 10 identical pixels into 3-bit bins
    for (int n = 0; n < 10; n++) add_pixel(24'h5A0000, 1);
    check(mem3[5] == 3'd7,  $sformatf("R bin saturates: %0d", mem3[5]));
    check(mem3[16 + 5] == 3'd7, "G bin saturates");
    check(mem3[32 + 5] == 3'd7, "B bin saturates");
    check(mem3[4] == 3'd0, "neighbour bin untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
