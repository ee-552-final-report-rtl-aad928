// tb_tcu: top control unit between a byte source and an engine model.
// The testbench plays the port interface (offers a byte with flags, waits
// for byte_taken) and the engine (ready with random gaps, records pixels,
// starts, image ends and finish). Stream: a candidate header before any
// query (ignored), query header, query pixels, image end, candidate images,
// a stray header inside an image (dropped), end-of-database header; then a
// second operation ended by the push button. Checks the pixels the engine
// received, the event order, and that bytes are held off while the engine
// is busy.
module tb_tcu;
  logic clk = 0, rst_n = 0, transfer = 1;
  logic byte_valid = 0, byte_is_head = 0, byte_imgend = 0, byte_taken;
  logic [7:0] byte_data = '0;
  logic push_done_n = 1;
  logic eng_start, eng_finish, eng_img_end, eng_pix_valid, eng_ready, eng_done = 0;
  logic [23:0] eng_pix;
  logic pc_reset, op_active;
  int checks = 0, failures = 0, held_off = 0;
  logic [23:0] exp_pix [$];
  string events = "";

  tcu dut (.*);
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

  // engine model: after start, busy for 10 cycles (init); after each pixel
  // busy for a random time; ready otherwise
  int busy = 0;
  logic started = 0;
  assign eng_ready = started && busy == 0;
  always @(posedge clk) begin
    if (busy > 0) busy <= busy - 1;
    if (eng_start) begin started <= 1; busy <= 10; events = {events, "S"}; end
    if (eng_pix_valid && eng_ready) begin
      logic [23:0] e;
      e = exp_pix.pop_front();
      check(eng_pix == e, $sformatf("pixel %06h expected %06h", eng_pix, e));
      busy <= $urandom_range(8);
      events = {events, "p"};
    end
    if (eng_img_end) begin
      check(eng_ready && !eng_pix_valid, "image end only when engine idle");
      events = {events, "E"};
      busy <= 5;
    end
    if (eng_finish) begin events = {events, "F"}; eng_done <= 1; end
    if (eng_start) eng_done <= 0;
    if (byte_valid && !byte_taken && busy > 0) held_off++;
  end

  task automatic send(input logic [7:0] d, input bit hd, input bit ie);
    @(negedge clk);
    byte_data = d; byte_is_head = hd; byte_imgend = ie; byte_valid = 1;
    forever begin
      #1;
      if (byte_taken) break;
      @(negedge clk);
    end
    @(negedge clk) byte_valid = 0;
  endtask

  task automatic send_image(input int npix, input bit stray);
    for (int k = 0; k < npix; k++) begin
      automatic logic [23:0] p = $urandom;
      exp_pix.push_back(p);
      send(p[23:16], 0, 0);
      if (stray && k == 1) send(8'h80, 1, 0);
      send(p[15:8], 0, 0);
      send(p[7:0], 0, 0);
    end
    send(8'h00, 0, 1);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(pc_reset, "reset line to PC after reset");
    transfer = 0;
    repeat (4) @(negedge clk);
    check(!pc_reset, "reset line drops with TRANSFER low");
    transfer = 1;
    send(8'h80, 1, 0);                  // candidate header, no operation yet
    send(8'h12, 0, 0);                  // stray data, dropped
    send(8'h40, 1, 0);                  // query
    send_image(5, 0);
    send(8'h81, 1, 0); send_image(3, 1);
    send(8'h82, 1, 0); send_image(0, 0);
    send(8'hC0, 1, 0);                  // end of database
    repeat (10) @(negedge clk);
    check(events == "SpppppEpppEEF", {"events 1: ", events});
    check(exp_pix.size() == 0, "all pixels delivered");
    check(!op_active, "operation over");
    events = "";
    send(8'h40, 1, 0);
    send_image(2, 0);
    send(8'h81, 1, 0); send_image(2, 0);
    push_done_n = 0;
    repeat (10) @(negedge clk);
    push_done_n = 1;
    check(events == "SppEppEF", {"events 2: ", events});
    check(held_off > 0, "bytes held off while the engine was busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
