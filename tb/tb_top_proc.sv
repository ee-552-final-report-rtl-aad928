// tb_top_proc: end-to-end run of the image indexing processor.
//
// A PC model (pc_host) sends whole indexing operations over the parallel
// port, with the top at its default parameters and small random images.
// A software model builds the 48-bin histograms, the distances (capped at
// 2^12-1) and the ranking; after each operation the two digits must show,
// for each switch position, the label the model ranks there, and the
// engine's ranked distances must match. Operations:
//   1  stray bytes before any query, query + 5 candidates, one of them a
//      copy of the query (distance 0), ended by the end-of-database header
//   2  query + 3 candidates, one far enough to saturate the distance,
//      ended by the push button
//   3  query + 64 tiny candidates: the engine stops when the database is
//      full and further images are ignored
// Each mechanism is counted and must occur at least once: port stall
// (engine busy while a pixel waits), restart, end-of-database finish,
// push-button finish, database full, distance saturation, insertion at
// rank 0 that shifts the list, insertion below rank 0, candidate dropped
// from the list, dash display. The VGA and parallel-port test units are
// checked for activity.
module tb_top_proc;
  localparam int RANKS = 2, DW = 12;
  logic clock_sys = 0, reset_n = 0;
  logic [7:0] pc_data_in;
  logic pc_c_b0, pc_c_b1, pc_c_b2, pc_c_b3, pc_s_b6, pc_s_b3;
  logic [0:0] position = '0;
  logic push_to_done_n = 1;
  logic [7:0] led0, led1;
  logic vga_red, vga_green, vga_blue, vga_hsync_n, vga_vsync_n;
  logic [7:0] pt_data = '0;
  logic pt_strobe = 0, pt_transfer = 1, pt_ack;
  logic [7:0] pt_led0, pt_led1;
  int checks = 0, failures = 0;

  top_proc dut (.*);
  pc_host pc (.data(pc_data_in), .strobe(pc_c_b0), .imgend(pc_c_b1), .is_head(pc_c_b2),
              .transfer(pc_c_b3), .ack(pc_s_b6), .fpga_reset(pc_s_b3));

  always #20ns clock_sys = ~clock_sys;   // about 25 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_restart = 0, n_hdr_finish = 0, n_push_finish = 0, n_full = 0;
  int n_sat = 0, n_top_insert = 0, n_low_insert = 0, n_dropped = 0, n_dash = 0;
  always @(posedge dut.clk_core) begin
    if (dut.eng_pix_valid && !dut.eng_ready) n_stall++;
  end

  // ---------------- software model ----------------
  int qh [48], ch [48];
  int ref_d [$], ref_i [$];

  function automatic logic [23:0] rand_pixel(input logic [23:0] c, input int spread);
    logic [23:0] p;
    for (int k = 0; k < 3; k++) begin
      automatic int v = int'(c[8*k +: 8]) + $urandom_range(2 * spread) - spread;
      p[8*k +: 8] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
    end
    return p;
  endfunction

  task automatic send_image(input logic [23:0] centre, input int npix, input int spread,
                            input int seed, ref int h [48]);
    automatic int s = seed;
    for (int a = 0; a < 48; a++) h[a] = 0;
    void'($urandom(s));
    for (int k = 0; k < npix; k++) begin
      automatic logic [23:0] p = rand_pixel(centre, spread);
      pc.send_pixel(p);
      h[p[23:20]]++; h[16 + p[15:12]]++; h[32 + p[7:4]]++;
    end
    pc.send_end();
  endtask

  task automatic model_rank(input int label);
    automatic int d = 0, pos;
    for (int a = 0; a < 48; a++) d += (qh[a] > ch[a]) ? qh[a] - ch[a] : ch[a] - qh[a];
    if (d > (1 << DW) - 1) begin d = (1 << DW) - 1; n_sat++; end
    pos = ref_d.size();
    for (int k = 0; k < ref_d.size(); k++) if (ref_d[k] > d) begin pos = k; break; end
    if (pos >= RANKS) n_dropped++;
    else if (pos == 0 && ref_d.size() > 0) n_top_insert++;
    else if (pos > 0) n_low_insert++;
    ref_d.insert(pos, d); ref_i.insert(pos, label);
  endtask

  function automatic logic [7:0] seg(input int v);
    logic [6:0] on;
    case (v)
      0: on = 7'h3F; 1: on = 7'h06; 2: on = 7'h5B; 3: on = 7'h4F; 4: on = 7'h66;
      5: on = 7'h6D; 6: on = 7'h7D; 7: on = 7'h07; 8: on = 7'h7F; 9: on = 7'h6F;
      default: on = 7'h40;   // dash
    endcase
    return ~{1'b0, on};
  endfunction

  task automatic check_results(input string tag, input int ncand);
    for (int n = 0; n < 4000 && !dut.eng_done; n++) @(posedge clock_sys);
    check(dut.eng_done, {tag, ": operation done"});
    check(int'(dut.n_cand) == ncand, $sformatf("%s: %0d candidates counted, expected %0d", tag, dut.n_cand, ncand));
    for (int k = 0; k < RANKS; k++) begin
      position = 1'(k);
      #1;
      if (k < ref_d.size()) begin
        check(led0 == seg(ref_i[k] / 10) && led1 == seg(ref_i[k] % 10),
              $sformatf("%s: rank %0d shows %b %b, expected label %0d", tag, k, led0, led1, ref_i[k]));
        check(int'(dut.rank_dist[k]) == ref_d[k],
              $sformatf("%s: rank %0d distance %0d expected %0d", tag, k, dut.rank_dist[k], ref_d[k]));
      end else begin
        check(led0 == seg(-1) && led1 == seg(-1), $sformatf("%s: rank %0d dashes", tag, k));
        n_dash++;
      end
    end
  endtask

  // ---------------- operations ----------------
  initial begin
    automatic logic [23:0] qc;
    repeat (5) @(posedge clock_sys);
    reset_n = 1;
    repeat (5) @(posedge clock_sys);
    check(pc_s_b3 == 1'b0 || pc_c_b3 == 1'b0, "reset line");
    pc.start_link();
    // before the query: results show dashes
    #1 check(led0 == seg(-1) && led1 == seg(-1), "dashes before any result");
    n_dash++;

    // ---- operation 1 ----
    pc.send_header(2);                       // candidate header before a query: ignored
    pc.send_byte(8'h55, 0, 0);               // stray data: ignored
    ref_d.delete(); ref_i.delete();
    qc = 24'hC04020;
    pc.send_header(1);
    send_image(qc, 40, 10, 1, qh);
    for (int c = 0; c < 5; c++) begin
      pc.send_header(2);
      if (c == 2) begin
        // exact copy of the query image
        for (int a = 0; a < 48; a++) ch[a] = qh[a];
        void'($urandom(1));
        for (int k = 0; k < 40; k++) pc.send_pixel(rand_pixel(qc, 10));
        pc.send_end();
      end else
        send_image($urandom, $urandom_range(50, 10), 20, 100 + c, ch);
      model_rank(c);
    end
    pc.send_header(3);
    n_hdr_finish++;
    check_results("operation 1", 5);
    check(ref_i[0] == 2 && ref_d[0] == 0, "copy of the query ranks first");

    // ---- operation 2: restart, saturation, push button ----
    n_restart++;
    ref_d.delete(); ref_i.delete();
    pc.send_header(1);
    send_image(24'h101010, 700, 4, 7, qh);
    pc.send_header(2); send_image(24'hF0F0F0, 700, 4, 8, ch); model_rank(0);
    pc.send_header(2); send_image(24'h181818, 300, 8, 9, ch); model_rank(1);
    pc.send_header(2); send_image(24'h101010, 650, 4, 10, ch); model_rank(2);
    push_to_done_n = 0;
    repeat (40) @(posedge clock_sys);
    push_to_done_n = 1;
    n_push_finish++;
    check_results("operation 2", 3);

    // ---- operation 3: database full ----
    n_restart++;
    ref_d.delete(); ref_i.delete();
    pc.send_header(1);
    send_image(24'h808080, 8, 30, 11, qh);
    for (int c = 0; c < 64; c++) begin
      pc.send_header(2);
      send_image($urandom, $urandom_range(8, 1), 30, 200 + c, ch);
      model_rank(c);
    end
    for (int n = 0; n < 4000 && !dut.eng_done; n++) @(posedge clock_sys);
    check(dut.eng_done, "engine stopped with a full database");
    if (dut.eng_done) n_full++;
    pc.send_header(2);                       // one more image: ignored
    send_image(24'h808080, 8, 1, 11, ch);
    check_results("operation 3", 64);

    // ---- test units beside the processor ----
    pt_data = 8'hA7;
    #1us pt_strobe = 1;
    wait (pt_ack);
    pt_strobe = 0;
    #1us check(pt_led0 == ~8'h77 && pt_led1 == ~8'h07, "parallel-port test unit shows A7");

    $display("mechanisms: stall %0d restart %0d hdr_finish %0d push_finish %0d full %0d sat %0d top_insert %0d low_insert %0d dropped %0d dash %0d",
             n_stall, n_restart, n_hdr_finish, n_push_finish, n_full, n_sat, n_top_insert, n_low_insert, n_dropped, n_dash);
    check(n_stall > 0, "stall seen");
    check(n_restart > 0, "restart seen");
    check(n_hdr_finish > 0 && n_push_finish > 0, "both finishes seen");
    check(n_full > 0, "database full seen");
    check(n_sat > 0, "distance saturation seen");
    check(n_top_insert > 0 && n_low_insert > 0 && n_dropped > 0, "all insert cases seen");
    check(n_dash > 0, "dash display seen");
    check(hsyncs > 100, $sformatf("VGA test unit running: %0d lines", hsyncs));
    $display("longest ACK wait %0t", pc.ack_wait_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // VGA test unit activity
  int hsyncs = 0;
  always @(negedge vga_hsync_n) hsyncs++;
endmodule
