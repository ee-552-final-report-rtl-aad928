// tb_top_full: one complete indexing operation at full image size.
//
// The top runs with all its default parameters (12-bit bins and distances,
// two ranks, 64-image database). A PC model sends a 64 x 48 query image
// and 64 candidates of the same size (3072 pixels, 9216 bytes each), a
// full database, after which the engine ends the operation by itself; an
// end-of-database header that follows is ignored. The images are synthetic:
// each pixel is a per-image base colour plus a gradient and noise;
// candidate 1 is the query's base colour with the same light noise, the
// others have random base colours and heavier noise. A
// software model computes histograms, distances and ranking; the two
// digits must show the model's labels for both switch positions, and the
// engine's distances must match.
module tb_top_full;
  localparam int RANKS = 2, DW = 12, W = 64, H = 48, NCAND = 64;
  logic clock_sys = 0, reset_n = 0;
  logic [7:0] pc_data_in;
  logic pc_c_b0, pc_c_b1, pc_c_b2, pc_c_b3, pc_s_b6, pc_s_b3;
  logic [0:0] position = '0;
  logic push_to_done_n = 1;
  logic [7:0] led0, led1;
  logic vga_red, vga_green, vga_blue, vga_hsync_n, vga_vsync_n;
  logic [7:0] pt_data = '0;
  logic pt_strobe = 0, pt_transfer = 0, pt_ack;
  logic [7:0] pt_led0, pt_led1;
  int checks = 0, failures = 0;

  top_proc dut (.*);
  pc_host #(.SETUP(20ns)) pc (.data(pc_data_in), .strobe(pc_c_b0), .imgend(pc_c_b1), .is_head(pc_c_b2),
              .transfer(pc_c_b3), .ack(pc_s_b6), .fpga_reset(pc_s_b3));

  always #20ns clock_sys = ~clock_sys;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int qh [48], ch [48];
  int ref_d [$], ref_i [$];

  function automatic logic [7:0] clip(input int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
  endfunction

  task automatic send_image(input logic [23:0] base, input int noise, ref int h [48]);
    for (int a = 0; a < 48; a++) h[a] = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic logic [23:0] p;
        p[23:16] = clip(int'(base[23:16]) + x - 32 + $urandom_range(2 * noise) - noise);
        p[15:8]  = clip(int'(base[15:8])  + y - 24 + $urandom_range(2 * noise) - noise);
        p[7:0]   = clip(int'(base[7:0])   + $urandom_range(2 * noise) - noise);
        pc.send_pixel(p);
        h[p[23:20]]++; h[16 + p[15:12]]++; h[32 + p[7:4]]++;
      end
    pc.send_end();
  endtask

  task automatic model_rank(input int label);
    automatic int d = 0, pos;
    for (int a = 0; a < 48; a++) d += (qh[a] > ch[a]) ? qh[a] - ch[a] : ch[a] - qh[a];
    if (d > (1 << DW) - 1) d = (1 << DW) - 1;
    pos = ref_d.size();
    for (int k = 0; k < ref_d.size(); k++) if (ref_d[k] > d) begin pos = k; break; end
    ref_d.insert(pos, d); ref_i.insert(pos, label);
    $display("candidate %0d: model distance %0d", label, d);
  endtask

  function automatic logic [7:0] seg(input int v);
    logic [6:0] on;
    case (v)
      0: on = 7'h3F; 1: on = 7'h06; 2: on = 7'h5B; 3: on = 7'h4F; 4: on = 7'h66;
      5: on = 7'h6D; 6: on = 7'h7D; 7: on = 7'h07; 8: on = 7'h7F; 9: on = 7'h6F;
      default: on = 7'h40;
    endcase
    return ~{1'b0, on};
  endfunction

  initial begin
    logic [23:0] bases [NCAND];
    automatic logic [23:0] qbase = 24'h906040;
    automatic realtime t0;
    foreach (bases[i]) bases[i] = $urandom;
    bases[1] = qbase;
    repeat (5) @(posedge clock_sys);
    reset_n = 1;
    pc.start_link();
    t0 = $realtime;
    pc.send_header(1);
    send_image(qbase, 8, qh);
    for (int c = 0; c < NCAND; c++) begin
      pc.send_header(2);
      send_image(bases[c], (c == 1) ? 8 : 24, ch);
      model_rank(c);
    end
    for (int n = 0; n < 4000 && !dut.eng_done; n++) @(posedge clock_sys);
    check(dut.eng_done, "engine ended the operation when the database was full");
    pc.send_header(3);
    for (int n = 0; n < 4000 && !dut.eng_done; n++) @(posedge clock_sys);
    check(dut.eng_done, "operation done");
    check(int'(dut.n_cand) == NCAND, "candidates counted");
    for (int k = 0; k < RANKS; k++) begin
      position = 1'(k);
      #1;
      check(led0 == seg(ref_i[k] / 10) && led1 == seg(ref_i[k] % 10),
            $sformatf("rank %0d shows %b %b, expected label %0d", k, led0, led1, ref_i[k]));
      check(int'(dut.rank_dist[k]) == ref_d[k],
            $sformatf("rank %0d distance %0d expected %0d", k, dut.rank_dist[k], ref_d[k]));
    end
    check(ref_i[0] == 1, "the near copy of the query ranks first");
    $display("operation took %0t for %0d bytes", $realtime - t0, pc.bytes_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
