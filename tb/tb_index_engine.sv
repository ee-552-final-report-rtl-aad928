// tb_index_engine: the whole indexing engine against a software model.
// Random images (random sizes, pixels drawn from a few colour clusters so
// that distances differ and sometimes tie) are streamed in as query and
// candidates. The model builds the 48-bin histograms, the L1 distances
// (capped at 2^DW-1) and the ranking (stable on ties); the engine's ranked
// labels, distances and candidate count must match after every operation.
// It also checks the pixel rate (9 cycles per pixel when pixels are offered
// back to back), that the engine ends by itself after MAX_CAND candidates,
// and that a new start after an operation begins a fresh one.
module tb_index_engine;
  localparam int DW = 12, RANKS = 4, IDX_W = 6, MAX_CAND = 6;
  logic clk = 0, rst_n = 0, start = 0, finish = 0, pix_valid = 0, img_end = 0;
  logic pix_ready, done;
  logic [23:0] pix = '0;
  logic [DW-1:0] rank_dist [RANKS];
  logic [IDX_W-1:0] rank_idx [RANKS];
  logic [RANKS-1:0] rank_valid;
  logic [IDX_W:0] n_cand;
  int checks = 0, failures = 0;

  index_engine #(.DW(DW), .RANKS(RANKS), .IDX_W(IDX_W), .MAX_CAND(MAX_CAND)) dut (.*);
  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int qh [48], ch [48];
  int ref_d [$], ref_i [$];
  logic [23:0] centre;

  function automatic logic [23:0] rand_pixel(input logic [23:0] c);
    logic [23:0] p;
    for (int k = 0; k < 3; k++) begin
      automatic int v = int'(c[8*k +: 8]) + $urandom_range(40) - 20;
      p[8*k +: 8] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
    end
    return p;
  endfunction

  task automatic send_pixel(input logic [23:0] p, ref int h [48], input bit timed);
    automatic int n = 0;
    pix = p; pix_valid = 1;
    @(posedge clk);
    while (!pix_ready) begin @(posedge clk); n++; end
    #1 pix_valid = 0;
    if (timed) check(n == 8, $sformatf("pixel interval %0d", n + 1));
    h[0  + p[23:20]]++;
    h[16 + p[15:12]]++;
    h[32 + p[7:4]]++;
  endtask

  task automatic end_image();
    while (!pix_ready) @(posedge clk);
    #1 img_end = 1;
    @(posedge clk) #1 img_end = 0;
  endtask

  task automatic send_image(input int npix, ref int h [48]);
    centre = $urandom;
    for (int a = 0; a < 48; a++) h[a] = 0;
    for (int k = 0; k < npix; k++) send_pixel(rand_pixel(centre), h, k > 0);
    end_image();
  endtask

  task automatic rank_model(input int label);
    automatic int d = 0, pos;
    for (int a = 0; a < 48; a++) d += (qh[a] > ch[a]) ? qh[a] - ch[a] : ch[a] - qh[a];
    if (d > (1 << DW) - 1) d = (1 << DW) - 1;
    pos = ref_d.size();
    for (int k = 0; k < ref_d.size(); k++) if (ref_d[k] > d) begin pos = k; break; end
    ref_d.insert(pos, d); ref_i.insert(pos, label);
  endtask

  task automatic check_ranks(input int ncand, input string tag);
    check(done, {tag, ": done"});
    check(int'(n_cand) == ncand, $sformatf("%s: n_cand %0d expected %0d", tag, n_cand, ncand));
    for (int k = 0; k < RANKS; k++) begin
      check(rank_valid[k] == (k < ref_d.size()), $sformatf("%s: valid %0d", tag, k));
      if (k < ref_d.size())
        check(int'(rank_dist[k]) == ref_d[k] && int'(rank_idx[k]) == ref_i[k],
              $sformatf("%s rank %0d: %0d/#%0d expected %0d/#%0d", tag, k,
                        rank_dist[k], rank_idx[k], ref_d[k], ref_i[k]));
    end
  endtask

  task automatic operation(input int ncand, input bit use_finish, input string tag);
    ref_d.delete(); ref_i.delete();
    @(posedge clk) #1 start = 1;
    @(posedge clk) #1 start = 0;
    send_image($urandom_range(60, 20), qh);
    for (int c = 0; c < ncand; c++) begin
      // some candidates are near copies of the query (same centre)
      send_image($urandom_range(60, 1), ch);
      rank_model(c);
    end
    if (use_finish) begin
      while (!pix_ready) @(posedge clk);
      #1 finish = 1;
      @(posedge clk) #1 finish = 0;
    end
    repeat (200) @(posedge clk);
    #1 check_ranks(ncand, tag);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    operation(3, 1, "op1");
    operation(5, 1, "op2");
    operation(1, 1, "op3");
    operation(MAX_CAND, 0, "full");
    check(!pix_ready, "no pixels accepted once full");
    operation(2, 1, "after full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
