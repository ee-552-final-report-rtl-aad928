// index_engine: histogram-based image indexing engine.
//
// The first image of an operation is the query; every later image is a
// candidate. Pixels arrive one at a time as 24-bit {R,G,B} words over a
// valid/ready handshake. For each pixel the histogram builder adds one to the
// R, G and B bins of the current image's 48-word histogram RAM (query RAM or
// candidate RAM). When a candidate's image end arrives, the distance
// calculator sums |query bin - candidate bin| over the 48 words, the ranker
// inserts (distance, label) into its sorted list of the RANKS best images,
// the candidate RAM is cleared and the label counter advances. Ranking thus
// runs image by image, so nothing but the two histograms is stored.
//
// Sub-modules: engine_controller (sequencing), rgb_separate (holds the
// pixel), color_hist (quantise and count), two eab_ram, ram_manager (4-to-1
// port multiplexers), mem_init (clears both RAMs at start), cand_mem_init
// (clears the candidate RAM), distance_calc, rank_sorter and index_counter.
// The optional colour-to-gray converter of the original plan is not part of
// this engine.
//
// Interface: start (one cycle) begins an operation; pix_valid/pix_ready/pix
// carry pixels; img_end (one cycle, given while ready and no pixel is
// offered) closes the current image; finish (one cycle, while ready) ends the
// operation early. done is high once the operation has ended, either by
// finish or after MAX_CAND candidates. Timing: 9 cycles per pixel between
// accepts when pixels are offered back to back; 50 cycles of distance, 1 of
// ranking and 49 of clearing, plus 3 of bookkeeping, per candidate image;
// 49 cycles of initialisation per operation.
module index_engine
  import idx_pkg::*;
#(
  parameter int unsigned DW         = 12,
  parameter int unsigned RANKS      = 2,
  parameter int unsigned IDX_W      = 6,
  parameter int unsigned MAX_CAND = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             finish,
  input  logic             pix_valid,
  output logic             pix_ready,
  input  logic [23:0]      pix,
  input  logic             img_end,
  output logic             done,
  output logic [DW-1:0]    rank_dist  [RANKS],
  output logic [IDX_W-1:0] rank_idx   [RANKS],
  output logic [RANKS-1:0] rank_valid,
  output logic [IDX_W:0]   n_cand
);

  localparam int unsigned AW = HIST_AW;

  logic init_act, hist_act, hist_query, dist_act, clear_act;
  logic rank_ins, idx_inc, op_clear, pix_load;
  logic init_done, hist_done, dist_done, clr_done, full;

  logic [AW-1:0] init_addr, clr_addr, hist_addr, dist_addr;
  logic          init_we, clr_we, hist_we;
  logic [DW-1:0] hist_wdata, hist_rdata;
  logic [1:0]    comp_sel;
  logic [7:0]    comp;
  logic [DW-1:0] l1_dist;
  logic [IDX_W-1:0] idx;

  logic [AW-1:0] q_addr, c_addr;
  logic          q_we, c_we;
  logic [DW-1:0] q_wdata, c_wdata, q_rdata, c_rdata;

  engine_controller u_ctrl (
    .clk, .rst_n, .start, .finish, .pix_valid, .img_end,
    .init_done, .hist_done, .dist_done, .clr_done, .full,
    .ready(pix_ready), .done, .pix_load, .init_act, .hist_act, .hist_query,
    .dist_act, .clear_act, .rank_ins, .idx_inc, .op_clear
  );

  rgb_separate u_rgb (
    .clk, .rst_n, .load(pix_load), .pix, .comp_sel, .comp
  );

  mem_init #(.AW(AW), .WORDS(HIST_WORDS)) u_init (
    .clk, .rst_n, .go(init_act), .done(init_done), .addr(init_addr), .we(init_we)
  );

  cand_mem_init #(.AW(AW), .WORDS(HIST_WORDS)) u_clr (
    .clk, .rst_n, .go(clear_act), .done(clr_done), .addr(clr_addr), .we(clr_we)
  );

  // The histogram builder reads the RAM it is writing.
  assign hist_rdata = hist_query ? q_rdata : c_rdata;

  color_hist #(.DW(DW), .AW(AW)) u_hist (
    .clk, .rst_n, .go(hist_act), .done(hist_done), .comp_sel, .comp,
    .addr(hist_addr), .we(hist_we), .wdata(hist_wdata), .rdata(hist_rdata)
  );

  distance_calc #(.DW(DW), .AW(AW), .WORDS(HIST_WORDS)) u_dist (
    .clk, .rst_n, .go(dist_act), .done(dist_done), .addr(dist_addr),
    .q_rdata, .c_rdata, .l1_dist
  );

  ram_manager #(.DW(DW), .AW(AW)) u_rman (
    .init_act, .clear_act, .hist_act, .hist_query,
    .init_addr, .init_we, .clr_addr, .clr_we,
    .hist_addr, .hist_we, .hist_wdata, .dist_addr,
    .q_addr, .q_we, .q_wdata,
    .c_addr, .c_we, .c_wdata
  );

  eab_ram #(.DW(DW), .AW(AW), .WORDS(HIST_WORDS)) u_qram (
    .clk, .we(q_we), .addr(q_addr), .wdata(q_wdata), .rdata(q_rdata)
  );

  eab_ram #(.DW(DW), .AW(AW), .WORDS(HIST_WORDS)) u_cram (
    .clk, .we(c_we), .addr(c_addr), .wdata(c_wdata), .rdata(c_rdata)
  );

  rank_sorter #(.DW(DW), .RANKS(RANKS), .IDX_W(IDX_W)) u_rank (
    .clk, .rst_n, .clear(op_clear), .ins(rank_ins), .new_dist(l1_dist),
    .new_idx(idx), .rank_dist, .rank_idx, .rank_valid
  );

  index_counter #(.IDX_W(IDX_W), .MAX(MAX_CAND)) u_idx (
    .clk, .rst_n, .clear(op_clear), .inc(idx_inc), .idx, .full
  );

  assign n_cand = full ? (IDX_W+1)'(MAX_CAND) : {1'b0, idx};

endmodule
