// top_proc: image indexing processor on one FPGA board.
//
// A PC sends a query image and then up to 64 candidate images over an SPP
// parallel port. The processor builds a 48-bin colour histogram of each
// image (16 uniform bins for each of R, G and B), measures each candidate's
// L1 distance to the query, keeps the RANKS closest candidates in order, and
// shows the label of the one chosen by the position switch on two
// seven-segment digits.
//
// Core path: ppi2pc (port handshake) -> tcu (byte sorting, pixel assembly,
// sequencing) -> index_engine (histograms, distance, ranking) -> disp_led.
// The core runs on clock_sys divided by 4 (clock_scaledown). Two test units
// share the board and have their own pins: vga_test, the 64-colour VGA
// dithering test on clock_sys, and parport_test, the parallel-port link
// test (pt_* pins).
//
// Pins: pc_c_b0 STROBE, pc_c_b1 IMGEND, pc_c_b2 IS_HEAD, pc_c_b3 TRANSFER
// (all active high at the FPGA), pc_data_in D0-D7; pc_s_b6 ACK, pc_s_b3
// RESET to the PC. reset_n and push_to_done_n are the board push buttons,
// active low. A byte protocol: header byte (bits 7:6 = 01 query, 10
// candidate, 11 end of database), then R, G, B data bytes per pixel, then
// one byte with IMGEND set.
module top_proc #(
  parameter int unsigned DW    = 12,
  parameter int unsigned RANKS = 2,
  parameter int unsigned IDX_W = 6,
  localparam int unsigned POS_W = (RANKS > 1) ? $clog2(RANKS) : 1
) (
  input  logic             clock_sys,
  input  logic             reset_n,
  // parallel port
  input  logic [7:0]       pc_data_in,
  input  logic             pc_c_b0,
  input  logic             pc_c_b1,
  input  logic             pc_c_b2,
  input  logic             pc_c_b3,
  output logic             pc_s_b6,
  output logic             pc_s_b3,
  // results
  input  logic [POS_W-1:0] position,
  input  logic             push_to_done_n,
  output logic [7:0]       led0,
  output logic [7:0]       led1,
  // VGA test unit
  output logic             vga_red,
  output logic             vga_green,
  output logic             vga_blue,
  output logic             vga_hsync_n,
  output logic             vga_vsync_n,
  // parallel-port test unit
  input  logic [7:0]       pt_data,
  input  logic             pt_strobe,
  input  logic             pt_transfer,
  output logic             pt_ack,
  output logic [7:0]       pt_led0,
  output logic [7:0]       pt_led1
);

  logic clk_core;

  logic        byte_valid, byte_is_head, byte_imgend, byte_taken, transfer_s;
  logic [7:0]  byte_data;
  logic        eng_start, eng_finish, eng_img_end, eng_pix_valid, eng_ready, eng_done;
  logic [23:0] eng_pix;
  logic        op_active;

  logic [DW-1:0]    rank_dist  [RANKS];
  logic [IDX_W-1:0] rank_idx   [RANKS];
  logic [RANKS-1:0] rank_valid;
  logic [IDX_W:0]   n_cand;

  clock_scaledown #(.DIV_LOG2(2)) u_clk (
    .clk_in(clock_sys), .clk_out(clk_core)
  );

  ppi2pc u_port (
    .clk(clk_core), .rst_n(reset_n), .pc_data(pc_data_in), .pc_strobe(pc_c_b0),
    .pc_imgend(pc_c_b1), .pc_is_head(pc_c_b2), .pc_transfer(pc_c_b3),
    .byte_valid, .byte_data, .byte_is_head, .byte_imgend, .byte_taken,
    .pc_ack(pc_s_b6), .transfer_s
  );

  tcu u_tcu (
    .clk(clk_core), .rst_n(reset_n), .transfer(transfer_s), .byte_valid,
    .byte_data, .byte_is_head, .byte_imgend, .byte_taken, .push_done_n(push_to_done_n),
    .eng_start, .eng_finish, .eng_img_end, .eng_pix_valid, .eng_pix,
    .eng_ready, .eng_done, .pc_reset(pc_s_b3), .op_active
  );

  index_engine #(.DW(DW), .RANKS(RANKS), .IDX_W(IDX_W), .MAX_CAND(1 << IDX_W)) u_eng (
    .clk(clk_core), .rst_n(reset_n), .start(eng_start), .finish(eng_finish),
    .pix_valid(eng_pix_valid), .pix_ready(eng_ready), .pix(eng_pix),
    .img_end(eng_img_end), .done(eng_done), .rank_dist, .rank_idx, .rank_valid,
    .n_cand
  );

  disp_led #(.RANKS(RANKS), .IDX_W(IDX_W)) u_led (
    .position, .show(eng_done), .rank_idx, .rank_valid, .led0, .led1
  );

  vga_test u_vga (
    .clk(clock_sys), .rst_n(reset_n), .red(vga_red), .green(vga_green),
    .blue(vga_blue), .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n)
  );

  parport_test u_pt (
    .clk(clock_sys), .rst_n(reset_n), .pc_data(pt_data), .pc_strobe(pt_strobe),
    .pc_transfer(pt_transfer), .pc_ack(pt_ack), .led0(pt_led0), .led1(pt_led1)
  );

endmodule
