// tcu: top control unit of the image indexing processor.
//
// Sits between the parallel-port interface and the indexing engine. The
// header/data splitter sorts each received byte into header, pixel data or
// image end; the header decoder tells a query header from a candidate or an
// end-of-database header; the pixel register packs R, G, B bytes into
// 24-bit pixels; the controller sequences all of it and the engine.
// Pixels go to the engine over a valid/ready pair; a byte is acknowledged to
// the port (byte_taken) only once it has been used, so the PC is held off
// while the engine is busy. The push-button input is synchronised here.
module tcu (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        transfer,
  input  logic        byte_valid,
  input  logic [7:0]  byte_data,
  input  logic        byte_is_head,
  input  logic        byte_imgend,
  output logic        byte_taken,
  input  logic        push_done_n,
  output logic        eng_start,
  output logic        eng_finish,
  output logic        eng_img_end,
  output logic        eng_pix_valid,
  output logic [23:0] eng_pix,
  input  logic        eng_ready,
  input  logic        eng_done,
  output logic        pc_reset,
  output logic        op_active
);

  logic       hdr_valid, dat_valid, end_valid;
  logic [7:0] hdr_data, dat_data;
  logic       is_query, is_cand, is_last, hdr_ok;
  logic       pr_in_valid, pr_in_ready, pr_clear;
  logic [1:0] push_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) push_sync <= '0;
    else        push_sync <= {push_sync[0], !push_done_n};
  end

  splitter u_split (
    .in_valid(byte_valid), .in_data(byte_data), .in_is_head(byte_is_head),
    .in_imgend(byte_imgend), .hdr_valid, .hdr_data, .dat_valid, .dat_data,
    .end_valid
  );

  head_dec u_hdec (
    .hdr(hdr_data), .is_query, .is_cand, .is_last, .is_valid(hdr_ok)
  );

  pixel_reg u_pix (
    .clk, .rst_n, .clear(pr_clear), .in_valid(pr_in_valid), .in_byte(dat_data),
    .in_ready(pr_in_ready), .pix_valid(eng_pix_valid), .pix(eng_pix),
    .pix_taken(eng_pix_valid && eng_ready)
  );

  tcu_controller u_ctrl (
    .clk, .rst_n, .transfer, .byte_valid,
    .hdr_valid(hdr_valid && hdr_ok), .dat_valid, .end_valid,
    .is_query, .is_cand, .is_last, .pr_in_ready, .pr_pix_valid(eng_pix_valid),
    .eng_ready, .eng_done, .push_done(push_sync[1]),
    .byte_taken, .pr_in_valid, .pr_clear, .eng_start, .eng_img_end, .eng_finish,
    .pc_reset, .op_active
  );

endmodule
