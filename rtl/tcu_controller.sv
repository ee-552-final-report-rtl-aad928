// tcu_controller: state machine of the top control unit.
//
// It decides, byte by byte, what happens to what the PC sends, and drives
// the indexing engine's control inputs:
//   RESET_PC  after reset: RESET line to the PC high until TRANSFER is low
//   WAIT_HDR  between images: a query header starts an operation, a
//             candidate header opens an image, an end-of-database header or
//             the push button ends the operation; other bytes are dropped
//   START     one-cycle engine start and pixel register clear
//   WAIT_ENG  engine clearing its memories; the query image opens when
//             the engine is ready
//   IN_IMAGE  data bytes go to the pixel register (taken only while it can
//             accept them); an image-end byte moves to END_IMG; a stray
//             header byte is dropped
//   END_IMG   waits until the last pixel has been taken and the engine is
//             ready, then pulses eng_img_end and takes the byte
//   FINISH    waits until the engine is ready (or done) and pulses finish
//   DONE      results are shown; a new query header starts again
// The engine may also end by itself when its database is full; WAIT_HDR
// then moves to DONE. The state set is this design's; the original control
// unit had a larger, 21-state machine whose diagram is not reproduced here.
module tcu_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic transfer,
  input  logic byte_valid,
  input  logic hdr_valid,
  input  logic dat_valid,
  input  logic end_valid,
  input  logic is_query,
  input  logic is_cand,
  input  logic is_last,
  input  logic pr_in_ready,
  input  logic pr_pix_valid,
  input  logic eng_ready,
  input  logic eng_done,
  input  logic push_done,
  output logic byte_taken,
  output logic pr_in_valid,
  output logic pr_clear,
  output logic eng_start,
  output logic eng_img_end,
  output logic eng_finish,
  output logic pc_reset,
  output logic op_active
);

  typedef enum logic [3:0] {
    RESET_PC, WAIT_HDR, START, WAIT_ENG, IN_IMAGE, END_IMG, FINISH, DONE
  } state_e;
  state_e state, nxt;

  logic end_fire, fin_fire;
  assign end_fire = (state == END_IMG) && !pr_pix_valid && eng_ready;
  assign fin_fire = (state == FINISH) && eng_ready;

  always_comb begin
    nxt = state;
    unique case (state)
      RESET_PC: if (!transfer) nxt = WAIT_HDR;
      WAIT_HDR: if (eng_done && op_active)                  nxt = DONE;
                else if (hdr_valid && is_query)             nxt = START;
                else if (hdr_valid && is_cand && op_active) nxt = IN_IMAGE;
                else if (hdr_valid && is_last && op_active) nxt = FINISH;
                else if (push_done && op_active)            nxt = FINISH;
      START:    nxt = WAIT_ENG;
      WAIT_ENG: if (eng_ready) nxt = IN_IMAGE;
      IN_IMAGE: if (end_valid) nxt = END_IMG;
      END_IMG:  if (end_fire) nxt = WAIT_HDR;
      FINISH:   if (fin_fire || eng_done) nxt = DONE;
      DONE:     if (hdr_valid && is_query) nxt = START;
      default:  nxt = RESET_PC;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= RESET_PC;
      op_active <= 1'b0;
    end else begin
      state <= nxt;
      if (state == START)     op_active <= 1'b1;
      else if (state == DONE) op_active <= 1'b0;
    end
  end

  always_comb begin
    pr_in_valid = (state == IN_IMAGE) && dat_valid;
    unique case (state)
      WAIT_HDR, DONE: byte_taken = byte_valid;
      IN_IMAGE:       byte_taken = (byte_valid && !dat_valid && !end_valid)
                                || (dat_valid && pr_in_ready);
      END_IMG:        byte_taken = end_fire;
      default:        byte_taken = 1'b0;
    endcase
  end

  assign pr_clear    = (state == START) || end_fire;
  assign eng_start   = (state == START);
  assign eng_img_end = end_fire;
  assign eng_finish  = fin_fire;
  assign pc_reset    = (state == RESET_PC);

endmodule
