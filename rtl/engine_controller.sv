// engine_controller: Moore state machine of the image indexing engine.
//
// It enables the engine's sub-modules one at a time through level "act"
// signals and moves on when the enabled sub-module reports done:
//   IDLE    wait for start (a query header)
//   MINIT   whole-memory initialiser clears both RAMs; ranker and
//           index counter are cleared
//   Q_WAIT  ready for a query pixel or the query's image end
//   Q_HIST  histogram builder adds one pixel to the query histogram
//   C_WAIT  ready for a candidate pixel, the candidate's image end, or finish
//   C_HIST  histogram builder adds one pixel to the candidate histogram
//   DIST    distance calculator compares the two histograms
//   RANK    one-cycle insertion of (distance, label) into the ranker
//   C_CLEAR candidate RAM is cleared
//   NEXT    index counter advances
//   CHECK   after 64 candidates the database is full: go to DONE
//   DONE    results stand; a new start begins another operation
// Outputs are decoded from the state only, except pix_load, the accept
// strobe of the pixel handshake (pix_valid while ready).
// start is honoured in IDLE, DONE and the two wait states; finish in the
// two wait states.
module engine_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic finish,
  input  logic pix_valid,
  input  logic img_end,
  input  logic init_done,
  input  logic hist_done,
  input  logic dist_done,
  input  logic clr_done,
  input  logic full,
  output logic ready,
  output logic done,
  output logic pix_load,
  output logic init_act,
  output logic hist_act,
  output logic hist_query,
  output logic dist_act,
  output logic clear_act,
  output logic rank_ins,
  output logic idx_inc,
  output logic op_clear
);

  typedef enum logic [3:0] {
    IDLE, MINIT, Q_WAIT, Q_HIST, C_WAIT, C_HIST,
    DIST, RANK, C_CLEAR, NEXT, CHECK, DONE
  } state_e;
  state_e state, nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      IDLE:    if (start) nxt = MINIT;
      MINIT:   if (init_done) nxt = Q_WAIT;
      Q_WAIT:  if (start)          nxt = MINIT;
               else if (finish)    nxt = DONE;
               else if (pix_valid) nxt = Q_HIST;
               else if (img_end)   nxt = C_WAIT;
      Q_HIST:  if (hist_done) nxt = Q_WAIT;
      C_WAIT:  if (start)          nxt = MINIT;
               else if (finish)    nxt = DONE;
               else if (pix_valid) nxt = C_HIST;
               else if (img_end)   nxt = DIST;
      C_HIST:  if (hist_done) nxt = C_WAIT;
      DIST:    if (dist_done) nxt = RANK;
      RANK:    nxt = C_CLEAR;
      C_CLEAR: if (clr_done) nxt = NEXT;
      NEXT:    nxt = CHECK;
      CHECK:   nxt = full ? DONE : C_WAIT;
      DONE:    if (start) nxt = MINIT;
      default: nxt = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= nxt;
  end

  assign ready      = (state == Q_WAIT) || (state == C_WAIT);
  assign done       = (state == DONE);
  assign pix_load   = ready && !start && !finish && pix_valid;
  assign init_act   = (state == MINIT);
  assign op_clear   = (state == MINIT);
  assign hist_act   = (state == Q_HIST) || (state == C_HIST);
  assign hist_query = (state == Q_HIST);
  assign dist_act   = (state == DIST);
  assign clear_act  = (state == C_CLEAR);
  assign rank_ins   = (state == RANK);
  assign idx_inc    = (state == NEXT);

endmodule
