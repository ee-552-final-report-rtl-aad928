// cand_mem_init: clears the candidate histogram memory between candidates.
//
// After each candidate's distance has been ranked, the candidate RAM must
// be zeroed before the next candidate's histogram is built; the query
// histogram is kept. The control follows the same IDLE / INIT / READY scheme
// as mem_init: go in IDLE starts WORDS write cycles (addr 0..WORDS-1, we high,
// data 0), then done stays high in READY until go is dropped. The RAM
// manager connects it to the candidate RAM only. Latency: WORDS + 1 cycles.
module cand_mem_init #(
  parameter int unsigned AW    = 6,
  parameter int unsigned WORDS = 48
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  output logic          done,
  output logic [AW-1:0] addr,
  output logic          we
);

  typedef enum logic [1:0] {IDLE, INIT, READY} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      addr  <= '0;
    end else begin
      unique case (state)
        IDLE:  if (go) begin
                 state <= INIT;
                 addr  <= '0;
               end
        INIT:  if (32'(addr) == WORDS - 1) state <= READY;
               else                        addr  <= addr + 1'b1;
        READY: if (!go) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign we   = (state == INIT);
  assign done = (state == READY);

endmodule
