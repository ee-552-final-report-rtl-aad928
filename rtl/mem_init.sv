// mem_init: clears both histogram memories at the start of an operation.
//
// Before the query histogram is built, every word of the query RAM and of
// the candidate RAM must hold 0. The block has three states: IDLE, INIT and
// READY. When go rises in IDLE it enters INIT and for WORDS cycles drives
// addr = 0, 1, ... WORDS-1 with we high (the write data is always 0, so the
// RAM manager ties it off). It then waits in READY with done high until the
// engine controller drops go, and returns to IDLE. Both RAMs take these
// writes in parallel through the RAM manager. Latency: WORDS + 1 cycles from
// go to done.
module mem_init #(
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
