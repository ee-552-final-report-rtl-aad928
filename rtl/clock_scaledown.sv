// clock_scaledown: divides the board clock for the processor core.
//
// A DIV_LOG2-bit counter runs on clk_in; its top bit is clk_out, a 50 %
// duty clock at clk_in / 2^DIV_LOG2. The default /4 turns the 25.175 MHz
// board clock into about 6.3 MHz (159 ns), longer than the engine's slowest
// path. The ratio is this design's choice. clk_out comes straight from a
// flip-flop, so it is glitch-free. The counter has no reset on purpose: the
// divided clock must keep running while the board reset is held, so the
// core leaves reset on a clock that is already toggling and its port
// synchronisers fill with real line values; the phase is free.
module clock_scaledown #(
  parameter int unsigned DIV_LOG2 = 2
) (
  input  logic clk_in,
  output logic clk_out
);

  logic [DIV_LOG2-1:0] cnt;

  always_ff @(posedge clk_in) cnt <= cnt + 1'b1;

  assign clk_out = cnt[DIV_LOG2-1];

endmodule
