// clock_rgb: frame-phase counter of the 64-colour VGA test unit.
//
// A two-bit counter that steps 0, 1, 2, 0, ... once per frame, at the start
// of each vertical sync pulse (falling edge of the active-low vsync_n, found
// by comparing with the previous sample). rgb_gen uses the phase to spread
// each 2-bit colour level over three frames.
module clock_rgb (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       vsync_n,
  output logic [1:0] phase
);

  logic vs_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs_q  <= 1'b1;
      phase <= '0;
    end else begin
      vs_q <= vsync_n;
      if (vs_q && !vsync_n) phase <= (phase == 2'd2) ? 2'd0 : phase + 1'b1;
    end
  end

endmodule
