// rgb_separate: holds the accepted pixel and hands out one colour component.
//
// The histogram builder works on R, G and B one after the other, through a
// single memory port, so the 24-bit pixel the engine accepts is kept here
// while comp_sel steps 0 (R), 1 (G), 2 (B). load captures pix = {R,G,B} on
// the clock edge; comp follows comp_sel combinationally. comp_sel = 3 is not
// used and returns 0.
module rgb_separate (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [23:0] pix,
  input  logic [1:0]  comp_sel,
  output logic [7:0]  comp
);

  logic [23:0] pix_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pix_q <= '0;
    else if (load) pix_q <= pix;
  end

  always_comb begin
    unique case (comp_sel)
      2'd0:    comp = pix_q[23:16];
      2'd1:    comp = pix_q[15:8];
      2'd2:    comp = pix_q[7:0];
      default: comp = '0;
    endcase
  end

endmodule
