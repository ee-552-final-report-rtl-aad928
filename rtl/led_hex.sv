// led_hex: seven-segment decoder for one digit of the board display.
//
// seg = {dp, g, f, e, d, c, b, a}, active low as on the board's common-anode
// digits (the polarity is this design's assumption). val 0..15 shows
// 0-9 and A-F; dash shows a single middle bar instead (used for "no result").
// The decimal point is always off. Purely combinational.
module led_hex (
  input  logic [3:0] val,
  input  logic       dash,
  output logic [7:0] seg
);

  logic [6:0] on;   // {g,f,e,d,c,b,a}, 1 = lit

  always_comb begin
    unique case (val)
      4'h0: on = 7'b0111111;
      4'h1: on = 7'b0000110;
      4'h2: on = 7'b1011011;
      4'h3: on = 7'b1001111;
      4'h4: on = 7'b1100110;
      4'h5: on = 7'b1101101;
      4'h6: on = 7'b1111101;
      4'h7: on = 7'b0000111;
      4'h8: on = 7'b1111111;
      4'h9: on = 7'b1101111;
      4'hA: on = 7'b1110111;
      4'hB: on = 7'b1111100;
      4'hC: on = 7'b0111001;
      4'hD: on = 7'b1011110;
      4'hE: on = 7'b1111001;
      default: on = 7'b1110001;
    endcase
    if (dash) on = 7'b1000000;
  end

  assign seg = ~{1'b0, on};

endmodule
