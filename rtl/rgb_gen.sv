// rgb_gen: 2-bit colour levels to 1-bit VGA outputs by frame dithering.
//
// The board drives each of R, G and B with a single bit, so a monitor shows
// only 8 colours per frame. Over three frames (phase 0, 1, 2) a level of 3
// is lit in all three, 2 in two, 1 in one and 0 in none; the eye averages
// them to four intensities per component, 64 colours in all. A component is
// lit when level + phase >= 3, which reproduces the phase/level table of the
// scheme exactly. Outputs are dark outside the visible area. Combinational.
module rgb_gen (
  input  logic [1:0] r2,
  input  logic [1:0] g2,
  input  logic [1:0] b2,
  input  logic [1:0] phase,
  input  logic       video_on,
  output logic       r,
  output logic       g,
  output logic       b
);

  function automatic logic lit(input logic [1:0] level, input logic [1:0] ph);
    return ({1'b0, level} + {1'b0, ph}) >= 3'd3;
  endfunction

  assign r = video_on && lit(r2, phase);
  assign g = video_on && lit(g2, phase);
  assign b = video_on && lit(b2, phase);

endmodule
