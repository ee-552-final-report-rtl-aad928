// disp_led: shows one ranking result on the board's two seven-segment digits.
//
// The position switch picks a rank (0 = most similar image). Once show is
// high (indexing has ended) the label of the image at that rank is shown in
// decimal, tens on led0 and units on led1, through two led_hex decoders.
// Before that, or if the rank is still empty (fewer candidates than ranks),
// both digits show a dash. Labels are below 100, so two digits suffice.
// Purely combinational.
module disp_led #(
  parameter int unsigned RANKS = 2,
  parameter int unsigned IDX_W = 6,
  localparam int unsigned POS_W = (RANKS > 1) ? $clog2(RANKS) : 1
) (
  input  logic [POS_W-1:0] position,
  input  logic             show,
  input  logic [IDX_W-1:0] rank_idx [RANKS],
  input  logic [RANKS-1:0] rank_valid,
  output logic [7:0]       led0,
  output logic [7:0]       led1
);

  logic [IDX_W-1:0] label;
  logic             blank;
  logic [3:0]       tens, units;

  always_comb begin
    label = '0;
    blank = 1'b1;
    if (32'(position) < RANKS) begin
      label = rank_idx[position];
      blank = !show || !rank_valid[position];
    end
    tens  = 4'(32'(label) / 10);
    units = 4'(32'(label) % 10);
  end

  led_hex u_tens  (.val(tens),  .dash(blank), .seg(led0));
  led_hex u_units (.val(units), .dash(blank), .seg(led1));

endmodule
