// parport_test: stand-alone test of the parallel-port link.
//
// Uses the same port interface as the processor (ppi2pc) but takes every
// byte at once and shows the last byte received in hexadecimal on the two
// seven-segment digits (high nibble on led0), so the PC side of the link
// can be checked by eye. Runs on the board clock.
module parport_test (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] pc_data,
  input  logic       pc_strobe,
  input  logic       pc_transfer,
  output logic       pc_ack,
  output logic [7:0] led0,
  output logic [7:0] led1
);

  logic       byte_valid, is_head, imgend, transfer_s;
  logic [7:0] byte_data, shown;

  ppi2pc u_port (
    .clk, .rst_n, .pc_data, .pc_strobe, .pc_imgend(1'b0), .pc_is_head(1'b0),
    .pc_transfer, .byte_valid, .byte_data, .byte_is_head(is_head),
    .byte_imgend(imgend), .byte_taken(byte_valid), .pc_ack, .transfer_s
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          shown <= '0;
    else if (byte_valid) shown <= byte_data;
  end

  led_hex u_hi (.val(shown[7:4]), .dash(1'b0), .seg(led0));
  led_hex u_lo (.val(shown[3:0]), .dash(1'b0), .seg(led1));

endmodule
