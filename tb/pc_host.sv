// pc_host: behavioural model of the PC that drives the parallel port.
//
// Not hardware: it stands in for the PC driver software in simulation.
// Each byte goes out as on the real SPP link: data and the IMGEND / IS_HEAD
// flags are set, STROBE is raised after a set-up time, the model waits for
// ACK, drops STROBE and waits for ACK to fall. TRANSFER is held high for a
// whole transfer (start_link). Tasks:
//   send_header(kind)  kind 1 query, 2 candidate, 3 end of database
//   send_pixel(p)      three data bytes R, G, B
//   send_end()         the image-end byte
// ack_wait_max records the longest wait for ACK (a measure of stalls).
module pc_host #(
  parameter realtime SETUP = 100ns
) (
  output logic [7:0] data,
  output logic       strobe,
  output logic       imgend,
  output logic       is_head,
  output logic       transfer,
  input  logic       ack,
  input  logic       fpga_reset
);

  int bytes_sent = 0;
  realtime ack_wait_max = 0;

  initial begin
    data = '0; strobe = 0; imgend = 0; is_head = 0; transfer = 0;
  end

  task automatic send_byte(input logic [7:0] d, input bit ie, input bit hd);
    realtime t0;
    data = d; imgend = ie; is_head = hd;
    #(SETUP);
    strobe = 1;
    t0 = $realtime;
    wait (ack);
    if ($realtime - t0 > ack_wait_max) ack_wait_max = $realtime - t0;
    #(SETUP);
    strobe = 0;
    wait (!ack);
    bytes_sent++;
  endtask

  task automatic start_link();
    transfer = 0;
    #(SETUP);
    wait (!fpga_reset);
    transfer = 1;
    #(SETUP);
  endtask

  task automatic send_header(input int kind);
    send_byte({2'(kind), 6'd0}, 0, 1);
  endtask

  task automatic send_pixel(input logic [23:0] p);
    send_byte(p[23:16], 0, 0);
    send_byte(p[15:8], 0, 0);
    send_byte(p[7:0], 0, 0);
  endtask

  task automatic send_end();
    send_byte(8'h00, 1, 0);
  endtask

endmodule
