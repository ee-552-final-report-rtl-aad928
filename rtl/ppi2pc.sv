// ppi2pc: FPGA side of the SPP parallel-port link from the PC.
//
// The PC writes a byte on the data lines, sets IMGEND / IS_HEAD to say what
// kind of byte it is, and raises STROBE; TRANSFER enables the link as a
// whole. All PC lines are asynchronous, so each passes two flip-flops first.
// Handshake (four-phase; its exact form is this design's choice):
//   IDLE : synchronised STROBE high while TRANSFER high -> byte, its two
//          flags captured, byte_valid raised (HOLD)
//   HOLD : byte_valid stays high until the consumer pulses byte_taken
//   ACK  : ACK line high until the PC drops STROBE, then back to IDLE
// ACK therefore doubles as flow control: the PC waits for it before the next
// byte, so a busy engine simply stretches the handshake.
// transfer_s is the synchronised TRANSFER level for the control unit.
module ppi2pc (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] pc_data,
  input  logic       pc_strobe,
  input  logic       pc_imgend,
  input  logic       pc_is_head,
  input  logic       pc_transfer,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       byte_is_head,
  output logic       byte_imgend,
  input  logic       byte_taken,
  output logic       pc_ack,
  output logic       transfer_s
);

  typedef enum logic [1:0] {IDLE, HOLD, ACK} state_e;
  state_e state;

  logic [11:0] s1, s2;   // {data, strobe, imgend, is_head, transfer}
  logic        strobe_s, imgend_s, is_head_s;
  logic [7:0]  data_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= {pc_data, pc_strobe, pc_imgend, pc_is_head, pc_transfer};
      s2 <= s1;
    end
  end

  assign {data_s, strobe_s, imgend_s, is_head_s, transfer_s} = s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      byte_data    <= '0;
      byte_is_head <= 1'b0;
      byte_imgend  <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (strobe_s && transfer_s) begin
                byte_data    <= data_s;
                byte_is_head <= is_head_s;
                byte_imgend  <= imgend_s;
                state        <= HOLD;
              end
        HOLD: if (byte_taken) state <= ACK;
        ACK:  if (!strobe_s) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign byte_valid = (state == HOLD);
  assign pc_ack     = (state == ACK);

  // Handshake rules: a byte is taken only while one is offered, and ACK
  // never rises while STROBE is low.
  a_taken: assert property (@(posedge clk) disable iff (!rst_n)
    byte_taken |-> byte_valid);
  a_ack: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(pc_ack) |-> strobe_s);

endmodule
