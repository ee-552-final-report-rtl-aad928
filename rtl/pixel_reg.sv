// pixel_reg: turns the byte stream R, G, B, R, G, B ... into 24-bit pixels.
//
// The PC sends the three 8-bit components of a pixel one after another (R
// first; the order is this design's choice). The register keeps R and G and,
// when B arrives, presents pix = {R,G,B} with pix_valid high until the
// engine takes it (pix_taken). While a full pixel waits, in_ready is low, so
// the next byte is not accepted and the port handshake stalls. clear drops a
// partial or waiting pixel (start of an image).
module pixel_reg (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  output logic        in_ready,
  output logic        pix_valid,
  output logic [23:0] pix,
  input  logic        pix_taken
);

  logic [1:0] cnt;
  logic [7:0] r_q, g_q;

  assign in_ready = !pix_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      r_q       <= '0;
      g_q       <= '0;
      pix       <= '0;
      pix_valid <= 1'b0;
    end else if (clear) begin
      cnt       <= '0;
      pix_valid <= 1'b0;
    end else begin
      if (pix_taken) pix_valid <= 1'b0;
      if (in_valid && in_ready) begin
        unique case (cnt)
          2'd0: begin r_q <= in_byte; cnt <= 2'd1; end
          2'd1: begin g_q <= in_byte; cnt <= 2'd2; end
          default: begin
            pix       <= {r_q, g_q, in_byte};
            pix_valid <= 1'b1;
            cnt       <= 2'd0;
          end
        endcase
      end
    end
  end

  // Handshake rule: a waiting pixel stays valid and unchanged until it is
  // taken or cleared.
  a_pix_hold: assert property (@(posedge clk) disable iff (!rst_n)
    pix_valid && !pix_taken && !clear |=> pix_valid && $stable(pix));

endmodule
