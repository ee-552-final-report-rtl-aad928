// color_hist: uniform quantisation and histogram update for one pixel.
//
// For each of the three components of the held pixel (R, G, B in turn) the
// block quantises the 8-bit value to a 4-bit label (its top four bits, i.e.
// 16 equal intervals of width 16), reads the bin at address
// {component, label} of the 48-word histogram RAM, and writes it back plus
// one. A count that has reached 2^DW-1 stays there (saturation is this
// design's choice). Because the histogram lives in a RAM the block needs a
// read state and a write state per component: building the three histograms
// in sequence costs 6 cycles per pixel but uses one memory port.
//
// Handshake: go high in IDLE starts; done is high in READY until go drops.
// The RAM has a one-cycle registered read, so rdata in WR is the word
// addressed in RD. go-to-done latency: 7 cycles.
module color_hist
  import idx_pkg::*;
#(
  parameter int unsigned DW = 12,
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  output logic          done,
  output logic [1:0]    comp_sel,
  input  logic [7:0]    comp,
  output logic [AW-1:0] addr,
  output logic          we,
  output logic [DW-1:0] wdata,
  input  logic [DW-1:0] rdata
);

  typedef enum logic [1:0] {IDLE, RD, WR, READY} state_e;
  state_e     state;
  logic [1:0] c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      c     <= '0;
    end else begin
      unique case (state)
        IDLE:  if (go) begin
                 state <= RD;
                 c     <= '0;
               end
        RD:    state <= WR;
        WR:    if (c == 2'd2) state <= READY;
               else begin
                 c     <= c + 1'b1;
                 state <= RD;
               end
        READY: if (!go) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign comp_sel = c;
  assign addr     = AW'({c, uq_label(comp)});
  assign we       = (state == WR);
  assign wdata    = (&rdata) ? rdata : rdata + 1'b1;
  assign done     = (state == READY);

endmodule
