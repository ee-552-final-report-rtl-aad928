// distance_calc: L1 distance between the query and candidate histograms.
//
// Walks the 48 histogram addresses once, reading the same word of the query
// RAM and the candidate RAM together, and accumulates |q - c| over all 16
// bins of R, G and B. The read is pipelined: address k is issued in one cycle
// and its two words are added in the next, so the pass takes WORDS + 1
// cycles. The sum is kept in DW bits, the same width as a histogram bin, and
// saturates at 2^DW-1 (saturation is this design's choice).
//
// Handshake: go high in IDLE starts and clears the sum; done is high in READY
// until go drops; l1_dist holds the result until the next start.
module distance_calc #(
  parameter int unsigned DW    = 12,
  parameter int unsigned AW    = 6,
  parameter int unsigned WORDS = 48
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  output logic          done,
  output logic [AW-1:0] addr,
  input  logic [DW-1:0] q_rdata,
  input  logic [DW-1:0] c_rdata,
  output logic [DW-1:0] l1_dist
);

  typedef enum logic [1:0] {IDLE, RUN, DRAIN, READY} state_e;
  state_e        state;
  logic          vld;
  logic [DW-1:0] diff;
  logic [DW:0]   sum;

  assign diff = (q_rdata > c_rdata) ? q_rdata - c_rdata : c_rdata - q_rdata;
  assign sum  = {1'b0, l1_dist} + {1'b0, diff};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      addr  <= '0;
      vld   <= 1'b0;
      l1_dist  <= '0;
    end else begin
      vld <= (state == RUN);
      if (vld) l1_dist <= sum[DW] ? '1 : sum[DW-1:0];
      unique case (state)
        IDLE:  if (go) begin
                 state <= RUN;
                 addr  <= '0;
                 l1_dist  <= '0;
               end
        RUN:   if (32'(addr) == WORDS - 1) state <= DRAIN;
               else                        addr  <= addr + 1'b1;
        DRAIN: state <= READY;
        READY: if (!go) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign done = (state == READY);

endmodule
