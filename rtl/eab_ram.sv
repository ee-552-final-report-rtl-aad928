// eab_ram: single-port histogram memory (one embedded array block instance).
//
// One read/write port with a registered address, like the single-port RAM
// primitive the design was mapped to. Each clock the word at addr appears on
// rdata one cycle later. A write stores wdata and also shows wdata on rdata
// in the next cycle (write-through), so a clearing pass can be watched on the
// output. WORDS x DW = 48 x 12 by default: R, G and B histograms of 16 bins.
// The memory has no reset; the engine clears it before each use.
module eab_ram #(
  parameter int unsigned DW    = 12,
  parameter int unsigned AW    = 6,
  parameter int unsigned WORDS = 48
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= wdata;
      rdata     <= wdata;
    end else begin
      rdata <= mem[addr];
    end
  end

endmodule
