// index_counter: label of the candidate image being processed.
//
// idx counts candidates from 0. inc (one cycle) advances it after a candidate
// has been ranked; full goes high once MAX images have been counted, which is
// the capacity of the database. clear starts a new indexing operation.
module index_counter #(
  parameter int unsigned IDX_W = 6,
  parameter int unsigned MAX   = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             inc,
  output logic [IDX_W-1:0] idx,
  output logic             full
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      full <= 1'b0;
    end else if (clear) begin
      idx  <= '0;
      full <= 1'b0;
    end else if (inc && !full) begin
      if (32'(idx) == MAX - 1) full <= 1'b1;
      else                     idx  <= idx + 1'b1;
    end
  end

endmodule
