// rank_sorter: keeps the RANKS smallest distances seen so far, in order.
//
// Position 0 holds the best (smallest) distance. Each position has one
// comparator, gt[k] = "position k is empty or holds a larger distance than
// the new one". That single result serves twice: as the "current" test of
// position k and as the "above" test of position k+1. On ins, in one cycle,
// every position picks its next value at once:
//   gt[k] and not gt[k-1] : take the new (distance, label)
//   gt[k-1]               : take the entry of position k-1 (shift down)
//   otherwise             : hold
// The entry pushed out of the last position is dropped. On a tie the entry
// already in the list stays ahead. clear empties the list (start of an
// operation). Only the N best are kept, so they fit in registers.
module rank_sorter #(
  parameter int unsigned DW    = 12,
  parameter int unsigned RANKS = 2,
  parameter int unsigned IDX_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             ins,
  input  logic [DW-1:0]    new_dist,
  input  logic [IDX_W-1:0] new_idx,
  output logic [DW-1:0]    rank_dist  [RANKS],
  output logic [IDX_W-1:0] rank_idx   [RANKS],
  output logic [RANKS-1:0] rank_valid
);

  logic [RANKS-1:0] gt;

  always_comb begin
    for (int k = 0; k < RANKS; k++)
      gt[k] = !rank_valid[k] || (rank_dist[k] > new_dist);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < RANKS; k++) begin
        rank_dist[k] <= '0;
        rank_idx[k]  <= '0;
      end
      rank_valid <= '0;
    end else if (clear) begin
      rank_valid <= '0;
    end else if (ins) begin
      for (int k = 0; k < RANKS; k++) begin
        if (k > 0 && gt[k-1]) begin
          rank_dist[k]  <= rank_dist[k-1];
          rank_idx[k]   <= rank_idx[k-1];
          rank_valid[k] <= rank_valid[k-1];
        end else if (gt[k]) begin
          rank_dist[k]  <= new_dist;
          rank_idx[k]   <= new_idx;
          rank_valid[k] <= 1'b1;
        end
      end
    end
  end

  // The list fills from the top and stays in non-decreasing distance order.
  for (genvar k = 1; k < RANKS; k++) begin : g_order
    a_order: assert property (@(posedge clk) disable iff (!rst_n)
      rank_valid[k] |-> rank_valid[k-1] && (rank_dist[k-1] <= rank_dist[k]));
  end

endmodule
