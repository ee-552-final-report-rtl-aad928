// ram_manager: connects the engine's sub-modules to the two histogram RAMs.
//
// Three blocks write the RAMs (the whole-memory initialiser, the candidate
// clear and the histogram builder) and two read them (the histogram builder
// and the distance calculator). Each RAM's address, write enable and write
// data come from a 4-to-1 multiplexer whose 2-bit select is decoded from
// three activity signals of the engine controller (init_act, clear_act,
// hist_act), plus hist_query, which says whether the histogram being built
// is the query's. Decoding order is this design's choice: initialise, then
// clear, then histogram, otherwise the distance calculator reads. The
// candidate clear never reaches the query RAM. Read data goes to every
// reader unchanged. Purely combinational.
module ram_manager
  import idx_pkg::*;
#(
  parameter int unsigned DW = 12,
  parameter int unsigned AW = 6
) (
  input  logic          init_act,
  input  logic          clear_act,
  input  logic          hist_act,
  input  logic          hist_query,
  // requesters
  input  logic [AW-1:0] init_addr,
  input  logic          init_we,
  input  logic [AW-1:0] clr_addr,
  input  logic          clr_we,
  input  logic [AW-1:0] hist_addr,
  input  logic          hist_we,
  input  logic [DW-1:0] hist_wdata,
  input  logic [AW-1:0] dist_addr,
  // query RAM port
  output logic [AW-1:0] q_addr,
  output logic          q_we,
  output logic [DW-1:0] q_wdata,
  // candidate RAM port
  output logic [AW-1:0] c_addr,
  output logic          c_we,
  output logic [DW-1:0] c_wdata
);

  ram_sel_e q_sel, c_sel;

  always_comb begin
    if (init_act)                    q_sel = RSEL_INIT;
    else if (hist_act && hist_query) q_sel = RSEL_HIST;
    else                             q_sel = RSEL_DIST;

    if (init_act)                     c_sel = RSEL_INIT;
    else if (clear_act)               c_sel = RSEL_CLEAR;
    else if (hist_act && !hist_query) c_sel = RSEL_HIST;
    else                              c_sel = RSEL_DIST;
  end

  function automatic logic [AW+DW:0] pick(
      input ram_sel_e sel,
      input logic [AW-1:0] a_init, input logic we_init,
      input logic [AW-1:0] a_clr,  input logic we_clr,
      input logic [AW-1:0] a_hist, input logic we_hist, input logic [DW-1:0] d_hist,
      input logic [AW-1:0] a_dist);
    unique case (sel)
      RSEL_INIT:  return {a_init, we_init, {DW{1'b0}}};
      RSEL_CLEAR: return {a_clr,  we_clr,  {DW{1'b0}}};
      RSEL_HIST:  return {a_hist, we_hist, d_hist};
      default:    return {a_dist, 1'b0,    {DW{1'b0}}};
    endcase
  endfunction

  assign {q_addr, q_we, q_wdata} = pick(q_sel, init_addr, init_we, clr_addr, clr_we,
                                        hist_addr, hist_we, hist_wdata, dist_addr);
  assign {c_addr, c_we, c_wdata} = pick(c_sel, init_addr, init_we, clr_addr, clr_we,
                                        hist_addr, hist_we, hist_wdata, dist_addr);

endmodule
