// idx_pkg: constants and types shared by the image indexing processor.
//
// Histograms hold 16 uniform-quantisation bins for each of the R, G and B
// components. The three component histograms of one image share a single
// 48-word memory, addressed as {component, label}: R at 0..15, G at 16..31,
// B at 32..47. Labels are the top four bits of an 8-bit component, which is
// the 16-interval uniform quantiser of the design (interval width 16).
// The database holds up to 64 candidate images, so labels are 6 bits wide.
package idx_pkg;

  localparam int unsigned HIST_BINS  = 16;
  localparam int unsigned N_COMP     = 3;
  localparam int unsigned HIST_WORDS = HIST_BINS * N_COMP;  // 48
  localparam int unsigned HIST_AW    = 6;
  localparam int unsigned MAX_IMAGES = 64;

  // Header byte sent by the PC ahead of each image (bits 7:6).
  typedef enum logic [1:0] {
    HDR_NONE  = 2'b00,
    HDR_QUERY = 2'b01,
    HDR_CAND  = 2'b10,
    HDR_LAST  = 2'b11
  } hdr_kind_e;

  // Owner of a histogram memory port, as chosen by the RAM manager.
  typedef enum logic [1:0] {
    RSEL_INIT  = 2'd0,
    RSEL_CLEAR = 2'd1,
    RSEL_HIST  = 2'd2,
    RSEL_DIST  = 2'd3
  } ram_sel_e;

  // Uniform quantiser: 8-bit component -> 4-bit label (interval 16).
  function automatic logic [3:0] uq_label(input logic [7:0] v);
    return v[7:4];
  endfunction

endpackage
