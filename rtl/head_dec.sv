// head_dec: decodes the header byte the PC sends ahead of each image.
//
// Header format (this design's choice): bits 7:6 give the image kind,
// 01 = query image (starts a new indexing operation), 10 = candidate image,
// 11 = end of the database (ends the operation). 00 is not a valid header.
// Bits 5:0 are free for the PC (for example an image number) and are
// ignored. Purely combinational.
module head_dec
  import idx_pkg::*;
(
  input  logic [7:0] hdr,
  output logic       is_query,
  output logic       is_cand,
  output logic       is_last,
  output logic       is_valid
);

  hdr_kind_e kind;
  assign kind = hdr_kind_e'(hdr[7:6]);

  assign is_query = (kind == HDR_QUERY);
  assign is_cand  = (kind == HDR_CAND);
  assign is_last  = (kind == HDR_LAST);
  assign is_valid = (kind != HDR_NONE);

endmodule
