// splitter: header/data splitter of the top control unit.
//
// Each byte from the parallel port is one of three kinds: an image-end
// marker (IMGEND set), header information (IS_HEAD set) or pixel data. The
// splitter raises exactly one of end_valid, hdr_valid and dat_valid for a
// valid byte and hands the byte to the header decoder or to the pixel
// register. If both flags are set, image end wins over header (this
// design's choice). Purely combinational.
module splitter (
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_is_head,
  input  logic       in_imgend,
  output logic       hdr_valid,
  output logic [7:0] hdr_data,
  output logic       dat_valid,
  output logic [7:0] dat_data,
  output logic       end_valid
);

  assign end_valid = in_valid && in_imgend;
  assign hdr_valid = in_valid && !in_imgend && in_is_head;
  assign dat_valid = in_valid && !in_imgend && !in_is_head;
  assign hdr_data  = in_is_head ? in_data : 8'h00;
  assign dat_data  = in_is_head ? 8'h00 : in_data;

endmodule
