// byte_ext_ins: byte extractor and byte inserter for tag operations.
//
// A 40-bit word has five bytes: byte 0..3 are the data bytes (bits 8k+7:8k)
// and byte 4 is the tag (bits 39:32). The extractor takes byte byte_sel of
// src and returns it in the low byte of an otherwise zero word. The inserter
// replaces byte byte_sel of src with the low byte of ins. byte_sel values 4..7
// all select the tag. The document says only that the extractor moves a byte
// of the source register onto the destination bus and that the inserter puts
// a byte into a 40-bit word; the byte numbering, the zero fill and the source
// of the inserted byte are this design's. Combinational.
module byte_ext_ins
  import spur_pkg::*;
(
  input  word_t      src,
  input  word_t      ins,
  input  logic [2:0] byte_sel,
  output word_t      extracted,
  output word_t      inserted
);
  logic [2:0] idx;
  assign idx = byte_sel[2] ? 3'd4 : byte_sel;

  always_comb begin
    extracted = '0;
    extracted[7:0] = src[8*idx +: 8];
    inserted = src;
    inserted[8*idx +: 8] = ins[7:0];
  end
endmodule
