// amf_pkg: types shared by the median-filter modules.
//
// rank_src_e is the encoding of the select lines S1S0 of the rank
// multiplexer in every token-ring cell. The four codes and their meaning
// follow the document's rank-update rules: 11 loads the recalculated rank A
// (cell holds the token), 10 decrements the rank, 01 increments it and 00
// keeps it.
package amf_pkg;

  typedef enum logic [1:0] {
    RANK_KEEP   = 2'b00,
    RANK_INC    = 2'b01,
    RANK_DEC    = 2'b10,
    RANK_RECALC = 2'b11
  } rank_src_e;

  // Pixel width of the image path; the document does not state one, 8-bit
  // greyscale is this design's choice.
  parameter int unsigned PIXEL_W = 8;

endpackage
