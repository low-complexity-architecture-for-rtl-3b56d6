// set_shifter: moves the decoder's one-hot set select to a neighbouring set.
//
// Sits between the row decoder and the tag array. With en low the select
// passes unchanged. With en high it is shifted by one row: s = 1
// (simtag_pkg::SET_UPPER) selects the upper set, index - 1; s = 0 (SET_LOWER)
// selects the lower set, index + 1. With by2 also high it is shifted by two
// rows, to index - 2 or index + 2. A select shifted past the first or last
// set selects no row, so an edge set simply has no upper or lower neighbour.
// The document gives the function and the S and EN controls; the direction
// encoding, the no-wrap behaviour at the edges and the two-row shift (used to
// find a new twin for a line whose twin was replaced) are this design's.
// Purely combinational.
module set_shifter
  import simtag_pkg::*;
#(
  parameter int unsigned NSETS = 8
) (
  input  logic [NSETS-1:0] dec_sel,   // one-hot from the decoder
  input  logic             en,        // shift enable
  input  logic             s,         // direction: SET_UPPER or SET_LOWER
  input  logic             by2,       // shift by two rows instead of one
  output logic [NSETS-1:0] row_sel
);
  always_comb begin
    if (!en)                 row_sel = dec_sel;
    else if (s == SET_UPPER) row_sel = by2 ? dec_sel >> 2 : dec_sel >> 1;
    else                     row_sel = by2 ? dec_sel << 2 : dec_sel << 1;
  end
endmodule
