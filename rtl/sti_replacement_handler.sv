// sti_replacement_handler: finds STI pointers to a line that is being replaced.
//
// When a line is evicted, lines of the adjacent sets may hold an STI that
// points at it. For the adjacent set being read, the handler compares each
// way's STI with the pointer that would address the victim: valid bit set,
// set location equal to back_loc (SET_LOWER when reading the upper set,
// SET_UPPER when reading the lower set) and way location equal to the victim
// way. Matching ways are flagged in inval so the controller clears their
// STI valid bits. This is done even when the victim slot held no valid line:
// a line invalidated after an uncorrectable error may still be named by old
// pointers, which must not survive the slot being refilled with another tag.
// Function as in the document, one equality comparator per way; the clearing
// of pointers to an empty slot is this design's addition.
// Purely combinational.
module sti_replacement_handler
  import simtag_pkg::*;
(
  input  sti_t [WAYS-1:0]   adj_sti,      // STI of each way of the adjacent set
  input  logic [WAY_W-1:0]  victim_way,
  input  logic              back_loc,
  output logic [WAYS-1:0]   inval
);
  sti_t target;

  assign target = '{valid: 1'b1, set_loc: back_loc, way: victim_way};

  always_comb
    for (int w = 0; w < WAYS; w++)
      inval[w] = (adj_sti[w] == target);
endmodule
