// simtag_pkg: types and constants shared by the SimTag tag-protection unit.
//
// A cache line's Same Tag Information (STI) is a 4-bit pointer to another
// line, in the set directly above or below, that holds the same tag:
//   bit 3   valid     - a replica exists
//   bit 2   set_loc   - 0: lower set (index + 1), 1: upper set (index - 1)
//   bit 1:0 way       - way of the replica in that set
// So 1001 reads "lower set, way 1" and 1110 "upper set, way 2", as in the
// published STI code table. The tag array is 4-way set associative; this
// width is fixed by the 2-bit way field.
//
// The package also carries the BWA weight rule and the three-way decision
// of the ECC tag matcher.
package simtag_pkg;

  localparam int unsigned WAYS  = 4;
  localparam int unsigned WAY_W = 2;

  localparam logic SET_LOWER = 1'b0;
  localparam logic SET_UPPER = 1'b1;

  typedef struct packed {
    logic             valid;
    logic             set_loc;
    logic [WAY_W-1:0] way;
  } sti_t;

  localparam sti_t STI_NONE = '0;

  // Outcome of matching an incoming code word against a stored one.
  typedef enum logic [1:0] {
    DEC_MATCH    = 2'd0,  // Hamming distance 0 or 1: same tag (1 bit correctable)
    DEC_FAULT    = 2'd1,  // distance 2: detected, uncorrectable error
    DEC_MISMATCH = 2'd2   // distance 3 or more: different tag
  } bwa_decision_e;

  // Weight of output bit j of an N = 2**k input butterfly-formed weight
  // accumulator: 2 raised to the number of zero bits in the k-bit index j.
  function automatic int unsigned bwa_weight(int unsigned j, int unsigned k);
    int unsigned zeros;
    zeros = 0;
    for (int unsigned b = 0; b < k; b++)
      if (((j >> b) & 1) == 0) zeros++;
    return 1 << zeros;
  endfunction

  // Even parity bit of a tag: the XOR of its bits.
  function automatic logic even_parity(logic [63:0] v);
    return ^v;
  endfunction

endpackage
