// tag_comparator: tag match through a butterfly-formed weight accumulator.
//
// The incoming tag, already encoded with its check bits, is XORed bit by bit
// with a stored code word; a BWA counts the differing bits. The tags match
// when the count is zero, which is the case exactly when no BWA output bit is
// set, so the match flag is a NOR of the BWA outputs. The Hamming distance
// itself is also given as a binary number (the weighted sum of the BWA
// outputs) for observation.
//
// The document uses a BWA for tag matching; the padding of W up to a power of
// two and the binary distance output are this design's choices.
// Purely combinational.
module tag_comparator
  import simtag_pkg::*;
#(
  parameter int unsigned W = 9               // tag bits plus check bits
) (
  input  logic [W-1:0]         incoming,     // encoded tag from the address
  input  logic [W-1:0]         stored,       // encoded tag read from the array
  output logic                 match,        // distance == 0
  output logic [$clog2(W+1)-1:0] distance    // Hamming distance
);
  localparam int unsigned K  = $clog2(W);
  localparam int unsigned NP = 1 << K;       // BWA width, power of two

  logic [NP-1:0] diff;
  logic [NP-1:0] acc;

  always_comb begin
    diff        = '0;
    diff[W-1:0] = incoming ^ stored;
  end

  bwa #(.N(NP)) u_bwa (.in(diff), .out(acc));

  assign match = ~|acc;

  always_comb begin
    int unsigned d;
    d = 0;
    for (int unsigned j = 0; j < NP; j++)
      if (acc[j]) d += bwa_weight(j, K);
    distance = d[$clog2(W+1)-1:0];
  end
endmodule
