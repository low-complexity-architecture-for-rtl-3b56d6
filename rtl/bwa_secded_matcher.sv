// bwa_secded_matcher: BWA tag matcher and decision unit for an (8,4) code.
//
// Matches an incoming tag, encoded with a single-error-correcting,
// double-error-detecting (8,4) code, against the code word retrieved from a
// tag array, without decoding the retrieved word first. Code words are
// {check[3:0], data[3:0]}.
//
// First level: the 8 differing bits go to a 4-input BWA for the data (tag)
// part and another for the check (parity) part; each produces bits of
// weight 4, 2, 2 and 1.
// Second level: the two weight-4 bits are ORed into Q. The four weight-2 bits
// go to a small BWA for 2's: two half adders whose carries (weight 4 in bit
// units) are ORed into R, and whose sums are added by a third half adder
// giving S (weight 4) and T (weight 2). The two weight-1 bits go to a half
// adder, the BWA for 1's, giving U (weight 2) and V (weight 1).
// Decision (Hamming distance d): Q|R|S means d >= 4, mismatch; otherwise
// d = 2T + 2U + V (U and V are never both set) and
//   T U V = 0 0 x -> match (d <= 1, a single error is correctable)
//           0 1 x -> fault (d = 2)
//           1 0 0 -> fault (d = 2)
//           1 0 1 -> mismatch (d = 3)
//           1 1 x -> mismatch (d = 4)
// Structure and truth table follow the document. Which weight-2 bits share a
// half adder in the BWA for 2's is this design's choice; any pairing counts
// the same. Purely combinational.
module bwa_secded_matcher
  import simtag_pkg::*;
(
  input  logic [7:0]    incoming,
  input  logic [7:0]    retrieved,
  output logic          q, r, s, t, u, v,
  output bwa_decision_e decision
);
  logic [7:0] diff;
  logic [3:0] tag_acc, par_acc;   // weights 4,2,2,1 at index 0..3

  assign diff = incoming ^ retrieved;

  bwa #(.N(4)) u_bwa_tag (.in(diff[3:0]), .out(tag_acc));
  bwa #(.N(4)) u_bwa_par (.in(diff[7:4]), .out(par_acc));

  // OR-gate tree on the weight-4 bits
  assign q = tag_acc[0] | par_acc[0];

  // BWA for 2's
  logic c2a, s2a, c2b, s2b;
  half_adder u_ha2a (.a(tag_acc[1]), .b(par_acc[1]), .carry(c2a), .sum(s2a));
  half_adder u_ha2b (.a(tag_acc[2]), .b(par_acc[2]), .carry(c2b), .sum(s2b));
  assign r = c2a | c2b;
  half_adder u_ha2c (.a(s2a), .b(s2b), .carry(s), .sum(t));

  // BWA for 1's
  half_adder u_ha1 (.a(tag_acc[3]), .b(par_acc[3]), .carry(u), .sum(v));

  // Decision unit (truth table of the document)
  always_comb begin
    if (q | r | s)        decision = DEC_MISMATCH;
    else if (!t && !u)    decision = DEC_MATCH;
    else if (!t &&  u)    decision = DEC_FAULT;
    else if (!u && !v)    decision = DEC_FAULT;
    else                  decision = DEC_MISMATCH;
  end
endmodule
