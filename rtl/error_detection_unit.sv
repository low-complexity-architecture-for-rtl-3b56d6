// error_detection_unit: parity check of the tags read from every way.
//
// Each tag entry stores one even-parity bit (the XOR of the tag bits). A
// valid entry whose tag and parity bits XOR to one has a detected error.
// Invalid entries never report an error. The document detects tag errors with
// conventional parity check bits; the single even-parity bit per tag is this
// design's reading of the published waveforms. Purely combinational.
module error_detection_unit
  import simtag_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic [WAYS-1:0]             valid,
  input  logic [WAYS-1:0][TAG_W-1:0]  tag,
  input  logic [WAYS-1:0]             par,
  output logic [WAYS-1:0]             err
);
  always_comb
    for (int w = 0; w < WAYS; w++)
      err[w] = valid[w] & (^{par[w], tag[w]});
endmodule
