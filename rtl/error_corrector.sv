// error_corrector: picks the replica tag that repairs a corrupted tag.
//
// With the set select shifted to the set named by the corrupted line's STI
// set location, the four tags of that set are read. A multiplexer steered by
// the STI way location (S1,S0) selects the replica; its tag and parity bit
// are the corrected value. src_ok says the replica is usable: the entry is
// valid and passes its own parity check. The mux is the document's; the
// src_ok qualification is this design's addition. Purely combinational.
module error_corrector
  import simtag_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic [WAYS-1:0]             adj_valid,
  input  logic [WAYS-1:0][TAG_W-1:0]  adj_tag,
  input  logic [WAYS-1:0]             adj_par,
  input  logic [WAY_W-1:0]            way_loc,
  output logic [TAG_W-1:0]            fix_tag,
  output logic                        fix_par,
  output logic                        src_ok
);
  assign fix_tag = adj_tag[way_loc];
  assign fix_par = adj_par[way_loc];
  assign src_ok  = adj_valid[way_loc] && !(^{fix_par, fix_tag});
endmodule
