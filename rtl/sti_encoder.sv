// sti_encoder: generates the STI of a newly fetched line.
//
// While the pipeline is stalled on a miss, the tags of one adjacent set are
// read. The encoder compares the missed tag (with its parity bit) to each of
// them using BWA tag comparators. A valid entry that matches sets the STI
// valid bit, a multiplexer turns the matching way into the 2-bit way
// location, and the set location bit comes from the main controller (the
// direction the set select was shifted). If no way matches the STI is
// all zeros. The per-way match vector is also output; the controller uses it
// to point the matching line back at the new one.
//
// The document gives the function. Within one set a tag is stored at most
// once, so at most one way can match; should several match, the lowest way is
// taken (this design's choice). Purely combinational.
module sti_encoder
  import simtag_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic [TAG_W-1:0]            new_tag,   // tag from the address
  input  logic                        new_par,
  input  logic [WAYS-1:0]             adj_valid, // adjacent set read-out
  input  logic [WAYS-1:0][TAG_W-1:0]  adj_tag,
  input  logic [WAYS-1:0]             adj_par,
  input  logic                        set_loc,   // from the main controller
  output logic [WAYS-1:0]             match,
  output sti_t                        sti
);
  logic [WAYS-1:0] eq;

  for (genvar w = 0; w < WAYS; w++) begin : g_cmp
    logic [$clog2(TAG_W+2)-1:0] dist_unused;
    tag_comparator #(.W(TAG_W + 1)) u_cmp (
      .incoming({new_par, new_tag}),
      .stored  ({adj_par[w], adj_tag[w]}),
      .match   (eq[w]),
      .distance(dist_unused)
    );
  end

  assign match = eq & adj_valid;

  always_comb begin
    sti = STI_NONE;
    for (int w = WAYS - 1; w >= 0; w--)
      if (match[w]) begin
        sti.valid   = 1'b1;
        sti.set_loc = set_loc;
        sti.way     = WAY_W'(w);
      end
  end
endmodule
