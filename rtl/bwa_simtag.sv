// bwa_simtag: tag unit of a 4-way set-associative cache whose tags are
// protected by the tag similarity of neighbouring sets (SimTag), with
// BWA-based tag comparison.
//
// Programs with spatial locality often hold the same tag in adjacent sets.
// Each tag entry carries, besides its parity bit, a 4-bit STI pointing to a
// line with the same tag in the set just above or below. When the parity
// check flags a corrupted tag, the tag is rebuilt from that replica. STIs are
// built only on misses, while the pipeline is stalled anyway: the set select
// is shifted to the upper and then the lower set, the missed tag is compared
// with their tags, matching lines are linked both ways, and pointers to the
// evicted line are cleared. A neighbour that so loses its twin is re-linked,
// after the miss response, to a twin two sets away when one exists.
//
// Datapath (all one cycle, combinational reads of the tag array):
//   address {tag, index} -> set_decoder -> set_shifter (0, 1 or 2 sets up or
//   down) -> tag_array row
//   row tags -> error_detection_unit (parity), tag_comparator x4 (hit),
//               sti_encoder, sti_replacement_handler, error_corrector
//   simtag_controller sequences it (see there for states and latencies).
// Interface: req_valid/req_ready handshake with req_addr; one response per
// request on resp_valid with hit/miss, way, the (corrected) tag read, the
// Hamming distance of the hitting way's comparator, and flags for a
// corrected or an uncorrectable tag error met on the way. On a miss the
// line is allocated at once (the data fetch itself is outside this unit) and
// evict_valid/evict_tag name a replaced line for write-back. inj_* flip
// stored bits to model transient upsets.
//
// Beside it, and independent of it, sits the (8,4)-code BWA matcher with its
// decision unit (ecc_* ports), the comparator the document gives for tags
// protected by a SEC-DED code.
//
// Defaults follow the document: 4 ways, 3 index bits (8 sets), 8-bit tags
// with one parity bit, address = {tag, index} of 11 bits.
module bwa_simtag
  import simtag_pkg::*;
#(
  parameter int unsigned TAG_W   = 8,
  parameter int unsigned INDEX_W = 3,
  localparam int unsigned NSETS  = 1 << INDEX_W,
  localparam int unsigned ADDR_W = TAG_W + INDEX_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic [ADDR_W-1:0]    req_addr,
  output logic                 resp_valid,
  output logic                 resp_hit,
  output logic [WAY_W-1:0]     resp_way,
  output logic [TAG_W-1:0]     resp_tag,
  output logic [$clog2(TAG_W+2)-1:0] resp_distance,
  output logic                 resp_corrected,
  output logic                 resp_due,
  output logic                 evict_valid,
  output logic [TAG_W-1:0]     evict_tag,
  output logic [3:0]           ctrl_state,
  // transient error injection
  input  logic                 inj_en,
  input  logic [INDEX_W-1:0]   inj_index,
  input  logic [WAY_W-1:0]     inj_way,
  input  logic [TAG_W:0]       inj_mask,
  // (8,4)-code BWA matcher
  input  logic [7:0]           ecc_incoming,
  input  logic [7:0]           ecc_retrieved,
  output bwa_decision_e        ecc_decision,
  output logic [5:0]           ecc_qrstuv      // second-level outputs {Q,R,S,T,U,V}
);
  localparam int unsigned DW = $clog2(TAG_W + 2);

  // ---------------- address register ----------------
  logic [TAG_W-1:0]   tag_q;
  logic [INDEX_W-1:0] index_q;
  logic               par_q;
  logic               addr_load;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tag_q   <= '0;
      index_q <= '0;
    end else if (addr_load) begin
      {tag_q, index_q} <= req_addr;
    end

  assign par_q = ^tag_q;   // encoded incoming tag: {par_q, tag_q}

  // ---------------- set selection ----------------
  logic [NSETS-1:0] dec_sel, row_sel;
  logic             shift_en, shift_dir, shift_far;

  set_decoder #(.INDEX_W(INDEX_W)) u_dec (.index(index_q), .row_sel(dec_sel));
  set_shifter #(.NSETS(NSETS)) u_shift (
    .dec_sel(dec_sel), .en(shift_en), .s(shift_dir), .by2(shift_far), .row_sel(row_sel));

  // ---------------- tag array ----------------
  logic [WAYS-1:0]            rd_valid, rd_par;
  logic [WAYS-1:0][TAG_W-1:0] rd_tag;
  sti_t [WAYS-1:0]            rd_sti;
  logic [WAYS-1:0]            line_we, sti_we;
  logic                       line_wvalid, line_src_fix;
  sti_t [WAYS-1:0]            sti_wdata;
  logic [TAG_W-1:0]           fix_tag_q, fix_tag;
  logic                       fix_par_q, fix_par, fix_load, src_ok;

  tag_array #(.TAG_W(TAG_W), .INDEX_W(INDEX_W)) u_tags (
    .clk, .rst_n, .row_sel,
    .rd_valid, .rd_tag, .rd_par, .rd_sti,
    .line_we,
    .wr_valid(line_wvalid),
    .wr_tag  (line_src_fix ? fix_tag_q : tag_q),
    .wr_par  (line_src_fix ? fix_par_q : par_q),
    .sti_we, .wr_sti(sti_wdata),
    .inj_en, .inj_index, .inj_way, .inj_mask
  );

  // ---------------- error detection and comparators ----------------
  logic [WAYS-1:0]          err_vec, cmp_match, hit_vec;
  logic [WAYS-1:0][DW-1:0]  cmp_dist;

  error_detection_unit #(.TAG_W(TAG_W)) u_edu (
    .valid(rd_valid), .tag(rd_tag), .par(rd_par), .err(err_vec));

  for (genvar w = 0; w < WAYS; w++) begin : g_cmp
    tag_comparator #(.W(TAG_W + 1)) u_cmp (
      .incoming({par_q, tag_q}),
      .stored  ({rd_par[w], rd_tag[w]}),
      .match   (cmp_match[w]),
      .distance(cmp_dist[w])
    );
  end
  assign hit_vec = cmp_match & rd_valid;

  // ---------------- STI encoder and replacement handler ----------------
  logic [WAYS-1:0]  enc_match, inval;
  sti_t             enc_sti;
  logic             back_loc;
  logic [WAY_W-1:0] victim_way, corr_way;

  // Tag the encoder searches for: the missed tag, or during re-linking the
  // tag of a line whose twin was replaced (captured when its STI was cleared).
  logic [1:0]       enc_src;
  logic             rl_cap_up, rl_cap_down;
  logic [WAY_W-1:0] rl_sel_way;
  logic [TAG_W-1:0] rl_up_tag_q, rl_down_tag_q, enc_tag;
  logic             rl_up_par_q, rl_down_par_q, enc_par;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rl_up_tag_q   <= '0;
      rl_up_par_q   <= 1'b0;
      rl_down_tag_q <= '0;
      rl_down_par_q <= 1'b0;
    end else begin
      if (rl_cap_up) begin
        rl_up_tag_q <= rd_tag[rl_sel_way];
        rl_up_par_q <= rd_par[rl_sel_way];
      end
      if (rl_cap_down) begin
        rl_down_tag_q <= rd_tag[rl_sel_way];
        rl_down_par_q <= rd_par[rl_sel_way];
      end
    end

  always_comb
    unique case (enc_src)
      2'd1:    {enc_par, enc_tag} = {rl_up_par_q, rl_up_tag_q};
      2'd2:    {enc_par, enc_tag} = {rl_down_par_q, rl_down_tag_q};
      default: {enc_par, enc_tag} = {par_q, tag_q};
    endcase

  sti_encoder #(.TAG_W(TAG_W)) u_enc (
    .new_tag(enc_tag), .new_par(enc_par),
    .adj_valid(rd_valid), .adj_tag(rd_tag), .adj_par(rd_par),
    .set_loc(shift_dir), .match(enc_match), .sti(enc_sti));

  sti_replacement_handler u_repl (
    .adj_sti(rd_sti), .victim_way, .back_loc, .inval);

  // ---------------- error corrector ----------------
  error_corrector #(.TAG_W(TAG_W)) u_corr (
    .adj_valid(rd_valid), .adj_tag(rd_tag), .adj_par(rd_par),
    .way_loc(corr_way), .fix_tag, .fix_par, .src_ok);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fix_tag_q <= '0;
      fix_par_q <= 1'b0;
    end else if (fix_load) begin
      fix_tag_q <= fix_tag;
      fix_par_q <= fix_par;
    end

  // ---------------- main controller ----------------
  simtag_controller u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .addr_load,
    .resp_valid, .resp_hit, .resp_way, .resp_corrected, .resp_due, .evict_valid,
    .row_valid(rd_valid), .row_sti(rd_sti), .hit_vec, .err_vec,
    .enc_match, .enc_sti, .inval, .src_ok,
    .shift_en, .shift_far, .shift_dir, .back_loc, .enc_src,
    .rl_cap_up, .rl_cap_down, .rl_sel_way, .victim_way, .corr_way,
    .fix_load, .line_we, .line_wvalid, .line_src_fix, .sti_we, .sti_wdata,
    .state_o(ctrl_state)
  );

  // Tag read at the responding way: on a hit the matched (possibly corrected)
  // tag; on a miss the fill writes it this cycle, so the new tag is given.
  assign resp_tag      = resp_hit ? rd_tag[resp_way] : tag_q;
  assign resp_distance = cmp_dist[resp_way];

  // The evicted tag is still in the array until the FILL edge.
  assign evict_tag = rd_tag[victim_way];

  // ---------------- (8,4)-code BWA matcher ----------------
  bwa_secded_matcher u_ecc (
    .incoming(ecc_incoming), .retrieved(ecc_retrieved),
    .q(ecc_qrstuv[5]), .r(ecc_qrstuv[4]), .s(ecc_qrstuv[3]),
    .t(ecc_qrstuv[2]), .u(ecc_qrstuv[1]), .v(ecc_qrstuv[0]),
    .decision(ecc_decision));
endmodule
