// tb_bwa_simtag: end-to-end test of the SimTag tag unit at its default size
// (4 ways, 8 sets, 8-bit tags with parity).
//
// 1. The linking example: tag 10101 is already in set 2 way 2; a miss on the
//    same tag in set 3 fills way 1 there. Set 2 way 2 must then hold STI 1001
//    (lower set, way 1) and set 3 way 1 STI 1110 (upper set, way 2). A bit
//    flip in the new tag is then repaired from the replica on the next access.
// 2. Random traffic over a small pool of tags, so that equal tags in
//    neighbouring sets are common, with random single-bit upsets injected
//    between requests (at most one outstanding per entry). A reference model kept here predicts every response
//    (hit/miss, way, tag, corrected and uncorrectable flags, evicted line,
//    latency) and the complete array (valid, tag, parity, STI) after each
//    request. Independently of the model, every repair must restore the tag
//    the line was filled with, and every STI between two intact valid lines
//    must join equal tags.
// 3. The (8,4)-code matcher beside it is driven with random word pairs.
// Each mechanism must occur at least once: hit, miss, eviction, upper and
// lower STI, back-link of an existing line, STI invalidation on replacement,
// re-link of a line whose twin was replaced, repair, uncorrectable error without STI and with a bad replica, misses at
// the first and last set, and each matcher decision.
module tb_bwa_simtag;
  import simtag_pkg::*;
  localparam int TW = 8, IW = 3, NS = 8;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  logic [TW+IW-1:0] req_addr = 0;
  logic resp_valid, resp_hit, resp_corrected, resp_due, evict_valid;
  logic [1:0] resp_way;
  logic [TW-1:0] resp_tag, evict_tag;
  logic [3:0] resp_distance;
  logic [3:0] ctrl_state;
  logic inj_en = 0;
  logic [IW-1:0] inj_index = 0;
  logic [1:0] inj_way = 0;
  logic [TW:0] inj_mask = 0;
  logic [7:0] ecc_incoming = 0, ecc_retrieved = 0;
  bwa_decision_e ecc_decision;
  logic [5:0] ecc_qrstuv;

  bwa_simtag dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- reference model ----------------
  logic       m_valid [NS][4];
  logic [8:0] m_cw    [NS][4];     // {parity, tag} as stored
  logic [3:0] m_sti   [NS][4];
  logic [8:0] m_good  [NS][4];     // code word as filled, before any upset
  int         m_rr;

  // mechanism counters
  int n_hit, n_miss, n_evict, n_sti_up, n_sti_down, n_backlink, n_inval,
      n_repair, n_relink, n_due_nosti, n_due_badsrc, n_edge_top, n_edge_bottom, n_inject;
  int n_dec[3];

  function automatic logic [8:0] enc(logic [7:0] t);
    return {^t, t};
  endfunction

  function automatic void chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endfunction

  // Expected outcome of one request, applied to the model.
  typedef struct {
    logic hit; logic [1:0] way; logic [7:0] tag; logic corrected; logic due;
    logic evict; logic [7:0] evict_tag; int latency;
  } exp_t;

  function automatic exp_t model_access(logic [7:0] t, int i);
    exp_t e;
    e = '{hit: 0, way: 0, tag: t, corrected: 0, due: 0, evict: 0, evict_tag: 0, latency: 1};
    forever begin
      int ew;
      ew = -1;
      for (int w = 3; w >= 0; w--)
        if (m_valid[i][w] && ^m_cw[i][w]) ew = w;
      if (ew < 0) break;
      if (m_sti[i][ew][3]) begin
        int j, sw;
        j  = m_sti[i][ew][2] ? i - 1 : i + 1;
        sw = int'(m_sti[i][ew][1:0]);
        if (j >= 0 && j < NS && m_valid[j][sw] && !(^m_cw[j][sw])) begin
          chk($sformatf("repair of set %0d way %0d restores the filled tag", i, ew),
              m_cw[j][sw] == m_good[i][ew]);
          m_cw[i][ew] = m_cw[j][sw];
          e.corrected = 1;
          n_repair++;
        end else begin
          m_valid[i][ew] = 0;
          m_sti[i][ew] = 0;
          e.due = 1;
          n_due_badsrc++;
        end
        e.latency += 3;   // REC_READ, REC_WRITE, LOOKUP again
      end else begin
        m_valid[i][ew] = 0;
        e.due = 1;
        n_due_nosti++;
        e.latency += 1;   // LOOKUP again
      end
    end
    for (int w = 3; w >= 0; w--)
      if (m_valid[i][w] && m_cw[i][w] == enc(t)) begin
        e.hit = 1; e.way = 2'(w); e.tag = m_cw[i][w][7:0];
      end
    if (e.hit) begin
      n_hit++;
      return e;
    end
    begin
      int victim;
      logic allv;
      logic [3:0] cand_up, cand_down;
      int rl_way[2];
      logic [8:0] rl_cw[2];
      n_miss++;
      if (i == 0) n_edge_top++;
      if (i == NS - 1) n_edge_bottom++;
      allv = m_valid[i][0] && m_valid[i][1] && m_valid[i][2] && m_valid[i][3];
      victim = m_rr;
      if (!allv)
        for (int w = 3; w >= 0; w--) if (!m_valid[i][w]) victim = w;
      e.evict = allv;
      e.evict_tag = m_cw[i][victim][7:0];
      if (allv) n_evict++;
      cand_up = 0; cand_down = 0;
      rl_way = '{-1, -1};
      for (int side = 0; side < 2; side++) begin
        int j;
        logic back;
        j    = (side == 0) ? i - 1 : i + 1;
        back = (side == 0) ? 1'b0 : 1'b1;   // pointer back to set i
        if (j < 0 || j >= NS) continue;
        for (int w = 3; w >= 0; w--) begin
          logic inv, mt;
          inv = m_sti[j][w] == {1'b1, back, 2'(victim)};
          mt  = m_valid[j][w] && m_cw[j][w] == enc(t);
          if (inv) n_inval++;
          if (inv && !mt && m_valid[j][w]) begin
            rl_way[side] = w; rl_cw[side] = m_cw[j][w];
          end
          if (mt) begin
            if (side == 0) cand_up = {1'b1, 1'b1, 2'(w)};
            else           cand_down = {1'b1, 1'b0, 2'(w)};
          end
          if (mt && !(m_sti[j][w][3] && !inv)) begin
            m_sti[j][w] = {1'b1, back, 2'(victim)};
            n_backlink++;
          end else if (inv) begin
            m_sti[j][w] = 0;
          end
        end
      end
      m_valid[i][victim] = 1;
      m_cw[i][victim]    = enc(t);
      m_sti[i][victim]   = cand_up[3] ? cand_up : cand_down;
      m_good[i][victim]  = enc(t);
      // re-link a line whose twin was the victim with a twin two sets away
      for (int side = 0; side < 2; side++) begin
        int j, j2, w2;
        if (rl_way[side] < 0) continue;
        j  = (side == 0) ? i - 1 : i + 1;
        j2 = (side == 0) ? i - 2 : i + 2;
        w2 = -1;
        if (j2 >= 0 && j2 < NS)
          for (int w = 3; w >= 0; w--)
            if (m_valid[j2][w] && m_cw[j2][w] == rl_cw[side]) w2 = w;
        if (w2 >= 0) begin
          m_sti[j][rl_way[side]] = {1'b1, (side == 0) ? 1'b1 : 1'b0, 2'(w2)};
          if (!m_sti[j2][w2][3]) m_sti[j2][w2] = {1'b1, (side == 0) ? 1'b0 : 1'b1, 2'(rl_way[side])};
          n_relink++;
        end else begin
          m_sti[j][rl_way[side]] = 0;
        end
      end
      if (cand_up[3]) n_sti_up++;
      else if (cand_down[3]) n_sti_down++;
      if (allv) m_rr = (m_rr + 1) % 4;
      e.way = 2'(victim);
      e.latency += 3;
    end
    return e;
  endfunction

  task automatic compare_array(string when);
    int bad;
    bad = 0;
    for (int i = 0; i < NS; i++)
      for (int w = 0; w < 4; w++) begin
        if (dut.u_tags.mem[i][w].valid != m_valid[i][w]) bad++;
        if (m_valid[i][w] && {dut.u_tags.mem[i][w].par, dut.u_tags.mem[i][w].tag} != m_cw[i][w]) bad++;
        if (dut.u_tags.mem[i][w].sti != m_sti[i][w]) bad++;
        if (bad == 1 && failures < 20)
          $display("array set %0d way %0d: dut v=%b cw=%b sti=%b model v=%b cw=%b sti=%b", i, w,
                   dut.u_tags.mem[i][w].valid, {dut.u_tags.mem[i][w].par, dut.u_tags.mem[i][w].tag},
                   dut.u_tags.mem[i][w].sti, m_valid[i][w], m_cw[i][w], m_sti[i][w]);
      end
    chk({"array matches model ", when}, bad == 0);
    // every pointer between two intact valid lines joins equal tags
    bad = 0;
    for (int i = 0; i < NS; i++)
      for (int w = 0; w < 4; w++)
        if (m_valid[i][w] && m_sti[i][w][3] && !(^m_cw[i][w])) begin
          int j, tw;
          j  = m_sti[i][w][2] ? i - 1 : i + 1;
          tw = int'(m_sti[i][w][1:0]);
          if (j < 0 || j >= NS) bad++;
          else if (m_valid[j][tw] && !(^m_cw[j][tw]) && m_cw[j][tw] != m_cw[i][w]) bad++;
        end
    chk({"STI pointers consistent ", when}, bad == 0);
  endtask

  task automatic request(logic [7:0] t, int i);
    exp_t e;
    int lat;
    e = model_access(t, i);
    @(negedge clk);
    while (!req_ready) @(negedge clk);    // re-linking after a miss
    req_valid = 1; req_addr = {t, 3'(i)};
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    chk("response", resp_valid);
    if (resp_valid) begin
      chk($sformatf("hit %b exp %b (tag %h set %0d)", resp_hit, e.hit, t, i), resp_hit == e.hit);
      chk($sformatf("way %0d exp %0d", resp_way, e.way), resp_way == e.way);
      chk($sformatf("tag %h exp %h", resp_tag, e.tag), resp_tag == e.tag);
      chk("distance 0 on hit", !resp_hit || resp_distance == 0);
      chk($sformatf("corrected %b exp %b", resp_corrected, e.corrected), resp_corrected == e.corrected);
      chk($sformatf("due %b exp %b", resp_due, e.due), resp_due == e.due);
      chk("evict", evict_valid == (!e.hit && e.evict));
      chk("evict tag", e.hit || !e.evict || evict_tag == e.evict_tag);
      chk($sformatf("latency %0d exp %0d", lat, e.latency), lat == e.latency);
    end
    @(posedge clk); #1;
    while (!req_ready) begin @(posedge clk); #1; end   // re-linking done
    compare_array($sformatf("after tag %h set %0d", t, i));
  endtask

  // Single-bit upsets only: an entry that still holds an unrepaired flip is
  // left alone, since a second flip would restore its parity and no parity
  // scheme can see that.
  task automatic inject(int i, int w, logic [8:0] mask);
    if (^m_cw[i][w]) return;
    @(negedge clk);
    inj_en = 1; inj_index = 3'(i); inj_way = 2'(w); inj_mask = mask;
    @(negedge clk);
    inj_en = 0;
    @(posedge clk); #1;
    m_cw[i][w] ^= mask;
    n_inject++;
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // (8,4)-code matcher, driven on every clock
  always @(negedge clk) begin
    int d;
    bwa_decision_e ed;
    d  = $countones(ecc_incoming ^ ecc_retrieved);
    ed = (d <= 1) ? DEC_MATCH : (d == 2) ? DEC_FAULT : DEC_MISMATCH;
    if (rst_n) begin
      chk("ecc decision", ecc_decision == ed);
      n_dec[int'(ecc_decision)]++;
    end
    ecc_incoming  = 8'($urandom);
    ecc_retrieved = ecc_incoming ^ (8'(1) << ($urandom % 8)) ^ (($urandom % 2 == 1) ? 8'(1) << ($urandom % 8) : 8'h00)
                    ^ (($urandom % 3 == 0) ? 8'($urandom) : 8'h00);
  end

  initial begin
    n_hit = 0; n_miss = 0; n_evict = 0; n_sti_up = 0; n_sti_down = 0; n_backlink = 0;
    n_inval = 0; n_repair = 0; n_relink = 0; n_due_nosti = 0; n_due_badsrc = 0; n_edge_top = 0;
    n_edge_bottom = 0; n_inject = 0; n_dec = '{0, 0, 0};
    for (int i = 0; i < NS; i++)
      for (int w = 0; w < 4; w++) begin m_valid[i][w] = 0; m_cw[i][w] = 0; m_sti[i][w] = 0; m_good[i][w] = 0; end
    m_rr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. linking example
    request(8'b0000_0001, 2);        // way 0
    request(8'b0001_0100, 2);        // way 1
    request(8'b0001_0101, 2);        // way 2
    request(8'b0000_0010, 3);        // way 0
    request(8'b0001_0101, 3);        // miss, fills way 1 of set 3
    chk("set 2 way 2 STI = 1001", dut.u_tags.mem[2][2].sti == 4'b1001);
    chk("set 3 way 1 STI = 1110", dut.u_tags.mem[3][1].sti == 4'b1110);
    chk("set 2 way 1 STI = 0000", dut.u_tags.mem[2][1].sti == 4'b0000);
    inject(3, 1, 9'b0_0000_0100);
    request(8'b0001_0101, 3);        // repaired from set 2 way 2, then hit
    chk("repaired tag", dut.u_tags.mem[3][1].tag == 8'b0001_0101);

    // ---- 2. random traffic with upsets
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] t;
      int i;
      t = 8'(8'h40 + $urandom % 7);
      i = $urandom % NS;
      if ($urandom % 4 == 0) begin
        int ii, ww;
        ii = $urandom % NS; ww = $urandom % 4;
        inject(ii, ww, 9'(1) << ($urandom % 9));
        // sometimes also hit the replica of that line
        if ($urandom % 4 == 0 && m_sti[ii][ww][3]) begin
          int j;
          j = m_sti[ii][ww][2] ? ii - 1 : ii + 1;
          if (j >= 0 && j < NS) inject(j, int'(m_sti[ii][ww][1:0]), 9'(1) << ($urandom % 9));
        end
        // request the upset line's set next, so the error is met
        i = ii;
      end
      request(t, i);
    end

    $display("hits=%0d misses=%0d evictions=%0d sti_upper=%0d sti_lower=%0d backlinks=%0d",
             n_hit, n_miss, n_evict, n_sti_up, n_sti_down, n_backlink);
    $display("relinks=%0d sti_invalidations=%0d repairs=%0d due_no_sti=%0d due_bad_replica=%0d",
             n_relink, n_inval, n_repair, n_due_nosti, n_due_badsrc);
    $display("misses_first_set=%0d misses_last_set=%0d injections=%0d ecc match/fault/mismatch=%0d/%0d/%0d",
             n_edge_top, n_edge_bottom, n_inject, n_dec[0], n_dec[1], n_dec[2]);
    chk("hit seen", n_hit > 0);
    chk("miss seen", n_miss > 0);
    chk("eviction seen", n_evict > 0);
    chk("upper STI seen", n_sti_up > 0);
    chk("lower STI seen", n_sti_down > 0);
    chk("back-link seen", n_backlink > 0);
    chk("STI invalidation seen", n_inval > 0);
    chk("repair seen", n_repair > 0);
    chk("re-link seen", n_relink > 0);
    chk("uncorrectable without STI seen", n_due_nosti > 0);
    chk("uncorrectable with bad replica seen", n_due_badsrc > 0);
    chk("first-set miss seen", n_edge_top > 0);
    chk("last-set miss seen", n_edge_bottom > 0);
    chk("ecc match seen", n_dec[0] > 0);
    chk("ecc fault seen", n_dec[1] > 0);
    chk("ecc mismatch seen", n_dec[2] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
