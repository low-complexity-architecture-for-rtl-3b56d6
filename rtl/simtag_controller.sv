// simtag_controller: main controller of the SimTag tag unit.
//
// A request is accepted in IDLE (req_ready high) and looked up in the next
// cycle. Control flow:
//   LOOKUP     read the indexed set. If a valid way fails its parity check,
//              go to recovery when its STI is valid; otherwise the error is
//              detected but uncorrectable: the line is invalidated, due is
//              flagged and the lookup repeats. Else a matching way is a hit
//              (response now); no match is a miss: a victim way is chosen
//              (first invalid way, else round robin) and the fill starts.
//   REC_READ   set select shifted to the STI set location; the error
//              corrector's output is captured (fix_load).
//   REC_WRITE  the captured replica is written over the corrupted tag, or,
//              if the replica itself was unusable, the line is invalidated
//              and its STI cleared (due). Then LOOKUP again.
//   MISS_UP    set select shifted to the upper set (index - 1). STI pointers
//              there to the victim are cleared; the line there with the new
//              tag, if its STI is free, is pointed at the new line (lower
//              set, victim way); the encoder's STI is kept as candidate.
//   MISS_DOWN  the same for the lower set (index + 1).
//   FILL       the new line (valid, tag, parity) is written into the victim
//              way with the upper candidate STI, else the lower one, else
//              none. The miss response is given.
//   RL_*       re-link, only after a fill that cleared an STI in MISS_UP or
//              MISS_DOWN without re-pointing it at the new line. Such a line
//              L in set index-1 can only have another twin in set index-2
//              (its own set holds its tag once, and set index no longer does).
//              RL_UP_SEARCH shifts two sets up, compares L's tag (captured in
//              MISS_UP) with that set, points a matching line with a free STI
//              back at L and keeps the encoder's STI; RL_UP_WRITE writes that
//              STI into L. RL_DOWN_* do the same for index+1 / index+2.
// Latency from acceptance: hit 1 cycle, miss 4 cycles, plus 2 cycles per
// corrected tag. Re-linking adds 2 busy cycles per side after the miss
// response, during which req_ready stays low. The document gives the
// controller's duties (stall, drive the shifter, sequence upper/lower checks
// on a miss, recover on tag errors, invalidate and regenerate STIs on a
// replacement); the states, their order, the victim choice and the handling
// of uncorrectable errors are this design's.
module simtag_controller
  import simtag_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // processor side
  input  logic               req_valid,
  output logic               req_ready,
  output logic               addr_load,
  output logic               resp_valid,
  output logic               resp_hit,
  output logic [WAY_W-1:0]   resp_way,
  output logic               resp_corrected,  // a tag of this set was repaired
  output logic               resp_due,        // an uncorrectable tag error was met
  output logic               evict_valid,     // the fill replaced a valid line
  // status from the datapath (current row)
  input  logic [WAYS-1:0]    row_valid,
  input  sti_t [WAYS-1:0]    row_sti,
  input  logic [WAYS-1:0]    hit_vec,         // comparators
  input  logic [WAYS-1:0]    err_vec,         // error detection unit
  input  logic [WAYS-1:0]    enc_match,       // STI encoder
  input  sti_t               enc_sti,
  input  logic [WAYS-1:0]    inval,           // STI replacement handler
  input  logic               src_ok,          // error corrector
  // datapath control
  output logic               shift_en,
  output logic               shift_far,       // shift by two sets (re-link)
  output logic               shift_dir,       // SET_UPPER / SET_LOWER
  output logic [1:0]         enc_src,         // encoder tag: 0 request, 1 L up, 2 L down
  output logic               rl_cap_up,       // capture the tag of L in the upper set
  output logic               rl_cap_down,     // capture the tag of L in the lower set
  output logic [WAY_W-1:0]   rl_sel_way,      // way of L in the row being read
  output logic               back_loc,        // handler: pointer back to the set
  output logic [WAY_W-1:0]   victim_way,
  output logic [WAY_W-1:0]   corr_way,        // error corrector mux select
  output logic               fix_load,
  output logic [WAYS-1:0]    line_we,
  output logic               line_wvalid,
  output logic               line_src_fix,    // 1: write corrected tag, 0: new tag
  output logic [WAYS-1:0]    sti_we,
  output sti_t [WAYS-1:0]    sti_wdata,
  output logic [3:0]         state_o
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_REC_READ, S_REC_WRITE, S_MISS_UP, S_MISS_DOWN, S_FILL,
    S_RL_UP_SEARCH, S_RL_UP_WRITE, S_RL_DOWN_SEARCH, S_RL_DOWN_WRITE
  } state_e;

  state_e           state, state_n;
  logic [WAY_W-1:0] victim_q, victim_n;
  logic             victim_valid_q, victim_valid_n;
  logic [WAY_W-1:0] err_way_q, err_way_n;
  sti_t             err_sti_q, err_sti_n;
  logic             fix_ok_q;
  sti_t             up_sti_q, up_sti_n, down_sti_q, down_sti_n;
  logic [WAY_W-1:0] rr_q;
  logic             corrected_q, corrected_n, due_q, due_n;
  logic             rl_up_q, rl_up_n, rl_down_q, rl_down_n;       // re-link pending
  logic [WAY_W-1:0] rl_up_way_q, rl_up_way_n, rl_down_way_q, rl_down_way_n;
  sti_t             rl_sti_q, rl_sti_n;
  logic [WAYS-1:0]  relink_vec;

  assign state_o      = state;
  assign victim_way   = victim_q;
  assign corr_way     = err_sti_q.way;

  function automatic logic [WAY_W-1:0] first_set(logic [WAYS-1:0] v);
    first_set = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (v[w]) first_set = WAY_W'(w);
  endfunction

  // Set-shifter controls depend on registered state only, so they are kept
  // apart from the logic that reads the shifted row.
  always_comb begin
    shift_en  = 1'b0;
    shift_far = 1'b0;
    shift_dir = SET_UPPER;
    enc_src   = 2'd0;
    unique case (state)
      S_REC_READ:       begin shift_en = 1'b1; shift_dir = err_sti_q.set_loc; end
      S_MISS_UP:        begin shift_en = 1'b1; shift_dir = SET_UPPER; end
      S_MISS_DOWN:      begin shift_en = 1'b1; shift_dir = SET_LOWER; end
      S_RL_UP_SEARCH:   begin shift_en = 1'b1; shift_far = 1'b1; shift_dir = SET_UPPER; enc_src = 2'd1; end
      S_RL_UP_WRITE:    begin shift_en = 1'b1; shift_dir = SET_UPPER; end
      S_RL_DOWN_SEARCH: begin shift_en = 1'b1; shift_far = 1'b1; shift_dir = SET_LOWER; enc_src = 2'd2; end
      S_RL_DOWN_WRITE:  begin shift_en = 1'b1; shift_dir = SET_LOWER; end
      default:          ;
    endcase
    back_loc = ~shift_dir;   // pointer from the adjacent set back to this one
  end

  always_comb begin
    state_n        = state;
    victim_n       = victim_q;
    victim_valid_n = victim_valid_q;
    err_way_n      = err_way_q;
    err_sti_n      = err_sti_q;
    up_sti_n       = up_sti_q;
    down_sti_n     = down_sti_q;
    corrected_n    = corrected_q;
    due_n          = due_q;
    rl_up_n        = rl_up_q;
    rl_down_n      = rl_down_q;
    rl_up_way_n    = rl_up_way_q;
    rl_down_way_n  = rl_down_way_q;
    rl_sti_n       = rl_sti_q;
    rl_cap_up      = 1'b0;
    rl_cap_down    = 1'b0;
    relink_vec     = inval & ~enc_match & row_valid;
    rl_sel_way     = first_set(relink_vec);

    req_ready      = 1'b0;
    addr_load      = 1'b0;
    resp_valid     = 1'b0;
    resp_hit       = 1'b0;
    resp_way       = '0;
    resp_corrected = corrected_q;
    resp_due       = due_q;
    evict_valid    = 1'b0;
    fix_load       = 1'b0;
    line_we        = '0;
    line_wvalid    = 1'b0;
    line_src_fix   = 1'b0;
    sti_we         = '0;
    sti_wdata      = '0;

    unique case (state)
      S_IDLE: begin
        req_ready = 1'b1;
        if (req_valid) begin
          addr_load   = 1'b1;
          corrected_n = 1'b0;
          due_n       = 1'b0;
          state_n     = S_LOOKUP;
        end
      end

      S_LOOKUP: begin
        if (|err_vec) begin
          err_way_n = first_set(err_vec);
          if (row_sti[first_set(err_vec)].valid) begin
            err_sti_n = row_sti[first_set(err_vec)];
            state_n   = S_REC_READ;
          end else begin
            line_we[first_set(err_vec)] = 1'b1;   // invalidate, stay
            line_wvalid                 = 1'b0;
            due_n                       = 1'b1;
          end
        end else if (|hit_vec) begin
          resp_valid = 1'b1;
          resp_hit   = 1'b1;
          resp_way   = first_set(hit_vec);
          state_n    = S_IDLE;
        end else begin
          victim_n       = (&row_valid) ? rr_q : first_set(~row_valid);
          victim_valid_n = &row_valid;
          up_sti_n       = STI_NONE;
          down_sti_n     = STI_NONE;
          rl_up_n        = 1'b0;
          rl_down_n      = 1'b0;
          state_n        = S_MISS_UP;
        end
      end

      S_REC_READ: begin
        fix_load  = 1'b1;
        state_n   = S_REC_WRITE;
      end

      S_REC_WRITE: begin
        line_we[err_way_q] = 1'b1;
        line_wvalid        = fix_ok_q;
        line_src_fix       = 1'b1;
        if (fix_ok_q) begin
          corrected_n = 1'b1;
        end else begin
          due_n               = 1'b1;
          sti_we[err_way_q]   = 1'b1;      // an invalid line keeps no pointer
          sti_wdata[err_way_q] = STI_NONE;
        end
        state_n = S_LOOKUP;
      end

      S_MISS_UP, S_MISS_DOWN: begin
        for (int w = 0; w < WAYS; w++) begin
          if (enc_match[w] && !(row_sti[w].valid && !inval[w])) begin
            sti_we[w]            = 1'b1;
            sti_wdata[w].valid   = 1'b1;
            sti_wdata[w].set_loc = back_loc;
            sti_wdata[w].way     = victim_q;
          end else if (inval[w]) begin
            sti_we[w]    = 1'b1;
            sti_wdata[w] = STI_NONE;
          end
        end
        // a cleared pointer not re-pointed at the new line: re-link later
        if (state == S_MISS_UP) begin
          up_sti_n    = enc_sti;
          rl_up_n     = |relink_vec;
          rl_up_way_n = rl_sel_way;
          rl_cap_up   = |relink_vec;
          state_n     = S_MISS_DOWN;
        end else begin
          down_sti_n    = enc_sti;
          rl_down_n     = |relink_vec;
          rl_down_way_n = rl_sel_way;
          rl_cap_down   = |relink_vec;
          state_n       = S_FILL;
        end
      end

      S_FILL: begin
        line_we[victim_q]   = 1'b1;
        line_wvalid         = 1'b1;
        sti_we[victim_q]    = 1'b1;
        sti_wdata[victim_q] = up_sti_q.valid ? up_sti_q : down_sti_q;
        resp_valid          = 1'b1;
        resp_hit            = 1'b0;
        resp_way            = victim_q;
        evict_valid         = victim_valid_q;
        state_n             = rl_up_q   ? S_RL_UP_SEARCH :
                              rl_down_q ? S_RL_DOWN_SEARCH : S_IDLE;
      end

      S_RL_UP_SEARCH, S_RL_DOWN_SEARCH: begin
        // set index-2 (index+2): a twin of L with a free STI points back at L
        for (int w = 0; w < WAYS; w++)
          if (enc_match[w] && !row_sti[w].valid) begin
            sti_we[w]            = 1'b1;
            sti_wdata[w].valid   = 1'b1;
            sti_wdata[w].set_loc = back_loc;
            sti_wdata[w].way     = (state == S_RL_UP_SEARCH) ? rl_up_way_q : rl_down_way_q;
          end
        rl_sti_n = enc_sti;
        state_n  = (state == S_RL_UP_SEARCH) ? S_RL_UP_WRITE : S_RL_DOWN_WRITE;
      end

      S_RL_UP_WRITE: begin
        sti_we[rl_up_way_q]    = 1'b1;
        sti_wdata[rl_up_way_q] = rl_sti_q;
        rl_up_n                = 1'b0;
        state_n                = rl_down_q ? S_RL_DOWN_SEARCH : S_IDLE;
      end

      S_RL_DOWN_WRITE: begin
        sti_we[rl_down_way_q]    = 1'b1;
        sti_wdata[rl_down_way_q] = rl_sti_q;
        rl_down_n                = 1'b0;
        state_n                  = S_IDLE;
      end

      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      victim_q       <= '0;
      victim_valid_q <= 1'b0;
      err_way_q      <= '0;
      err_sti_q      <= STI_NONE;
      fix_ok_q       <= 1'b0;
      up_sti_q       <= STI_NONE;
      down_sti_q     <= STI_NONE;
      rr_q           <= '0;
      corrected_q    <= 1'b0;
      due_q          <= 1'b0;
      rl_up_q        <= 1'b0;
      rl_down_q      <= 1'b0;
      rl_up_way_q    <= '0;
      rl_down_way_q  <= '0;
      rl_sti_q       <= STI_NONE;
    end else begin
      state          <= state_n;
      victim_q       <= victim_n;
      victim_valid_q <= victim_valid_n;
      err_way_q      <= err_way_n;
      err_sti_q      <= err_sti_n;
      up_sti_q       <= up_sti_n;
      down_sti_q     <= down_sti_n;
      corrected_q    <= corrected_n;
      due_q          <= due_n;
      rl_up_q        <= rl_up_n;
      rl_down_q      <= rl_down_n;
      rl_up_way_q    <= rl_up_way_n;
      rl_down_way_q  <= rl_down_way_n;
      rl_sti_q       <= rl_sti_n;
      if (fix_load) fix_ok_q <= src_ok;
      if (state == S_FILL && victim_valid_q) rr_q <= rr_q + 1'b1;
    end
  end

  // A request is only accepted when idle, and only one response per request.
  property p_resp_not_idle;
    @(posedge clk) disable iff (!rst_n) resp_valid |-> state != S_IDLE;
  endproperty
  assert property (p_resp_not_idle);
endmodule
