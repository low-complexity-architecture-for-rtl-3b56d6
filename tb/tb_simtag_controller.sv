// tb_simtag_controller: directed sequences against the main controller with
// the datapath status driven here: a hit, a miss with STI linking and STI
// invalidation in the upper and lower sets, re-linking of a line whose twin
// was replaced, the victim choice (round robin
// over a full set, first free way otherwise), a tag recovery from a replica
// and an uncorrectable error. Outputs are checked in every state and the
// latencies (hit 1 cycle, miss 4, recovery 2 more) are counted.
module tb_simtag_controller;
  import simtag_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, addr_load, resp_valid, resp_hit, resp_corrected, resp_due, evict_valid;
  logic [1:0] resp_way, victim_way, corr_way;
  logic [3:0] row_valid, hit_vec, err_vec, enc_match, inval, line_we, sti_we;
  sti_t [3:0] row_sti, sti_wdata;
  sti_t       enc_sti;
  logic src_ok, shift_en, shift_far, rl_cap_up, rl_cap_down, shift_dir, back_loc, fix_load, line_wvalid, line_src_fix;
  logic [3:0] state_o;
  logic [1:0] enc_src, rl_sel_way;
  int checks = 0, failures = 0;

  simtag_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  task automatic idle_inputs();
    row_valid = 0; row_sti = '0; hit_vec = 0; err_vec = 0; enc_match = 0;
    enc_sti = 0; inval = 0; src_ok = 0;
  endtask

  task automatic accept();
    @(negedge clk);
    req_valid = 1; #1;
    chk("ready in idle", req_ready && addr_load);
    @(negedge clk);
    req_valid = 0;
  endtask

  initial begin
    req_valid = 0; idle_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- hit: response in the first cycle after acceptance
    accept();
    row_valid = 4'b1111; hit_vec = 4'b0010; #1;
    chk("hit response", resp_valid && resp_hit && resp_way == 1 && !resp_corrected && !resp_due);
    chk("no write on hit", line_we == 0 && sti_we == 0 && !shift_en);
    @(negedge clk); idle_inputs(); #1;
    chk("back to idle", req_ready);

    // ---- miss on a full set: victim way 0 (round robin start), evicts
    accept();
    row_valid = 4'b1111; hit_vec = 0; #1;
    chk("miss: no response yet", !resp_valid);
    @(negedge clk);
    // MISS_UP: way 2 holds the new tag with a free STI, way 0 points at the victim
    row_sti = '0; row_sti[0] = 4'b1000; enc_match = 4'b0100; inval = 4'b0001;
    enc_sti = 4'b1110; #1;
    chk("up: shift", shift_en && shift_dir == SET_UPPER && back_loc == SET_LOWER);
    chk("up: victim", victim_way == 0 && dut.victim_valid_q);
    chk("up: link and clear", sti_we == 4'b0101 && sti_wdata[2] == 4'b1000 && sti_wdata[0] == 4'b0000);
    chk("up: capture tag of cleared line", rl_cap_up && rl_sel_way == 0 && enc_src == 0);
    @(negedge clk);
    // MISS_DOWN: way 1 matches but its STI is in use; nothing written
    row_sti = '0; row_sti[1] = 4'b1111; enc_match = 4'b0010; inval = 0; enc_sti = 4'b1001; #1;
    chk("down: shift", shift_en && shift_dir == SET_LOWER && back_loc == SET_UPPER);
    chk("down: used STI kept", sti_we == 0);
    @(negedge clk); idle_inputs(); #1;
    chk("fill: response", resp_valid && !resp_hit && resp_way == 0 && evict_valid);
    chk("fill: write line", line_we == 4'b0001 && line_wvalid && !line_src_fix);
    chk("fill: upper STI wins", sti_we == 4'b0001 && sti_wdata[0] == 4'b1110);
    // re-link of upper-set way 0: its twin is found in way 1 two sets up
    @(negedge clk); enc_match = 4'b0010; row_sti = '0; enc_sti = 4'b1101; #1;
    chk("rl search: far shift up", shift_en && shift_far && shift_dir == SET_UPPER && enc_src == 1 && !req_ready);
    chk("rl search: back pointer", sti_we == 4'b0010 && sti_wdata[1] == 4'b1000);
    @(negedge clk); idle_inputs(); #1;
    chk("rl write: one set up", shift_en && !shift_far && shift_dir == SET_UPPER);
    chk("rl write: new STI", sti_we == 4'b0001 && sti_wdata[0] == 4'b1101);
    @(negedge clk); #1;
    chk("idle after re-link", req_ready);

    // ---- miss with a free way 2: no eviction, lower STI only
    accept();
    row_valid = 4'b1011; #1;
    @(negedge clk); idle_inputs(); enc_sti = 0; #1;       // MISS_UP, nothing
    chk("up2: victim way 2 not valid", victim_way == 2 && !dut.victim_valid_q && sti_we == 0);
    // MISS_DOWN: way 3 pointed at the victim slot and holds the new tag:
    // it is re-pointed at the new line, so no re-link is needed
    @(negedge clk); enc_sti = 4'b1011; enc_match = 4'b1000; row_sti = '0;
    row_sti[3] = 4'b1110; inval = 4'b1000; row_valid = 4'b1111; #1;
    chk("down2: link", sti_we == 4'b1000 && sti_wdata[3] == 4'b1110);
    chk("down2: no re-link", !rl_cap_down);
    @(negedge clk); idle_inputs(); #1;
    chk("fill2", resp_valid && !resp_hit && resp_way == 2 && !evict_valid && sti_wdata[2] == 4'b1011);
    @(negedge clk);
    #1; chk("idle after fill2", req_ready);

    // ---- next full-set miss takes way 1 (round robin advanced once)
    accept();
    row_valid = 4'b1111; #1;
    @(negedge clk); idle_inputs(); #1;
    chk("round robin victim 1", victim_way == 1 && dut.victim_valid_q);
    @(negedge clk); @(negedge clk); #1;
    chk("fill3", resp_valid && resp_way == 1);
    @(negedge clk);

    // ---- tag error with a replica in the upper set, way 1
    accept();
    row_valid = 4'b1111; err_vec = 4'b0100; row_sti = '0; row_sti[2] = 4'b1101; #1;
    chk("error: no response", !resp_valid && line_we == 0);
    @(negedge clk); idle_inputs(); src_ok = 1; #1;
    chk("rec read", shift_en && shift_dir == SET_UPPER && corr_way == 1 && fix_load);
    @(negedge clk); idle_inputs(); #1;
    chk("rec write", line_we == 4'b0100 && line_wvalid && line_src_fix && !shift_en);
    @(negedge clk); row_valid = 4'b1111; hit_vec = 4'b0100; #1;
    chk("corrected hit", resp_valid && resp_hit && resp_way == 2 && resp_corrected && !resp_due);
    @(negedge clk); idle_inputs();

    // ---- tag error with a replica that is itself bad
    accept();
    row_valid = 4'b0001; err_vec = 4'b0001; row_sti[0] = 4'b1010; #1;
    @(negedge clk); idle_inputs(); src_ok = 0; #1;
    chk("rec read 2", shift_en && shift_dir == SET_LOWER && corr_way == 2);
    @(negedge clk); idle_inputs(); #1;
    chk("bad replica: invalidate", line_we == 4'b0001 && !line_wvalid && sti_we == 4'b0001 && sti_wdata[0] == 0);
    @(negedge clk); row_valid = 0; #1;
    chk("bad replica: due", resp_due && !resp_corrected && !resp_valid);
    @(negedge clk); @(negedge clk); @(negedge clk); #1;
    chk("due reported with miss", resp_valid && resp_due);
    @(negedge clk);

    // ---- tag error with no STI: invalidate at once
    accept();
    row_valid = 4'b0010; err_vec = 4'b0010; #1;
    chk("no sti: invalidate", line_we == 4'b0010 && !line_wvalid && !resp_valid);
    @(negedge clk); row_valid = 0; err_vec = 0; #1;
    chk("no sti: due, lookup again", resp_due && dut.state == 4'd1);
    @(negedge clk); idle_inputs(); @(negedge clk); @(negedge clk); #1;
    chk("due then miss fill", resp_valid && resp_due);
    @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
