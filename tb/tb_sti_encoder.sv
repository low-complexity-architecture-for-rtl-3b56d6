// tb_sti_encoder: the published example (new tag found in way 2 of the upper
// set gives STI 1110) and random adjacent sets in which the new tag is placed
// in at most one way. The expected STI is 1,set_loc,way of the matching valid
// way, or 0000 when there is none.
module tb_sti_encoder;
  import simtag_pkg::*;
  logic [7:0]      ntag;
  logic            npar, loc;
  logic [3:0]      valid, par, match;
  logic [3:0][7:0] tag;
  sti_t            sti;
  int checks = 0, failures = 0, found = 0;

  sti_encoder #(.TAG_W(8)) dut (.new_tag(ntag), .new_par(npar), .adj_valid(valid),
                                .adj_tag(tag), .adj_par(par), .set_loc(loc),
                                .match, .sti);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(sti_t e, logic [3:0] em);
    #1;
    checks++;
    if (sti != e || match != em) begin
      failures++; $display("sti=%b exp=%b match=%b exp=%b", sti, e, match, em);
    end
  endtask

  initial begin
    // upper set holds 10101 in way 2 (5-bit example padded to 8 bits)
    ntag = 8'b0001_0101; npar = ^ntag; loc = SET_UPPER;
    valid = 4'b0110;
    tag[0] = 8'h00; tag[1] = 8'b0001_0100; tag[2] = 8'b0001_0101; tag[3] = 8'h00;
    for (int w = 0; w < 4; w++) par[w] = ^tag[w];
    check(4'b1110, 4'b0100);

    for (int n = 0; n < 3000; n++) begin
      int pos;
      sti_t e;
      ntag = 8'($urandom); npar = ^ntag; loc = 1'($urandom);
      for (int w = 0; w < 4; w++) begin
        valid[w] = ($urandom % 4) != 0;
        do tag[w] = 8'($urandom); while (tag[w] == ntag);
        par[w] = ^tag[w];
      end
      pos = $urandom % 6;                  // 4 or 5: no copy
      if (pos < 4) tag[pos] = ntag;
      if (pos < 4) par[pos] = ^ntag;
      e = STI_NONE;
      if (pos < 4 && valid[pos]) begin
        e = '{valid: 1'b1, set_loc: loc, way: 2'(pos)};
        found++;
      end
      check(e, (pos < 4 && valid[pos]) ? (4'(1) << pos) : 4'b0);
    end
    checks++;
    if (found == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
