// tb_error_corrector: random adjacent-set contents; the selected replica
// must be the way named by the way location, and it is usable only when
// valid with correct parity.
module tb_error_corrector;
  import simtag_pkg::*;
  logic [3:0]      valid, par;
  logic [3:0][7:0] tag;
  logic [1:0]      way;
  logic [7:0]      ftag;
  logic            fpar, ok;
  int checks = 0, failures = 0;

  error_corrector #(.TAG_W(8)) dut (.adj_valid(valid), .adj_tag(tag), .adj_par(par),
                                    .way_loc(way), .fix_tag(ftag), .fix_par(fpar), .src_ok(ok));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int w = 0; w < 4; w++) begin
        valid[w] = ($urandom % 4) != 0;
        tag[w]   = 8'($urandom);
        par[w]   = (^tag[w]) ^ (($urandom % 5) == 0);
      end
      way = 2'($urandom);
      #1;
      checks++;
      if (ftag != tag[way] || fpar != par[way] ||
          ok != (valid[way] && (par[way] == ^tag[way]))) begin
        failures++; $display("way=%0d tag=%h ftag=%h ok=%b", way, tag[way], ftag, ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
