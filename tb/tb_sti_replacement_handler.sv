// tb_sti_replacement_handler: random STI contents of an adjacent set, with
// pointers to the victim planted at random. A way must be flagged exactly
// when its STI is valid, points back in direction back_loc and names the
// victim way.
module tb_sti_replacement_handler;
  import simtag_pkg::*;
  sti_t [3:0] sti;
  logic       back;
  logic [1:0] vw;
  logic [3:0] inval;
  int checks = 0, failures = 0, hits = 0;

  sti_replacement_handler dut (.adj_sti(sti), .victim_way(vw),
                               .back_loc(back), .inval);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [3:0] e;
      vw   = 2'($urandom);
      back = 1'($urandom);
      for (int w = 0; w < 4; w++) begin
        sti[w] = 4'($urandom);
        if ($urandom % 3 == 0) sti[w] = {1'b1, back, vw};
        e[w] = sti[w][3] && sti[w][2] == back && sti[w][1:0] == vw;
      end
      #1;
      checks++;
      if (inval != e) begin failures++; $display("inval=%b exp=%b", inval, e); end
      if (|e) hits++;
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
