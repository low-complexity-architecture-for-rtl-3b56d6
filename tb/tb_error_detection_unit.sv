// tb_error_detection_unit: random tags with correct even parity, with one or
// two flipped bits and with the valid bit cleared. An error must be flagged
// exactly for valid entries with an odd number of flipped bits.
module tb_error_detection_unit;
  import simtag_pkg::*;
  logic [3:0]      valid, par, err;
  logic [3:0][7:0] tag;
  int checks = 0, failures = 0;

  error_detection_unit #(.TAG_W(8)) dut (.valid, .tag, .par, .err);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [3:0] exp_err;
      for (int w = 0; w < 4; w++) begin
        int flips;
        logic [8:0] cw;
        valid[w] = ($urandom % 4) != 0;
        cw[7:0]  = 8'($urandom);
        cw[8]    = ^cw[7:0];
        flips    = $urandom % 3;
        for (int f = 0; f < flips; f++) cw ^= 9'(1) << ($urandom % 9);
        {par[w], tag[w]} = cw;
        exp_err[w] = valid[w] && ($countones(cw) % 2 == 1);
      end
      #1;
      checks++;
      if (err != exp_err) begin
        failures++; $display("valid=%b err=%b exp=%b", valid, err, exp_err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
