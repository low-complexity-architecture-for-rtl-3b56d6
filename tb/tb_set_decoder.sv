// tb_set_decoder: every index of the 3-bit decoder gives the one-hot select
// with exactly bit index set.
module tb_set_decoder;
  logic [2:0] idx;
  logic [7:0] sel;
  int checks = 0, failures = 0;

  set_decoder #(.INDEX_W(3)) dut (.index(idx), .row_sel(sel));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      idx = 3'(i); #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (sel[k] != (k == i)) begin failures++; $display("idx=%0d sel=%b", i, sel); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
