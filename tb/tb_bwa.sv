// tb_bwa: exhaustive check of the butterfly-formed weight accumulator.
// For N = 8 (the published example) and N = 16, every input vector is applied
// and the weighted sum of the outputs (weight of bit j = 2**(zero bits of j))
// is compared with the number of ones counted here. The weights of the 8-input
// outputs are also checked against the published list 8,4,4,2,4,2,2,1, and
// single-one and all-ones inputs against their expected output bits.
module tb_bwa;
  logic [7:0]  in8,  out8;
  logic [15:0] in16, out16;
  int checks = 0, failures = 0;

  bwa #(.N(8))  dut8  (.in(in8),  .out(out8));
  bwa #(.N(16)) dut16 (.in(in16), .out(out16));

  function automatic int wsum(logic [15:0] v, int n, int k);
    int s = 0;
    for (int j = 0; j < n; j++)
      if (v[j]) begin
        int z = 0;
        for (int b = 0; b < k; b++) if (((j >> b) & 1) == 0) z++;
        s += (1 << z);
      end
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int exp_w[8] = '{8, 4, 4, 2, 4, 2, 2, 1};
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (simtag_pkg::bwa_weight(j, 3) != exp_w[j]) begin
        failures++; $display("weight of out[%0d] = %0d", j, simtag_pkg::bwa_weight(j, 3));
      end
    end
    for (int i = 0; i < 256; i++) begin
      in8 = 8'(i); #1;
      checks++;
      if (wsum(16'(out8), 8, 3) != $countones(in8)) begin
        failures++; $display("N=8 in=%b out=%b", in8, out8);
      end
    end
    in8 = 8'hFF; #1; checks++;
    if (out8 != 8'b0000_0001) begin failures++; $display("all ones -> %b", out8); end
    in8 = 8'h00; #1; checks++;
    if (out8 != 8'h00) begin failures++; $display("zero -> %b", out8); end
    for (int i = 0; i < 65536; i++) begin
      in16 = 16'(i); #1;
      checks++;
      if (wsum(out16, 16, 4) != $countones(in16)) begin
        failures++;
        if (failures < 10) $display("N=16 in=%b out=%b", in16, out16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
