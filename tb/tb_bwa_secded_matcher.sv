// tb_bwa_secded_matcher: exhaustive check of the (8,4)-code matcher.
// All 65536 pairs of 8-bit words are applied. The expected decision comes
// from the Hamming distance counted here: 0 or 1 match, 2 fault, 3 or more
// mismatch. The second-level outputs are checked to add up to the distance
// (when Q, R and S are clear, 2T + 2U + V is the distance; any distance
// above 4 sets one of Q, R, S), and
// U and V must never be set together.
module tb_bwa_secded_matcher;
  import simtag_pkg::*;
  logic [7:0] a, b;
  logic q, r, s, t, u, v;
  bwa_decision_e dec;
  int checks = 0, failures = 0;

  bwa_secded_matcher dut (.incoming(a), .retrieved(b), .q, .r, .s, .t, .u, .v, .decision(dec));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int d;
      bwa_decision_e e;
      {a, b} = 16'(i); #1;
      d = $countones(a ^ b);
      e = (d <= 1) ? DEC_MATCH : (d == 2) ? DEC_FAULT : DEC_MISMATCH;
      checks++;
      if (dec != e) begin
        failures++;
        if (failures < 10) $display("a=%b b=%b d=%0d dec=%s", a, b, d, dec.name());
      end
      checks++;
      if (u && v) failures++;
      checks++;
      if (d < 4 && (q | r | s)) failures++;
      if (!(q | r | s) && (2 * t + 2 * u + v) != d) begin
        failures++;
        if (failures < 10) $display("a=%b b=%b d=%0d t=%b u=%b v=%b", a, b, d, t, u, v);
      end
      if (d > 4 && !(q | r | s)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
