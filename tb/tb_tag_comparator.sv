// tb_tag_comparator: the BWA tag comparator on 9-bit code words (8-bit tag,
// parity). Random pairs, equal pairs and pairs differing in a chosen number
// of bits; match and distance are compared with values counted here.
module tb_tag_comparator;
  logic [8:0] a, b;
  logic       m;
  logic [3:0] d;
  int checks = 0, failures = 0;

  tag_comparator #(.W(9)) dut (.incoming(a), .stored(b), .match(m), .distance(d));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if (m != (a == b) || d != 4'($countones(a ^ b))) begin
      failures++;
      if (failures < 10) $display("a=%b b=%b match=%b dist=%0d", a, b, m, d);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a = 9'($urandom); b = 9'($urandom); check();
      b = a; check();
      b = a ^ (9'(1) << ($urandom % 9)); check();
      b = a ^ 9'($urandom) & 9'($urandom) & 9'($urandom); check();
    end
    a = '0; b = '1; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
