// half_adder: the cell a butterfly-formed weight accumulator is built from.
// carry has twice the weight of sum. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic carry,
  output logic sum
);
  assign carry = a & b;
  assign sum   = a ^ b;
endmodule
