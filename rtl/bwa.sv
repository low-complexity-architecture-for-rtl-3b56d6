// bwa: butterfly-formed weight accumulator (BWA).
//
// Counts the ones among N input bits without carry-propagate adders. The
// accumulator is log2(N) stages of N/2 half adders. Stage s works on groups of
// 2**s bits; each group holds the outputs of two smaller accumulators side by
// side, and half adder j of the group adds output j of the left one to output
// j of the right one (both have the same weight w). Its carry (weight 2w) goes
// to position 2j and its sum (weight w) to 2j+1, so carries and sums of the
// stage above are accumulated separately, as in the butterfly of the
// reference structure. For N = 8 the output weights, out[0] to out[7], are
// 8,4,4,2,4,2,2,1; for N = 4 they are 4,2,2,1.
//
// The result is not a binary number: the count is the sum of the weights of
// the set output bits (simtag_pkg::bwa_weight gives the weight of bit j), and
// it is zero exactly when every output bit is zero. The circuit structure is
// the published one; N must be a power of two (pad unused inputs with 0).
// Purely combinational, depth log2(N) half adders.
module bwa #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] in,
  output logic [N-1:0] out
);
  localparam int unsigned K = $clog2(N);

  logic [K:0][N-1:0] stage;

  assign stage[0] = in;

  for (genvar s = 1; s <= K; s++) begin : g_stage
    localparam int unsigned G = 1 << s;      // group size
    localparam int unsigned H = G >> 1;      // half group
    for (genvar b = 0; b < N / G; b++) begin : g_group
      for (genvar j = 0; j < H; j++) begin : g_ha
        half_adder u_ha (
          .a    (stage[s-1][b*G + j]),
          .b    (stage[s-1][b*G + H + j]),
          .carry(stage[s][b*G + 2*j]),
          .sum  (stage[s][b*G + 2*j + 1])
        );
      end
    end
  end

  assign out = stage[K];

  initial begin
    assert (N >= 2 && (1 << K) == N)
      else $error("bwa: N must be a power of two, got %0d", N);
  end
endmodule
