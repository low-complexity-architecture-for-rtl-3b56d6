// set_decoder: the cache's row decoder. Turns a set index into a one-hot set
// select, bit i high for index i. A conventional part the document only
// names. Purely combinational.
module set_decoder #(
  parameter int unsigned INDEX_W = 3
) (
  input  logic [INDEX_W-1:0]      index,
  output logic [(1<<INDEX_W)-1:0] row_sel
);
  always_comb begin
    row_sel        = '0;
    row_sel[index] = 1'b1;
  end
endmodule
