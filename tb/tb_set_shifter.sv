// tb_set_shifter: for each set of an 8-set cache, the unshifted select, the
// upper neighbour (index - 1), the lower neighbour (index + 1) and the sets
// two away (by2 shift) are checked; shifts past the first or last set select
// no row.
module tb_set_shifter;
  import simtag_pkg::*;
  logic [7:0] din, dout;
  logic en, s, by2;
  int checks = 0, failures = 0;

  set_shifter #(.NSETS(8)) dut (.dec_sel(din), .en, .s, .by2, .row_sel(dout));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_row(int i, int row);
    logic [7:0] e;
    e = (row >= 0 && row < 8) ? (8'(1) << row) : 8'h00;
    #1; checks++;
    if (dout != e) begin
      failures++; $display("i=%0d en=%b s=%b out=%b exp=%b", i, en, s, dout, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      din = 8'(1) << i;
      by2 = 0;
      en = 0; s = SET_UPPER; expect_row(i, i);
      en = 0; s = SET_LOWER; expect_row(i, i);
      en = 1; s = SET_UPPER; expect_row(i, i - 1);
      en = 1; s = SET_LOWER; expect_row(i, i + 1);
      by2 = 1;
      en = 0; s = SET_UPPER; expect_row(i, i);
      en = 1; s = SET_UPPER; expect_row(i, i - 2);
      en = 1; s = SET_LOWER; expect_row(i, i + 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
