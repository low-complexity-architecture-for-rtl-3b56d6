// tb_paper_workloads: the two published simulation runs of the tag unit.
// (a) Normal operation: processor address 10111011000 (tag 10111011, index
//     000). The first access misses and fills the line; the second hits with
//     the tag 10111011, encoded 101110110 with its parity bit, at distance 0.
// (b) Error correction: the same tag is first loaded into set 1, so the line
//     then filled into set 0 gets STI 1000 (lower set, way 0). A bit of the
//     stored tag in set 0 is flipped; the next access detects it by parity,
//     repairs it from set 1 and hits with the correct tag.
// Latencies are checked as well: hit 1 cycle, miss 4, repair 2 more.
module tb_paper_workloads;
  import simtag_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  logic [10:0] req_addr = 0;
  logic resp_valid, resp_hit, resp_corrected, resp_due, evict_valid;
  logic [1:0] resp_way;
  logic [7:0] resp_tag, evict_tag;
  logic [3:0] resp_distance;
  logic [3:0] ctrl_state;
  logic inj_en = 0;
  logic [2:0] inj_index = 0;
  logic [1:0] inj_way = 0;
  logic [8:0] inj_mask = 0;
  logic [7:0] ecc_incoming = 0, ecc_retrieved = 0;
  bwa_decision_e ecc_decision;
  logic [5:0] ecc_qrstuv;
  int checks = 0, failures = 0;

  bwa_simtag dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(logic [10:0] a, output int lat);
    @(negedge clk);
    req_valid = 1; req_addr = a;
    @(negedge clk);
    req_valid = 0; lat = 1;
    while (!resp_valid && lat < 20) begin @(negedge clk); lat++; end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // (a) normal operation
    access(11'b10111011_000, lat);
    chk("a: first access misses", resp_valid && !resp_hit && lat == 4);
    access(11'b10111011_000, lat);
    chk("a: second access hits", resp_valid && resp_hit && lat == 1);
    chk("a: tag out 10111011", resp_tag == 8'b10111011);
    chk("a: encoded tag 101110110",
        {dut.u_tags.mem[0][resp_way].tag, dut.u_tags.mem[0][resp_way].par} == 9'b101110110);
    chk("a: distance 000", resp_distance == 0);
    chk("a: no correction", !resp_corrected && !resp_due);

    // (b) error correction
    rst_n = 0; @(negedge clk); rst_n = 1;
    access(11'b10111011_001, lat);      // set 1, way 0
    access(11'b10111011_000, lat);      // set 0, way 0, replica below
    @(posedge clk); #1;                 // the fill is written at this edge
    chk("b: STI 1000 in set 0", dut.u_tags.mem[0][0].sti == 4'b1000);
    chk("b: STI 1100 in set 1", dut.u_tags.mem[1][0].sti == 4'b1100);
    @(negedge clk);
    inj_en = 1; inj_index = 3'd0; inj_way = 2'd0; inj_mask = 9'b0_1000_0000;
    @(negedge clk);
    inj_en = 0;
    chk("b: tag corrupted", dut.u_tags.mem[0][0].tag == 8'b00111011);
    access(11'b10111011_000, lat);
    chk("b: hit after repair", resp_valid && resp_hit && resp_corrected && !resp_due);
    chk("b: corrected tag out", resp_tag == 8'b10111011);
    chk("b: repair latency", lat == 3 + 1);
    @(negedge clk);
    chk("b: array repaired", dut.u_tags.mem[0][0].tag == 8'b10111011 && dut.u_tags.mem[0][0].par == 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
