// tb_tag_array: random line writes, STI writes, fault injections and row
// selects (including no row) against a model array kept here. Every cycle the
// combinational read of the selected row is compared with the model.
module tb_tag_array;
  import simtag_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0]      row_sel;
  logic [3:0]      rd_valid, rd_par, line_we, sti_we;
  logic [3:0][7:0] rd_tag;
  sti_t [3:0]      rd_sti, wr_sti;
  logic            wr_valid, wr_par, inj_en;
  logic [7:0]      wr_tag;
  logic [2:0]      inj_index;
  logic [1:0]      inj_way;
  logic [8:0]      inj_mask;
  int checks = 0, failures = 0;

  logic       m_valid [8][4];
  logic [8:0] m_cw    [8][4];
  sti_t       m_sti   [8][4];

  tag_array #(.TAG_W(8), .INDEX_W(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_sel = 0; line_we = 0; sti_we = 0; wr_sti = '0; wr_valid = 0; wr_par = 0;
    wr_tag = 0; inj_en = 0; inj_index = 0; inj_way = 0; inj_mask = 0;
    for (int i = 0; i < 8; i++)
      for (int w = 0; w < 4; w++) begin m_valid[i][w] = 0; m_cw[i][w] = 0; m_sti[i][w] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check read of the row selected in the previous cycle is up to date
      row_sel  = ($urandom % 9 == 8) ? 8'h00 : (8'(1) << ($urandom % 8));
      #1;
      for (int w = 0; w < 4; w++) begin
        logic ev, ep; logic [7:0] et; sti_t es;
        ev = 0; ep = 0; et = 0; es = 0;
        for (int i = 0; i < 8; i++)
          if (row_sel[i]) begin ev = m_valid[i][w]; {ep, et} = m_cw[i][w]; es = m_sti[i][w]; end
        checks++;
        if (rd_valid[w] != ev || rd_tag[w] != et || rd_par[w] != ep || rd_sti[w] != es) begin
          failures++;
          if (failures < 10) $display("row=%b way=%0d got %b %h %b %b exp %b %h %b %b", row_sel, w,
                                      rd_valid[w], rd_tag[w], rd_par[w], rd_sti[w], ev, et, ep, es);
        end
      end
      line_we  = 4'($urandom) & 4'($urandom);
      sti_we   = 4'($urandom) & 4'($urandom);
      wr_valid = 1'($urandom);
      wr_tag   = 8'($urandom);
      wr_par   = 1'($urandom);
      for (int w = 0; w < 4; w++) wr_sti[w] = 4'($urandom);
      inj_en    = ($urandom % 3) == 0;
      inj_index = 3'($urandom);
      inj_way   = 2'($urandom);
      inj_mask  = 9'(1) << ($urandom % 9);
      @(posedge clk);
      for (int i = 0; i < 8; i++)
        for (int w = 0; w < 4; w++) begin
          if (row_sel[i] && line_we[w]) begin
            m_valid[i][w] = wr_valid; m_cw[i][w] = {wr_par, wr_tag};
          end else if (inj_en && inj_index == 3'(i) && inj_way == 2'(w)) begin
            m_cw[i][w] ^= inj_mask;
          end
          if (row_sel[i] && sti_we[w]) m_sti[i][w] = wr_sti[w];
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
