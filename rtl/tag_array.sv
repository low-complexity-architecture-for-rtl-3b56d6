// tag_array: tag array of the 4-way set-associative cache with SimTag fields.
//
// Every entry holds a valid bit, the tag, its even-parity bit (the error
// detection code) and the 4-bit STI pointer (simtag_pkg::sti_t). A set is
// selected by a one-hot row select from the set shifter; all ways of that row
// are read combinationally. With no row selected (a shifted-out select) the
// read returns all zeros and writes do nothing.
//
// Writes happen at the rising clock edge to the selected row:
//   line_we[w] writes valid, tag and parity of way w;
//   sti_we[w]  writes the STI of way w, independently of line_we.
// inj_en flips the bits of inj_mask ({parity, tag}) in one entry, modelling a
// transient upset of the SRAM cells; it is a test hook of this design.
// Reset clears every entry. Sizes follow the document's 4-way, 8-set, 8-bit
// tag configuration; the port structure is this design's own.
module tag_array
  import simtag_pkg::*;
#(
  parameter int unsigned TAG_W   = 8,
  parameter int unsigned INDEX_W = 3,
  localparam int unsigned NSETS  = 1 << INDEX_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NSETS-1:0]            row_sel,
  // read of the selected row
  output logic [WAYS-1:0]             rd_valid,
  output logic [WAYS-1:0][TAG_W-1:0]  rd_tag,
  output logic [WAYS-1:0]             rd_par,
  output sti_t [WAYS-1:0]             rd_sti,
  // line write (valid, tag, parity) to the selected row
  input  logic [WAYS-1:0]             line_we,
  input  logic                        wr_valid,
  input  logic [TAG_W-1:0]            wr_tag,
  input  logic                        wr_par,
  // STI write to the selected row
  input  logic [WAYS-1:0]             sti_we,
  input  sti_t [WAYS-1:0]             wr_sti,
  // transient error injection
  input  logic                        inj_en,
  input  logic [INDEX_W-1:0]          inj_index,
  input  logic [WAY_W-1:0]            inj_way,
  input  logic [TAG_W:0]              inj_mask
);
  typedef struct packed {
    logic             valid;
    logic             par;
    logic [TAG_W-1:0] tag;
    sti_t             sti;
  } entry_t;

  entry_t mem [NSETS][WAYS];

  always_comb begin
    rd_valid = '0;
    rd_tag   = '0;
    rd_par   = '0;
    rd_sti   = '0;
    for (int i = 0; i < NSETS; i++)
      if (row_sel[i])
        for (int w = 0; w < WAYS; w++) begin
          rd_valid[w] |= mem[i][w].valid;
          rd_tag[w]   |= mem[i][w].tag;
          rd_par[w]   |= mem[i][w].par;
          rd_sti[w]   |= mem[i][w].sti;
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSETS; i++)
        for (int w = 0; w < WAYS; w++)
          mem[i][w] <= '0;
    end else begin
      for (int i = 0; i < NSETS; i++)
        for (int w = 0; w < WAYS; w++) begin
          if (row_sel[i] && line_we[w]) begin
            mem[i][w].valid <= wr_valid;
            mem[i][w].tag   <= wr_tag;
            mem[i][w].par   <= wr_par;
          end else if (inj_en && 32'(inj_index) == i && 32'(inj_way) == w) begin
            {mem[i][w].par, mem[i][w].tag} <= {mem[i][w].par, mem[i][w].tag} ^ inj_mask;
          end
          if (row_sel[i] && sti_we[w])
            mem[i][w].sti <= wr_sti[w];
        end
    end
  end
endmodule
