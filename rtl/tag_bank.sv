// One tag bank: a quarter of the tag array with a single access port.
//
// Holds the valid bit and tag of both ways for SETS/4 sets. The read is
// combinational from the index given by tag control, so that tag lookup,
// compare and data read fit in one cycle as the thesis's timing assumes.
// The write port is used only by a line refill and writes one way of one set
// at the clock edge. Reset clears the valid bits; tags are left as they are.
// The read/write split and the reset are this design's choices.
module tag_bank
  import tex_cache_pkg::*;
#(
  parameter int unsigned DEPTH = SETS / NBANKS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_index,
  output tag_entry_t               rd_entry [WAYS],
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_index,
  input  logic [WAY_W-1:0]         wr_way,
  input  tag_t                     wr_tag
);
  tag_t tags  [DEPTH][WAYS];
  logic [WAYS-1:0] valid [DEPTH];

  always_ff @(posedge clk)
    if (wr_en) tags[wr_index][wr_way] <= wr_tag;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int d = 0; d < DEPTH; d++) valid[d] <= '0;
    end else if (wr_en) begin
      valid[wr_index][wr_way] <= 1'b1;
    end

  // A bank that is not enabled returns invalid entries.
  always_comb
    for (int w = 0; w < WAYS; w++) begin
      rd_entry[w].valid = rd_en & valid[rd_index][w];
      rd_entry[w].tag   = tags[rd_index][w];
    end
endmodule
