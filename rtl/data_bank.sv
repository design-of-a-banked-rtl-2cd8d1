// One data bank: a quarter of every cache line, single access port.
//
// A bank has as many rows as the cache has lines (set * WAYS + way) and each
// row holds a quarter line, BANK_TEXELS texels. The continuous design reads a
// whole row (OUT_TEXELS = 4); the interleaved design reads one texel, chosen by
// rd_pos (OUT_TEXELS = 1). Reads are combinational so a hit completes in one
// cycle; a refill writes a whole row at the clock edge. The bank geometry is
// the thesis's; the port timing is this design's choice. rd_en only gates
// the output (to zero) and marks an access.
module data_bank
  import tex_cache_pkg::*;
#(
  parameter int unsigned ROWS       = LINES,
  parameter int unsigned OUT_TEXELS = 1
) (
  input  logic                    clk,
  input  logic                    rd_en,
  input  logic [$clog2(ROWS)-1:0] rd_row,
  input  logic [POS_W-1:0]        rd_pos,
  output texel_t                  rd_data [OUT_TEXELS],
  input  logic                    wr_en,
  input  logic [$clog2(ROWS)-1:0] wr_row,
  input  texel_t                  wr_data [BANK_TEXELS]
);
  texel_t mem [ROWS][BANK_TEXELS];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_row] <= wr_data;

  always_comb
    for (int k = 0; k < OUT_TEXELS; k++) begin
      if (!rd_en)                rd_data[k] = '0;
      else if (OUT_TEXELS == 1)  rd_data[k] = mem[rd_row][rd_pos];
      else                       rd_data[k] = mem[rd_row][k];
    end
endmodule
