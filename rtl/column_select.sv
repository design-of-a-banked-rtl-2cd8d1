// Column select outside the continuous data banks.
//
// Each of the four enabled data banks delivers a quarter line (four texels). The
// sixteen texels of the line are wired to four 4-to-1 multiplexers interleaved:
// input S of multiplexer k carries the texel t with {t[TILE_LOG2], t[0]} = k and
// the remaining bits = S, taken from data bank t[3:2], word t[1:0]. Each
// multiplexer's select comes from word select. The interleaved wiring is the
// thesis's; a bank that was not enabled may present any value. Purely
// combinational.
module column_select
  import tex_cache_pkg::*;
#(
  parameter int unsigned TILE_LOG2 = 1
) (
  input  texel_t           bank_row [4][BANK_TEXELS],  // quarter line from DB0..DB3
  input  logic [POS_W-1:0] col_sel [4],
  output texel_t           col_out [4]
);
  always_comb
    for (int k = 0; k < 4; k++) begin
      logic [TOFF_W-1:0] t;
      t = intl_texel(bank_id_t'(k), col_sel[k], TILE_LOG2);
      col_out[k] = bank_row[cont_bank_of(t)][t[1:0]];
    end
endmodule
