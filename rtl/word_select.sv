// Word select of the continuous data-bank design.
//
// The continuous design reads a quarter line from every enabled bank and picks
// the requested texels with four column-select multiplexers outside the banks.
// The texels of a line are wired to those multiplexers interleaved: texel t
// goes to multiplexer MUX = {t[TILE_LOG2], t[0]} at input S = the other texel
// bits, so the four texels of any bilinear quad sit in four different
// multiplexers. Word select splits each request's line offset into MUX_i and
// S_i and builds the select of column-select k with a 4-to-1 multiplexer whose
// data inputs are S_0..S_3 and whose select is MUX_k; this works because the
// request-to-multiplexer mapping of a quad only swaps pairs. Follows the
// thesis; TILE_LOG2 is log2 of the placement tile edge (1 for recursive-Z).
// Purely combinational.
module word_select
  import tex_cache_pkg::*;
#(
  parameter int unsigned TILE_LOG2 = 1
) (
  input  logic [TOFF_W-1:0] toff [4],     // texel-in-line field of A_i
  output bank_id_t          mux_id [4],   // MUX_i: column select serving A_i
  output logic [POS_W-1:0]  col_sel [4]   // select of column select k
);
  logic [POS_W-1:0] s [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      mux_id[i] = intl_bank_of(toff[i], TILE_LOG2);
      s[i]      = intl_pos_of(toff[i], TILE_LOG2);
    end
    for (int k = 0; k < 4; k++) col_sel[k] = s[mux_id[k]];
  end
endmodule
