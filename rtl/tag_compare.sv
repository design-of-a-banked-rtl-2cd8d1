// Tag comparison behind the banked tag.
//
// Because the tag of a request can come from any of the four tag banks, a
// multiplexer in front of each request's comparator picks the entries of the
// request's own tag bank (select = the tag bank id of its address), as the
// thesis describes. Both ways of that set are compared with the request tag;
// the result is a hit flag and the way that hit. Purely combinational.
module tag_compare
  import tex_cache_pkg::*;
(
  input  addr_t      addr [4],             // texel addresses from AT0..AT3
  input  tag_entry_t tb_rd [4][WAYS],      // entries read from TB0..TB3
  output logic [3:0] hit,
  output logic [WAY_W-1:0] way [4]
);
  always_comb
    for (int i = 0; i < 4; i++) begin
      hit[i] = 1'b0;
      way[i] = '0;
      for (int w = 0; w < WAYS; w++)
        if (tb_rd[tag_bank_of(addr[i])][w].valid &&
            tb_rd[tag_bank_of(addr[i])][w].tag == tag_of(addr[i])) begin
          hit[i] = 1'b1;
          way[i] = WAY_W'(w);
        end
    end
endmodule
