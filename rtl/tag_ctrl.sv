// Tag control of the banked tag.
//
// The tags of the set index are spread over four single-port tag banks by the
// two low bits of the set index (set 0 in TB0, set 1 in TB1, ...). For each tag
// bank j, the tag-bank ids TB_i of the four requests are compared with j, a
// priority encoder (request 3 first) turns the results into a select and an
// enable, and the select picks the tag index TI_i sent to bank j. This follows
// the thesis. Requests that share a tag bank must share the tag index; with
// recursive-Z placement and 64-byte lines a bilinear quad always does, and the
// cache checks it. Purely combinational.
module tag_ctrl
  import tex_cache_pkg::*;
(
  input  addr_t                 addr [4],      // texel addresses from AT0..AT3
  output logic [TB_SET_W-1:0]   tb_index [4],  // index sent to TB_j
  output logic [3:0]            tb_en          // TB_j accessed
);
  bank_id_t            tb_id [4];
  logic [TB_SET_W-1:0] ti    [4];

  always_comb
    for (int i = 0; i < 4; i++) begin
      tb_id[i] = tag_bank_of(addr[i]);
      ti[i]    = tb_index_of(addr[i]);
    end

  for (genvar j = 0; j < 4; j++) begin : g_bank
    logic [3:0] match;
    logic [1:0] sel;
    always_comb
      for (int i = 0; i < 4; i++) match[i] = (tb_id[i] == 2'(j));

    priority_encoder u_pe (.x(match), .y(sel), .en(tb_en[j]));

    assign tb_index[j] = ti[sel];
  end
endmodule
