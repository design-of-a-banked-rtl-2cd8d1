// Address control of the interleaved data-bank design.
//
// In a bilinear quad requested in the order AT0 = (u,v), AT1 = (u+1,v),
// AT2 = (u,v+1), AT3 = (u+1,v+1), the four texels always lie in four different
// banks, and the request-to-bank mapping only ever swaps pairs: if AT_i goes to
// DB_j then AT_j goes to DB_i. So bank j can be fed by a 4-to-1 multiplexer
// whose select is the bank id of AT_j's own address, which is the thesis's
// circuit. The cache puts the bank outputs back into request order. Purely
// combinational.
module addr_ctrl_intl
  import tex_cache_pkg::*;
#(
  parameter int unsigned W = ADDR_W
) (
  input  bank_id_t     bank_id [4],    // data bank id of A_i
  input  logic [W-1:0] addr_in [4],    // A_i (with payload)
  output logic [W-1:0] bank_addr [4]   // address sent to DB_j
);
  always_comb
    for (int j = 0; j < 4; j++) bank_addr[j] = addr_in[bank_id[j]];
endmodule
