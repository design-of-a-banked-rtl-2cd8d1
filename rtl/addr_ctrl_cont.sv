// Address control of the continuous data-bank design.
//
// The four texel requests of a bilinear quad (from address translators AT0..AT3)
// may fall in one, two or four data banks. For each data bank j the module
// compares the bank id B_i of every request with j, feeds the four comparison
// results to a priority encoder (request 3 has the highest priority), and uses
// the encoder output to pick one request's address for bank j. The encoder's
// enable becomes the bank enable, so a bank nobody asks for is not accessed.
// This structure is the thesis's. The payload carried with the address is
// W bits wide; the cache passes the hit way along with the address. Requests
// that share a bank must address the same bank line, which the cache checks.
// Purely combinational.
module addr_ctrl_cont
  import tex_cache_pkg::*;
#(
  parameter int unsigned W = ADDR_W
) (
  input  bank_id_t         bank_id [4],   // B_i
  input  logic [W-1:0]     addr_in [4],   // A_i
  output logic [W-1:0]     bank_addr [4], // address sent to DB_j
  output logic [1:0]       bank_sel [4],  // which request DB_j serves
  output logic [3:0]       bank_en        // DB_j accessed
);
  for (genvar j = 0; j < 4; j++) begin : g_bank
    logic [3:0] match;
    always_comb
      for (int i = 0; i < 4; i++) match[i] = (bank_id[i] == 2'(j));

    priority_encoder u_pe (.x(match), .y(bank_sel[j]), .en(bank_en[j]));

    assign bank_addr[j] = addr_in[bank_sel[j]];
  end
endmodule
