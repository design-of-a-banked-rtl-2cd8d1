// Four-input priority encoder with enable.
//
// Y is the number of the highest-numbered input that is set (X3 has the
// highest priority) and EN is 1 when any input is set. With no input set, Y is
// 00 (the thesis leaves Y open there). The truth table follows the
// thesis; the logic below is the minimal sum of products of that table.
// Purely combinational.
module priority_encoder (
  input  logic [3:0] x,
  output logic [1:0] y,
  output logic       en
);
  always_comb begin
    y[1] = x[3] | x[2];
    y[0] = x[3] | (~x[2] & x[1]);
    en   = |x;
  end
endmodule
