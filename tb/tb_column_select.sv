// Test of the outside-bank column select. Every bank row holds texels whose
// value is their own texel number within the line, so an output names the
// texel it took. For recursive-Z (2x2 tile) multiplexer k, input S must carry
// texel 4*S + k; for a 4x4 tile it must carry texel {S1, k1, S0, k0}.
module tb_column_select;
  import tex_cache_pkg::*;
  texel_t     bank_row [4][BANK_TEXELS];
  logic [1:0] col_sel [4];
  texel_t     out_a [4], out_b [4];
  int checks = 0, failures = 0;

  column_select #(.TILE_LOG2(1)) dut_rz (.bank_row(bank_row), .col_sel(col_sel), .col_out(out_a));
  column_select #(.TILE_LOG2(2)) dut_4x4 (.bank_row(bank_row), .col_sel(col_sel), .col_out(out_b));

  initial begin
    for (int j = 0; j < 4; j++)
      for (int w = 0; w < 4; w++) bank_row[j][w] = 32'(4 * j + w) | 32'hC0DE_0000;
    for (int n = 0; n < 256; n++) begin
      for (int k = 0; k < 4; k++) col_sel[k] = 2'(n >> (2 * k));
      #1;
      for (int k = 0; k < 4; k++) begin
        int ea, eb;
        ea = 4 * col_sel[k] + k;
        eb = (col_sel[k][1] << 3) | ((k >> 1) << 2) | (col_sel[k][0] << 1) | (k & 1);
        checks += 2;
        if (out_a[k] !== (32'(ea) | 32'hC0DE_0000)) begin
          failures++;
          $display("FAIL rz mux %0d sel %0d got %h", k, col_sel[k], out_a[k]);
        end
        if (out_b[k] !== (32'(eb) | 32'hC0DE_0000)) begin
          failures++;
          $display("FAIL 4x4 mux %0d sel %0d got %h", k, col_sel[k], out_b[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
