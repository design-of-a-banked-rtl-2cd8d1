// Test of a data bank in both read widths: a quarter-line bank (continuous
// design) returns the four texels of the addressed row, a one-texel bank
// (interleaved design) the texel at rd_pos. Rows are written with random data.
module tb_data_bank;
  import tex_cache_pkg::*;
  logic clk = 0;
  logic rd_en, wr_en;
  logic [7:0] rd_row, wr_row;
  logic [1:0] rd_pos;
  texel_t wr_data [BANK_TEXELS];
  texel_t out_row [4];
  texel_t out_one [1];
  texel_t ref_mem [256][4];
  logic   written [256];
  int checks = 0, failures = 0;

  data_bank #(.ROWS(256), .OUT_TEXELS(4)) dut_row (
    .clk, .rd_en, .rd_row, .rd_pos, .rd_data(out_row), .wr_en, .wr_row, .wr_data);
  data_bank #(.ROWS(256), .OUT_TEXELS(1)) dut_one (
    .clk, .rd_en, .rd_row, .rd_pos, .rd_data(out_one), .wr_en, .wr_row, .wr_data);

  always #5 clk = ~clk;

  initial begin
    rd_en = 1; wr_en = 0; rd_row = 0; wr_row = 0; rd_pos = 0;
    for (int r = 0; r < 256; r++) written[r] = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      wr_en = 1;
      wr_row = 8'($urandom);
      for (int p = 0; p < 4; p++) begin
        wr_data[p] = $urandom;
        ref_mem[wr_row][p] = wr_data[p];
      end
      written[wr_row] = 1;
    end
    @(negedge clk);
    wr_en = 0;
    for (int r = 0; r < 256; r++) begin
      if (!written[r]) continue;
      rd_row = 8'(r);
      for (int p = 0; p < 4; p++) begin
        rd_pos = 2'(p);
        #1;
        checks += 2;
        if (out_one[0] !== ref_mem[r][p]) begin failures++; $display("FAIL one row %0d pos %0d", r, p); end
        if (out_row[p] !== ref_mem[r][p]) begin failures++; $display("FAIL row %0d word %0d", r, p); end
      end
    end
    rd_en = 0;
    #1;
    checks++;
    if (out_one[0] !== '0 || out_row[0] !== '0) begin failures++; $display("FAIL disabled read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
