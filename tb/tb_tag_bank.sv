// Test of one tag bank: all entries invalid after reset, written entries read
// back with their tag in the right way, disabled reads return invalid entries.
module tb_tag_bank;
  import tex_cache_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rd_en, wr_en;
  logic [4:0] rd_index, wr_index;
  logic [WAY_W-1:0] wr_way;
  tag_t wr_tag;
  tag_entry_t rd_entry [WAYS];
  tag_t ref_tag [32][WAYS];
  logic ref_valid [32][WAYS];
  int checks = 0, failures = 0;

  tag_bank dut (.clk, .rst_n, .rd_en, .rd_index, .rd_entry, .wr_en, .wr_index, .wr_way, .wr_tag);

  always #5 clk = ~clk;

  task automatic check_all(logic en);
    rd_en = en;
    for (int d = 0; d < 32; d++) begin
      rd_index = 5'(d);
      #1;
      for (int w = 0; w < WAYS; w++) begin
        checks++;
        if (rd_entry[w].valid !== (en & ref_valid[d][w]) ||
            (en && ref_valid[d][w] && rd_entry[w].tag !== ref_tag[d][w])) begin
          failures++;
          $display("FAIL set %0d way %0d valid=%0b tag=%h", d, w, rd_entry[w].valid, rd_entry[w].tag);
        end
      end
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 1; rd_index = 0; wr_index = 0; wr_way = 0; wr_tag = 0;
    for (int d = 0; d < 32; d++) for (int w = 0; w < WAYS; w++) ref_valid[d][w] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all(1);
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      wr_en = 1;
      wr_index = 5'($urandom);
      wr_way = WAY_W'($urandom);
      wr_tag = 19'($urandom);
      ref_valid[wr_index][wr_way] = 1;
      ref_tag[wr_index][wr_way] = wr_tag;
      @(negedge clk);
      wr_en = 0;
    end
    check_all(1);
    check_all(0);
    rst_n = 0;
    #1;
    for (int d = 0; d < 32; d++) for (int w = 0; w < WAYS; w++) ref_valid[d][w] = 0;
    check_all(1);
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
