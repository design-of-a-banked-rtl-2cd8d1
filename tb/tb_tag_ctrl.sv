// Random test of banked-tag control: tag bank j gets the tag index (address
// bits [12:8]) of the highest-numbered request whose tag-bank id (bits [7:6])
// is j, and is enabled exactly when one exists.
module tb_tag_ctrl;
  import tex_cache_pkg::*;
  addr_t      addr [4];
  logic [4:0] tb_index [4];
  logic [3:0] tb_en;
  int checks = 0, failures = 0;

  tag_ctrl dut (.addr, .tb_index, .tb_en);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++) addr[i] = $urandom;
      if (n % 4 == 0) for (int i = 1; i < 4; i++) addr[i][7:6] = addr[0][7:6];
      #1;
      for (int j = 0; j < 4; j++) begin
        automatic int who = -1;
        for (int i = 0; i < 4; i++) if (addr[i][7:6] == 2'(j)) who = i;
        checks++;
        if ((who < 0 && tb_en[j] !== 1'b0) ||
            (who >= 0 && (tb_en[j] !== 1'b1 || tb_index[j] !== addr[who][12:8]))) begin
          failures++;
          $display("FAIL tag bank %0d en=%0b idx=%0d expected request %0d", j, tb_en[j], tb_index[j], who);
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
