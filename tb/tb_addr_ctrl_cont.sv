// Random test of the continuous-bank address control: each bank must receive
// the address of the highest-numbered request that maps to it, and be enabled
// exactly when some request does. Also checks the one/two/four-bank cases.
module tb_addr_ctrl_cont;
  import tex_cache_pkg::*;
  bank_id_t    bank_id [4];
  logic [31:0] addr_in [4];
  logic [31:0] bank_addr [4];
  logic [1:0]  bank_sel [4];
  logic [3:0]  bank_en;
  int checks = 0, failures = 0;
  int nbanks_seen [5];

  addr_ctrl_cont #(.W(32)) dut (.bank_id, .addr_in, .bank_addr, .bank_sel, .bank_en);

  initial begin
    for (int k = 0; k < 5; k++) nbanks_seen[k] = 0;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++) begin
        bank_id[i] = 2'($urandom_range(0, 3));
        addr_in[i] = $urandom;
      end
      if (n % 3 == 0) for (int i = 0; i < 4; i++) bank_id[i] = bank_id[0];
      #1;
      begin
        automatic int nb = 0;
        for (int j = 0; j < 4; j++) begin
          automatic int who = -1;
          for (int i = 0; i < 4; i++) if (bank_id[i] == 2'(j)) who = i;
          checks++;
          if (who < 0) begin
            if (bank_en[j] !== 1'b0) begin failures++; $display("FAIL bank %0d enabled", j); end
          end else begin
            nb++;
            if (bank_en[j] !== 1'b1 || bank_addr[j] !== addr_in[who] || bank_sel[j] !== 2'(who)) begin
              failures++;
              $display("FAIL bank %0d en=%0b addr=%h sel=%0d expected request %0d", j, bank_en[j],
                       bank_addr[j], bank_sel[j], who);
            end
          end
        end
        nbanks_seen[nb]++;
      end
    end
    checks++;
    if (nbanks_seen[1] == 0 || nbanks_seen[2] == 0 || nbanks_seen[4] == 0) begin
      failures++;
      $display("FAIL bank-count cases not all seen: %0d %0d %0d", nbanks_seen[1], nbanks_seen[2], nbanks_seen[4]);
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
