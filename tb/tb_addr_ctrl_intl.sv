// Test of the interleaved-bank address control with the four bank patterns of
// a bilinear quad (bank of request i = i XOR c, c = 0..3): bank j must receive
// the payload of the request whose bank id is j.
module tb_addr_ctrl_intl;
  import tex_cache_pkg::*;
  bank_id_t    bank_id [4];
  logic [31:0] addr_in [4];
  logic [31:0] bank_addr [4];
  int checks = 0, failures = 0;

  addr_ctrl_intl #(.W(32)) dut (.bank_id, .addr_in, .bank_addr);

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [1:0] c;
      c = 2'(n % 4);
      for (int i = 0; i < 4; i++) begin
        bank_id[i] = 2'(i) ^ c;
        addr_in[i] = $urandom;
      end
      #1;
      for (int j = 0; j < 4; j++) begin
        automatic int who = -1;
        for (int i = 0; i < 4; i++) if (bank_id[i] == 2'(j)) who = i;
        checks++;
        if (bank_addr[j] !== addr_in[who]) begin
          failures++;
          $display("FAIL c=%0d bank %0d got %h expected request %0d", c, j, bank_addr[j], who);
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
