// Random test of the banked tag comparison: each request must be compared with
// the two ways read from its own tag bank (address bits [7:6]) and report hit
// and way; entries of other banks must not matter.
module tb_tag_compare;
  import tex_cache_pkg::*;
  addr_t      addr [4];
  tag_entry_t tb_rd [4][WAYS];
  logic [3:0] hit;
  logic [WAY_W-1:0] way [4];
  int checks = 0, failures = 0, hits = 0, misses = 0;

  tag_compare dut (.addr, .tb_rd, .hit, .way);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 4; i++) addr[i] = $urandom;
      for (int j = 0; j < 4; j++)
        for (int w = 0; w < WAYS; w++) begin
          tb_rd[j][w].valid = 1'($urandom);
          tb_rd[j][w].tag   = 19'($urandom);
        end
      // plant matching tags in some other bank and in the right bank
      for (int i = 0; i < 4; i++) begin
        automatic int b = addr[i][7:6];
        case ($urandom_range(0, 3))
          0: tb_rd[b][0].tag = addr[i][31:13];
          1: tb_rd[b][1].tag = addr[i][31:13];
          2: begin tb_rd[(b+1)%4][0] = '{1'b1, addr[i][31:13]}; end
          default: ;
        endcase
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        automatic int b = addr[i][7:6];
        logic eh;
        int ew;
        eh = 0; ew = 0;
        for (int w = 0; w < WAYS; w++)
          if (tb_rd[b][w].valid && tb_rd[b][w].tag == addr[i][31:13]) begin eh = 1; ew = w; end
        checks++;
        if (eh) hits++; else misses++;
        if (hit[i] !== eh || (eh && way[i] !== WAY_W'(ew))) begin
          failures++;
          $display("FAIL req %0d hit=%0b way=%0d expected %0b %0d", i, hit[i], way[i], eh, ew);
        end
      end
    end
    checks++;
    if (hits == 0 || misses == 0) begin failures++; $display("FAIL no hit or no miss seen"); end
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
