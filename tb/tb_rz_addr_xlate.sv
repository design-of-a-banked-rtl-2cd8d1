// Test of recursive-Z address translation. First the 4x4 example placement
// (row by row: 0 1 4 5 / 2 3 6 7 / 8 9 12 13 / 10 11 14 15), then random
// square, wide and tall textures against a reference that builds the offset by
// taking one bit from u and one from v in turn and, once one runs out, the rest
// from the other.
module tb_rz_addr_xlate;
  import tex_cache_pkg::*;
  addr_t      base, addr;
  logic [3:0] log2_w, log2_h;
  logic [11:0] tu, tv;
  int checks = 0, failures = 0;
  int cases [3];

  rz_addr_xlate dut (.base, .log2_w, .log2_h, .tu, .tv, .addr);

  function automatic addr_t ref_addr(addr_t b, int lw, int lh, int u, int v);
    longint off = 0;
    int pos = 0, iu = 0, iv = 0;
    while (iu < lw || iv < lh) begin
      if (iu < lw && (iu <= iv || iv >= lh)) begin
        off |= longint'((u >> iu) & 1) << pos; iu++;
      end else begin
        off |= longint'((v >> iv) & 1) << pos; iv++;
      end
      pos++;
    end
    return b + addr_t'(off * 4);
  endfunction

  initial begin
    int expect4 [16] = '{0, 1, 4, 5, 2, 3, 6, 7, 8, 9, 12, 13, 10, 11, 14, 15};
    base = 32'h1000; log2_w = 2; log2_h = 2;
    for (int v = 0; v < 4; v++)
      for (int u = 0; u < 4; u++) begin
        tu = 12'(u); tv = 12'(v);
        #1;
        checks++;
        if (addr !== 32'h1000 + 32'(expect4[v * 4 + u] * 4)) begin
          failures++;
          $display("FAIL 4x4 (%0d,%0d) got %h", u, v, addr);
        end
      end
    for (int n = 0; n < 3000; n++) begin
      int lw, lh;
      lw = $urandom_range(0, 12);
      lh = $urandom_range(0, 12);
      base = $urandom & 32'hFFFF_FFC0;
      log2_w = 4'(lw); log2_h = 4'(lh);
      tu = 12'($urandom & ((1 << lw) - 1));
      tv = 12'($urandom & ((1 << lh) - 1));
      #1;
      cases[lw == lh ? 0 : (lw > lh ? 1 : 2)]++;
      checks++;
      if (addr !== ref_addr(base, lw, lh, tu, tv)) begin
        failures++;
        $display("FAIL %0dx%0d (%0d,%0d) got %h expected %h", 1 << lw, 1 << lh, tu, tv, addr,
                 ref_addr(base, lw, lh, tu, tv));
      end
    end
    checks++;
    if (cases[0] == 0 || cases[1] == 0 || cases[2] == 0) begin failures++; $display("FAIL case missing"); end
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
