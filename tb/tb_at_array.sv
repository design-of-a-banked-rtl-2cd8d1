// Test of the four-translator array: the four addresses must be the RZ
// addresses of (u,v), (u+1,v), (u,v+1), (u+1,v+1), wrapped at the texture
// edge, and for textures of at least 2x2 texels the four texels must land in
// four different interleaved banks (texel address bits [3:2]).
module tb_at_array;
  import tex_cache_pkg::*;
  addr_t base;
  logic [3:0] log2_w, log2_h;
  logic [11:0] u, v;
  addr_t addr [4];
  int checks = 0, failures = 0, wraps = 0;

  at_array dut (.base, .log2_w, .log2_h, .u, .v, .addr);

  function automatic addr_t ref_addr(addr_t b, int lw, int lh, int x, int y);
    longint off = 0;
    int pos = 0, iu = 0, iv = 0;
    x = x % (1 << lw);
    y = y % (1 << lh);
    while (iu < lw || iv < lh) begin
      if (iu < lw && (iu <= iv || iv >= lh)) begin off |= longint'((x >> iu) & 1) << pos; iu++; end
      else begin off |= longint'((y >> iv) & 1) << pos; iv++; end
      pos++;
    end
    return b + addr_t'(off * 4);
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int lw, lh;
      lw = $urandom_range(1, 12);
      lh = $urandom_range(1, 12);
      base = $urandom & 32'hFFFF_0000;
      log2_w = 4'(lw); log2_h = 4'(lh);
      u = 12'($urandom & ((1 << lw) - 1));
      v = 12'($urandom & ((1 << lh) - 1));
      if (n % 10 == 0) u = 12'((1 << lw) - 1);
      if (u == 12'((1 << lw) - 1)) wraps++;
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (addr[i] !== ref_addr(base, lw, lh, u + i % 2, v + i / 2)) begin
          failures++;
          $display("FAIL AT%0d (%0d,%0d) %0dx%0d got %h", i, u, v, 1 << lw, 1 << lh, addr[i]);
        end
      end
      checks++;
      for (int i = 0; i < 4; i++)
        for (int k = i + 1; k < 4; k++)
          if (addr[i][3:2] == addr[k][3:2]) begin
            failures++;
            $display("FAIL banks of AT%0d and AT%0d equal", i, k);
          end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
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
