// Test of word select for recursive-Z placement (2x2 tile) and for a 4x4 tile.
// Quads are formed from texel coordinates inside one 4x4-texel line; the select
// of column select k must equal the in-multiplexer position S of the request
// whose multiplexer number MUX is k. Expected fields are computed here from the
// coordinates, not from the line offset.
module tb_word_select;
  import tex_cache_pkg::*;
  logic [3:0] toff [4];
  bank_id_t   mux_a [4], mux_b [4];
  logic [1:0] sel_a [4], sel_b [4];
  int checks = 0, failures = 0;

  word_select #(.TILE_LOG2(1)) dut_rz (.toff(toff), .mux_id(mux_a), .col_sel(sel_a));
  word_select #(.TILE_LOG2(2)) dut_4x4 (.toff(toff), .mux_id(mux_b), .col_sel(sel_b));

  // RZ offset of (u, v) inside a 4x4 block: v1 u1 v0 u0
  function automatic logic [3:0] rz(int u, int v);
    return {1'(v >> 1), 1'(u >> 1), 1'(v), 1'(u)};
  endfunction
  // row-major 4x4 tile offset: v1 v0 u1 u0
  function automatic logic [3:0] tile4(int u, int v);
    return 4'(v * 4 + u);
  endfunction

  initial begin
    for (int mode = 0; mode < 2; mode++)
      for (int u = 0; u < 3; u++)
        for (int v = 0; v < 3; v++) begin
          int eu [4], ev [4];
          for (int i = 0; i < 4; i++) begin
            eu[i] = u + i % 2;
            ev[i] = v + i / 2;
            toff[i] = mode == 0 ? rz(eu[i], ev[i]) : tile4(eu[i], ev[i]);
          end
          #1;
          for (int i = 0; i < 4; i++) begin
            logic [1:0] emux, es;
            emux = {1'(ev[i]), 1'(eu[i])};                 // v parity, u parity
            if (mode == 0) es = {1'(ev[i] >> 1), 1'(eu[i] >> 1)};
            else           es = {1'(ev[i] >> 1), 1'(eu[i] >> 1)};
            checks++;
            if (mode == 0 ? (mux_a[i] !== emux || sel_a[emux] !== es)
                          : (mux_b[i] !== emux || sel_b[emux] !== es)) begin
              failures++;
              $display("FAIL mode %0d (%0d,%0d) req %0d", mode, eu[i], ev[i], i);
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
