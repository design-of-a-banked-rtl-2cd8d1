// End-to-end test of the texture fetch front end at its default parameters.
//
// Both paths (interleaved and continuous data banks) receive the same stream
// of bilinear footprints given as texel coordinates. The stream is a small
// frame: a 32x32-pixel screen tile textured from a 256x256 mip-mapped texture
// (levels 0 and 1), each pixel filtered bilinearly, trilinearly (one footprint
// per level) or 2:1 anisotropically (two trilinear samples = four footprints),
// followed by non-square textures and accesses at the texture edges. Every
// texel returned is checked against addresses computed here with recursive-Z
// placement. The test also counts cache accesses and compares them with what a
// one-texel-per-access cache (four per footprint) and a wide-bus cache (one
// access per distinct aligned four-texel group) would need, and counts each
// mechanism of the design: hits, misses, footprints needing several line
// fills, evictions, memory back-pressure, one/two/four data-bank accesses of
// the continuous banks, one/two/four tag-bank accesses, coordinate wrapping,
// and the square, wide and tall recursive-Z cases; one that never happens
// counts as a failure.
module tb_top;
  import tex_cache_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid [2], req_ready [2], rsp_valid [2];
  addr_t       base;
  logic [3:0]  log2_w, log2_h;
  logic [11:0] u, v;
  texel_t      rsp_texel [2][4];
  logic        mem_req_valid [2], mem_req_ready [2], mem_rsp_valid [2];
  addr_t       mem_req_addr [2];
  logic [LINE_W-1:0] mem_rsp_line [2];
  logic        acc_valid [2], acc_hit [2], acc_conflict [2];
  logic [2:0]  acc_tbanks [2], acc_dbanks [2];
  int          mem_reqs [2], mem_stalls [2];

  banked_texture_cache_top dut (
    .clk, .rst_n,
    .p0_req_valid(req_valid[0]), .p0_req_ready(req_ready[0]), .p0_base(base),
    .p0_log2_w(log2_w), .p0_log2_h(log2_h), .p0_u(u), .p0_v(v),
    .p0_rsp_valid(rsp_valid[0]), .p0_rsp_texel(rsp_texel[0]),
    .p0_mem_req_valid(mem_req_valid[0]), .p0_mem_req_ready(mem_req_ready[0]),
    .p0_mem_req_addr(mem_req_addr[0]), .p0_mem_rsp_valid(mem_rsp_valid[0]),
    .p0_mem_rsp_line(mem_rsp_line[0]),
    .p0_acc_valid(acc_valid[0]), .p0_acc_hit(acc_hit[0]), .p0_acc_tbanks(acc_tbanks[0]),
    .p0_acc_dbanks(acc_dbanks[0]), .p0_acc_conflict(acc_conflict[0]),
    .p1_req_valid(req_valid[1]), .p1_req_ready(req_ready[1]), .p1_base(base),
    .p1_log2_w(log2_w), .p1_log2_h(log2_h), .p1_u(u), .p1_v(v),
    .p1_rsp_valid(rsp_valid[1]), .p1_rsp_texel(rsp_texel[1]),
    .p1_mem_req_valid(mem_req_valid[1]), .p1_mem_req_ready(mem_req_ready[1]),
    .p1_mem_req_addr(mem_req_addr[1]), .p1_mem_rsp_valid(mem_rsp_valid[1]),
    .p1_mem_rsp_line(mem_rsp_line[1]),
    .p1_acc_valid(acc_valid[1]), .p1_acc_hit(acc_hit[1]), .p1_acc_tbanks(acc_tbanks[1]),
    .p1_acc_dbanks(acc_dbanks[1]), .p1_acc_conflict(acc_conflict[1])
  );

  for (genvar c = 0; c < 2; c++) begin : g_mem
    tex_mem_model #(.LATENCY(8)) u_mem (
      .clk, .rst_n, .req_valid(mem_req_valid[c]), .req_ready(mem_req_ready[c]),
      .req_addr(mem_req_addr[c]), .rsp_valid(mem_rsp_valid[c]), .rsp_line(mem_rsp_line[c]),
      .n_requests(mem_reqs[c]), .n_stalls(mem_stalls[c]));
  end

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic texel_t texel_value(addr_t a);
    return ((a >> 2) * 32'h9E37_79B1) ^ 32'h5A5A_5A5A;
  endfunction

  function automatic addr_t rz(addr_t b, int lw, int lh, int x, int y);
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

  typedef logic [3:0][ADDR_W-1:0] quad_t;
  quad_t exp_q [2][$];
  int n_rsp [2], n_acc [2], n_hit [2], n_miss [2], n_multi [2], n_db [2][5], n_tb [2][5];
  int fills_this [2], n_conflict [2], miss_before [2], n_evict [2];
  int n_quads = 0, n_wrap = 0, n_square = 0, n_wide = 0, n_tall = 0, n_widebus = 0;
  int n_bi = 0, n_tri = 0, n_ani = 0;

  for (genvar c = 0; c < 2; c++) begin : g_mon
    always @(negedge clk) if (rst_n) begin
      if (mem_rsp_valid[c]) fills_this[c]++;
      if (acc_valid[c]) begin
        n_acc[c]++;
        if (acc_hit[c]) begin
          n_hit[c]++;
          if (fills_this[c] > 1) n_multi[c]++;
          fills_this[c] = 0;
        end else n_miss[c]++;
        n_db[c][acc_dbanks[c]]++;
        n_tb[c][acc_tbanks[c]]++;
        if (acc_conflict[c]) n_conflict[c]++;
      end
      if (rsp_valid[c]) begin
        quad_t a;
        a = exp_q[c].pop_front();
        n_rsp[c]++;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (rsp_texel[c][i] !== texel_value(a[i])) begin
            failures++;
            $display("FAIL path %0d texel %0d addr %h got %h", c, i, a[i], rsp_texel[c][i]);
          end
        end
      end
    end
  end

  task automatic fetch(addr_t b, int lw, int lh, int x, int y);
    quad_t a;
    bit done [2];
    int groups;
    x = x % (1 << lw);
    y = y % (1 << lh);
    for (int i = 0; i < 4; i++) a[i] = rz(b, lw, lh, x + i % 2, y + i / 2);
    // wide-bus baseline: one access per distinct aligned 16-byte group
    groups = 0;
    for (int i = 0; i < 4; i++) begin
      automatic bit seen = 0;
      for (int k = 0; k < i; k++) if (a[k][31:4] == a[i][31:4]) seen = 1;
      if (!seen) groups++;
    end
    n_widebus += groups;
    n_quads++;
    if (x == (1 << lw) - 1 || y == (1 << lh) - 1) n_wrap++;
    if (lw == lh) n_square++; else if (lw > lh) n_wide++; else n_tall++;
    for (int c = 0; c < 2; c++) begin exp_q[c].push_back(a); done[c] = 0; end
    base = b; log2_w = 4'(lw); log2_h = 4'(lh); u = 12'(x); v = 12'(y);
    req_valid[0] = 1; req_valid[1] = 1;
    while (!(done[0] && done[1])) begin
      @(negedge clk);
      for (int c = 0; c < 2; c++) if (req_valid[c] && req_ready[c]) done[c] = 1;
      @(posedge clk);
      #1;
      for (int c = 0; c < 2; c++) if (done[c]) req_valid[c] = 0;
    end
  endtask

  // mip chain of a 256x256 texture: level l is (256 >> l) square, one after another
  localparam addr_t TEX = 32'h0400_0000;
  function automatic addr_t lod_base(int l);
    addr_t b = TEX;
    for (int k = 0; k < l; k++) b += addr_t'((256 >> k) * (256 >> k) * 4);
    return b;
  endfunction

  initial begin
    req_valid[0] = 0; req_valid[1] = 0;
    base = '0; log2_w = 0; log2_h = 0; u = 0; v = 0;
    for (int c = 0; c < 2; c++) begin
      n_rsp[c] = 0; n_acc[c] = 0; n_hit[c] = 0; n_miss[c] = 0; n_multi[c] = 0;
      fills_this[c] = 0; n_conflict[c] = 0; n_evict[c] = 0;
      for (int k = 0; k < 5; k++) begin n_db[c][k] = 0; n_tb[c][k] = 0; end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // the frame tile: pixel (px, py) maps to texel (1.5*px + 3, 1.25*py + 7) at level 0
    for (int py = 0; py < 32; py++)
      for (int px = 0; px < 32; px++) begin
        automatic int x0 = (3 * px) / 2 + 3;
        automatic int y0 = (5 * py) / 4 + 7;
        case ((px + py) % 3)
          0: begin  // bilinear
            fetch(lod_base(0), 8, 8, x0, y0);
            n_bi++;
          end
          1: begin  // trilinear: levels 0 and 1
            fetch(lod_base(0), 8, 8, x0, y0);
            fetch(lod_base(1), 7, 7, x0 / 2, y0 / 2);
            n_tri++;
          end
          default: begin  // 2:1 anisotropic: two trilinear samples along u
            for (int s = 0; s < 2; s++) begin
              fetch(lod_base(0), 8, 8, x0 + s, y0);
              fetch(lod_base(1), 7, 7, (x0 + s) / 2, y0 / 2);
            end
            n_ani++;
          end
        endcase
      end

    // wide and tall textures, edges and wrapping
    for (int n = 0; n < 64; n++) fetch(32'h0800_0000, 9, 4, 508 + n % 4, n % 16);
    for (int n = 0; n < 64; n++) fetch(32'h0900_0000, 3, 10, n % 8, 1016 + n % 8);
    for (int n = 0; n < 16; n++) fetch(32'h0A00_0000, 12, 12, 4095, 4095 - n);
    // three one-line textures on the same set of the 2-way cache: the third
    // evicts the first, so fetching the first again must miss
    for (int k = 0; k < 3; k++) fetch(32'h0B00_0000 + addr_t'(k * 32'h2000), 2, 2, 1, 1);
    repeat (30) @(posedge clk);
    #1;
    for (int c = 0; c < 2; c++) miss_before[c] = n_miss[c];
    fetch(32'h0B00_0000, 2, 2, 1, 1);
    repeat (60) @(posedge clk);
    for (int c = 0; c < 2; c++) if (n_miss[c] > miss_before[c]) n_evict[c]++;

    for (int c = 0; c < 2; c++) begin
      $display("path %0d: %0d footprints, %0d accesses (%0d hit, %0d missing), %0d line fills, %0d multi-fill footprints, %0d memory stalls, %0d evictions seen",
               c, n_rsp[c], n_acc[c], n_hit[c], n_miss[c], mem_reqs[c], n_multi[c], mem_stalls[c], n_evict[c]);
      $display("path %0d: data banks per access 1:%0d 2:%0d 4:%0d; tag banks 1:%0d 2:%0d 4:%0d",
               c, n_db[c][1], n_db[c][2], n_db[c][4], n_tb[c][1], n_tb[c][2], n_tb[c][4]);
      checks++;
      if (n_rsp[c] != n_quads || exp_q[c].size() != 0) begin
        failures++; $display("FAIL path %0d answered %0d of %0d footprints", c, n_rsp[c], n_quads);
      end
      checks++;
      if (n_conflict[c] != 0) begin failures++; $display("FAIL path %0d bank conflicts", c); end
      checks++;
      if (n_hit[c] == 0 || n_miss[c] == 0 || n_multi[c] == 0 || mem_stalls[c] == 0) begin
        failures++; $display("FAIL path %0d: hit/miss/multi-fill/stall not all seen", c);
      end
      checks++;
      if (n_tb[c][1] == 0 || n_tb[c][2] == 0 || n_tb[c][4] == 0) begin
        failures++; $display("FAIL path %0d: tag-bank cases not all seen", c);
      end
      checks++;
      if (n_evict[c] == 0) begin failures++; $display("FAIL path %0d: no eviction", c); end
    end
    checks++;
    if (n_db[1][1] == 0 || n_db[1][2] == 0 || n_db[1][4] == 0) begin
      failures++; $display("FAIL continuous banks: 1/2/4-bank accesses not all seen");
    end
    checks++;
    if (n_wrap == 0 || n_square == 0 || n_wide == 0 || n_tall == 0 || n_bi == 0 || n_tri == 0 || n_ani == 0) begin
      failures++; $display("FAIL footprint kinds not all exercised");
    end
    $display("footprints %0d (bilinear px %0d, trilinear px %0d, anisotropic px %0d); accesses: one-texel cache %0d, wide bus %0d, banked %0d hits",
             n_quads, n_bi, n_tri, n_ani, 4 * n_quads, n_widebus, n_hit[0]);
    // one access per footprint when it hits: the banked caches need no more
    // hit accesses than footprints
    checks++;
    if (n_hit[0] != n_quads || n_hit[1] != n_quads || n_widebus <= n_quads) begin
      failures++; $display("FAIL access counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
