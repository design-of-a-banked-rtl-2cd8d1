// End-to-end test of the banked texture cache, both organisations side by side
// (interleaved and continuous data banks) fed with the same bilinear quads.
// Texel addresses are computed here with recursive-Z placement; every returned
// texel is compared with the memory model's content function. Checked besides
// the data: a quad that hits is answered one cycle after it is accepted and
// back-to-back hits come one per cycle; the continuous design enables one, two
// and four data banks for the three kinds of footprint alignment; misses,
// multi-line refills, evictions from a 2-way set, memory back-pressure and
// bank conflicts (never allowed) are counted.
module tb_banked_tex_cache;
  import tex_cache_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  req_valid [2];
  logic  req_ready [2];
  addr_t req_addr [4];
  logic  rsp_valid [2];
  texel_t rsp_texel [2][4];
  logic  mem_req_valid [2], mem_req_ready [2], mem_rsp_valid [2];
  addr_t mem_req_addr [2];
  logic [LINE_W-1:0] mem_rsp_line [2];
  logic  acc_valid [2], acc_hit [2], acc_conflict [2];
  logic [2:0] acc_tbanks [2], acc_dbanks [2];
  int    mem_reqs [2], mem_stalls [2];

  banked_tex_cache #(.DESIGN(DB_INTERLEAVED)) u_intl (
    .clk, .rst_n, .req_valid(req_valid[0]), .req_ready(req_ready[0]), .req_addr(req_addr),
    .rsp_valid(rsp_valid[0]), .rsp_texel(rsp_texel[0]),
    .mem_req_valid(mem_req_valid[0]), .mem_req_ready(mem_req_ready[0]), .mem_req_addr(mem_req_addr[0]),
    .mem_rsp_valid(mem_rsp_valid[0]), .mem_rsp_line(mem_rsp_line[0]),
    .acc_valid(acc_valid[0]), .acc_hit(acc_hit[0]), .acc_tbanks(acc_tbanks[0]),
    .acc_dbanks(acc_dbanks[0]), .acc_conflict(acc_conflict[0]));
  banked_tex_cache #(.DESIGN(DB_CONTINUOUS)) u_cont (
    .clk, .rst_n, .req_valid(req_valid[1]), .req_ready(req_ready[1]), .req_addr(req_addr),
    .rsp_valid(rsp_valid[1]), .rsp_texel(rsp_texel[1]),
    .mem_req_valid(mem_req_valid[1]), .mem_req_ready(mem_req_ready[1]), .mem_req_addr(mem_req_addr[1]),
    .mem_rsp_valid(mem_rsp_valid[1]), .mem_rsp_line(mem_rsp_line[1]),
    .acc_valid(acc_valid[1]), .acc_hit(acc_hit[1]), .acc_tbanks(acc_tbanks[1]),
    .acc_dbanks(acc_dbanks[1]), .acc_conflict(acc_conflict[1]));

  for (genvar c = 0; c < 2; c++) begin : g_mem
    tex_mem_model #(.LATENCY(4 + 3 * c)) u_mem (
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

  function automatic addr_t rz(addr_t b, int lw, int lh, int u, int v);
    longint off = 0;
    int pos = 0, iu = 0, iv = 0;
    u = u % (1 << lw);
    v = v % (1 << lh);
    while (iu < lw || iv < lh) begin
      if (iu < lw && (iu <= iv || iv >= lh)) begin off |= longint'((u >> iu) & 1) << pos; iu++; end
      else begin off |= longint'((v >> iv) & 1) << pos; iv++; end
      pos++;
    end
    return b + addr_t'(off * 4);
  endfunction

  // expected responses and timing
  typedef logic [3:0][ADDR_W-1:0] quad_t;
  quad_t  exp_q [2][$];
  longint acc_cycle [2][$];
  int n_rsp [2], n_hit_acc [2], n_miss_acc [2], n_retry [2], n_multi_miss [2];
  int n_db [2][5], n_tb [2][5], n_conflict [2], n_one_cycle [2], n_b2b [2];
  longint last_rsp [2];
  bit hit_expected [2][$];

  for (genvar c = 0; c < 2; c++) begin : g_mon
    // sample on the falling edge, when every registered output is settled
    always @(negedge clk) if (rst_n) begin
      if (req_valid[c] && req_ready[c]) acc_cycle[c].push_back(cycle);
      if (acc_valid[c]) begin
        if (acc_hit[c]) n_hit_acc[c]++; else n_miss_acc[c]++;
        n_db[c][acc_dbanks[c]]++;
        n_tb[c][acc_tbanks[c]]++;
        if (acc_conflict[c]) n_conflict[c]++;
      end
      if (rsp_valid[c]) begin
        quad_t  a;
        longint t0;
        bit     he;
        a  = exp_q[c].pop_front();
        t0 = acc_cycle[c].pop_front();
        he = hit_expected[c].pop_front();
        n_rsp[c]++;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (rsp_texel[c][i] !== texel_value(a[i])) begin
            failures++;
            $display("FAIL cache %0d texel %0d addr %h got %h expected %h", c, i, a[i],
                     rsp_texel[c][i], texel_value(a[i]));
          end
        end
        if (cycle - t0 == 1) n_one_cycle[c]++;
        if (he) begin
          checks++;
          if (cycle - t0 != 1) begin
            failures++;
            $display("FAIL cache %0d hit answered after %0d cycles", c, cycle - t0);
          end
        end
        if (last_rsp[c] == cycle - 1) n_b2b[c]++;
        last_rsp[c] = cycle;
      end
    end
  end

  // drive one quad into both caches; 'hit' marks quads that must hit
  task automatic send_quad(addr_t base, int lw, int lh, int u, int v, bit hit);
    quad_t a;
    bit done [2];
    for (int i = 0; i < 4; i++) a[i] = rz(base, lw, lh, u + i % 2, v + i / 2);
    for (int c = 0; c < 2; c++) begin
      exp_q[c].push_back(a);
      hit_expected[c].push_back(hit);
      done[c] = 0;
    end
    for (int i = 0; i < 4; i++) req_addr[i] = a[i];
    req_valid[0] = 1; req_valid[1] = 1;
    while (!(done[0] && done[1])) begin
      @(negedge clk);
      for (int c = 0; c < 2; c++) if (req_valid[c] && req_ready[c]) done[c] = 1;
      @(posedge clk);
      #1;
      for (int c = 0; c < 2; c++) if (done[c]) req_valid[c] = 0;
    end
  endtask

  task automatic drain();
    repeat (40) @(posedge clk);
    #1;
  endtask

  localparam addr_t TEX_A = 32'h0010_0000;  // 64x64 texture, 16 KB
  localparam addr_t TEX_B = 32'h0020_0000;  // same sets as TEX_A
  localparam addr_t TEX_C = 32'h0030_0000;  // same sets again

  initial begin
    req_valid[0] = 0; req_valid[1] = 0;
    for (int i = 0; i < 4; i++) req_addr[i] = '0;
    for (int c = 0; c < 2; c++) begin
      n_rsp[c] = 0; n_hit_acc[c] = 0; n_miss_acc[c] = 0; n_conflict[c] = 0;
      n_one_cycle[c] = 0; n_b2b[c] = 0; last_rsp[c] = -10;
      for (int k = 0; k < 5; k++) begin n_db[c][k] = 0; n_tb[c][k] = 0; end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. cold quad straddling four lines (u = 3, v = 3): four refills, then hits
    send_quad(TEX_A, 6, 6, 3, 3, 0);
    drain();
    send_quad(TEX_A, 6, 6, 3, 3, 1);
    // back-to-back hits inside the same 8x8 region
    send_quad(TEX_A, 6, 6, 2, 2, 1);
    send_quad(TEX_A, 6, 6, 3, 2, 1);
    send_quad(TEX_A, 6, 6, 2, 3, 1);
    send_quad(TEX_A, 6, 6, 4, 4, 1);
    drain();

    // 2. alignment cases of the continuous banks: 1, 2 and 4 banks
    send_quad(TEX_A, 6, 6, 0, 0, 0);   // one 2x2 sub-block: one bank
    send_quad(TEX_A, 6, 6, 1, 0, 1);   // two sub-blocks side by side: two banks
    send_quad(TEX_A, 6, 6, 1, 1, 1);   // four sub-blocks: four banks
    send_quad(TEX_A, 6, 6, 0, 1, 1);   // two sub-blocks stacked: two banks
    drain();

    // 3. random footprints over the whole 64x64 texture (fits the 16 KB cache)
    for (int n = 0; n < 300; n++) send_quad(TEX_A, 6, 6, $urandom_range(0, 63), $urandom_range(0, 63), 0);
    for (int bu = 0; bu < 64; bu += 4)
      for (int bv = 0; bv < 64; bv += 4) send_quad(TEX_A, 6, 6, bu, bv, 0);
    drain();
    // second pass: the whole texture is resident, every quad hits
    for (int n = 0; n < 300; n++) send_quad(TEX_A, 6, 6, $urandom_range(0, 63), $urandom_range(0, 63), 1);
    drain();

    // 4. three textures on the same sets: evictions in the 2-way sets
    for (int n = 0; n < 200; n++) begin
      case (n % 3)
        0: send_quad(TEX_A, 6, 6, (n * 7) % 64, (n * 5) % 64, 0);
        1: send_quad(TEX_B, 6, 6, (n * 7) % 64, (n * 5) % 64, 0);
        default: send_quad(TEX_C, 6, 6, (n * 7) % 64, (n * 5) % 64, 0);
      endcase
    end
    // 5. non-square textures and wrapping at the edge
    for (int n = 0; n < 100; n++) send_quad(TEX_B, 7, 3, $urandom_range(120, 127), $urandom_range(0, 7), 0);
    for (int n = 0; n < 100; n++) send_quad(TEX_C, 2, 8, $urandom_range(0, 3), $urandom_range(0, 255), 0);
    drain();

    for (int c = 0; c < 2; c++) begin
      $display("cache %0d: responses %0d, hit accesses %0d, missing accesses %0d, line fills %0d, mem stalls %0d",
               c, n_rsp[c], n_hit_acc[c], n_miss_acc[c], mem_reqs[c], mem_stalls[c]);
      $display("cache %0d: data banks per access 1:%0d 2:%0d 4:%0d, tag banks 1:%0d 2:%0d 4:%0d, one-cycle %0d, back-to-back %0d",
               c, n_db[c][1], n_db[c][2], n_db[c][4], n_tb[c][1], n_tb[c][2], n_tb[c][4], n_one_cycle[c], n_b2b[c]);
      checks++;
      if (exp_q[c].size() != 0) begin failures++; $display("FAIL cache %0d: %0d responses missing", c, exp_q[c].size()); end
      checks++;
      if (n_conflict[c] != 0) begin failures++; $display("FAIL cache %0d: bank conflicts", c); end
      checks++;
      if (n_miss_acc[c] == 0 || n_hit_acc[c] == 0 || mem_stalls[c] == 0 || n_b2b[c] == 0) begin
        failures++; $display("FAIL cache %0d: a mechanism never happened", c);
      end
      checks++;
      if (n_tb[c][1] == 0 || n_tb[c][2] == 0 || n_tb[c][4] == 0) begin
        failures++; $display("FAIL cache %0d: tag-bank cases missing", c);
      end
      checks++;
      // 64x64 texture = 256 lines: every line filled at least once, plus evictions
      if (mem_reqs[c] <= 256) begin failures++; $display("FAIL cache %0d: no evictions", c); end
    end
    checks++;
    if (n_db[1][1] == 0 || n_db[1][2] == 0 || n_db[1][4] == 0 || n_db[0][1] != 0 || n_db[0][2] != 0) begin
      failures++; $display("FAIL data-bank enable counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
