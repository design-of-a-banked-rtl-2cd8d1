// Texture fetch front end with the two banked texture cache organisations side
// by side.
//
// Each path takes one bilinear footprint per request: the texture's base
// address and log2 size and the integer texel coordinate (u, v) of the
// footprint's upper-left texel. An address translation array of four
// recursive-Z translators (AT0..AT3) produces the four texel addresses, and a
// 16 KB, 2-way, 64-byte-line banked texture cache with a banked tag returns
// the four texels in one access when they hit.
//   path 0 (p0_*): interleaved data banks (one texel per bank per access)
//   path 1 (p1_*): continuous data banks (a quarter line per enabled bank)
// The thesis proposes both organisations and compares them; the two paths
// are independent, each with its own request, response, line-fill and
// statistics ports, whose timing is that of banked_tex_cache. Arrays indexed
// [i] carry request i of the quad, i = 0..3 for (u,v), (u+1,v), (u,v+1),
// (u+1,v+1). The texture filter and the texture memory are outside.
module banked_texture_cache_top
  import tex_cache_pkg::*;
#(
  parameter int unsigned COORD_W = 12,
  parameter int unsigned TILE_LOG2 = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // ---- path 0: interleaved data banks
  input  logic                         p0_req_valid,
  output logic                         p0_req_ready,
  input  addr_t                        p0_base,
  input  logic [$clog2(COORD_W+1)-1:0] p0_log2_w,
  input  logic [$clog2(COORD_W+1)-1:0] p0_log2_h,
  input  logic [COORD_W-1:0]           p0_u,
  input  logic [COORD_W-1:0]           p0_v,
  output logic                         p0_rsp_valid,
  output texel_t                       p0_rsp_texel [4],
  output logic                         p0_mem_req_valid,
  input  logic                         p0_mem_req_ready,
  output addr_t                        p0_mem_req_addr,
  input  logic                         p0_mem_rsp_valid,
  input  logic [LINE_W-1:0]            p0_mem_rsp_line,
  output logic                         p0_acc_valid,
  output logic                         p0_acc_hit,
  output logic [2:0]                   p0_acc_tbanks,
  output logic [2:0]                   p0_acc_dbanks,
  output logic                         p0_acc_conflict,
  // ---- path 1: continuous data banks
  input  logic                         p1_req_valid,
  output logic                         p1_req_ready,
  input  addr_t                        p1_base,
  input  logic [$clog2(COORD_W+1)-1:0] p1_log2_w,
  input  logic [$clog2(COORD_W+1)-1:0] p1_log2_h,
  input  logic [COORD_W-1:0]           p1_u,
  input  logic [COORD_W-1:0]           p1_v,
  output logic                         p1_rsp_valid,
  output texel_t                       p1_rsp_texel [4],
  output logic                         p1_mem_req_valid,
  input  logic                         p1_mem_req_ready,
  output addr_t                        p1_mem_req_addr,
  input  logic                         p1_mem_rsp_valid,
  input  logic [LINE_W-1:0]            p1_mem_rsp_line,
  output logic                         p1_acc_valid,
  output logic                         p1_acc_hit,
  output logic [2:0]                   p1_acc_tbanks,
  output logic [2:0]                   p1_acc_dbanks,
  output logic                         p1_acc_conflict
);
  addr_t p0_addr [4];
  addr_t p1_addr [4];

  at_array #(.COORD_W(COORD_W)) u_at0 (
    .base(p0_base), .log2_w(p0_log2_w), .log2_h(p0_log2_h), .u(p0_u), .v(p0_v), .addr(p0_addr)
  );

  banked_tex_cache #(.DESIGN(DB_INTERLEAVED), .TILE_LOG2(TILE_LOG2)) u_cache_intl (
    .clk, .rst_n,
    .req_valid(p0_req_valid), .req_ready(p0_req_ready), .req_addr(p0_addr),
    .rsp_valid(p0_rsp_valid), .rsp_texel(p0_rsp_texel),
    .mem_req_valid(p0_mem_req_valid), .mem_req_ready(p0_mem_req_ready),
    .mem_req_addr(p0_mem_req_addr),
    .mem_rsp_valid(p0_mem_rsp_valid), .mem_rsp_line(p0_mem_rsp_line),
    .acc_valid(p0_acc_valid), .acc_hit(p0_acc_hit), .acc_tbanks(p0_acc_tbanks),
    .acc_dbanks(p0_acc_dbanks), .acc_conflict(p0_acc_conflict)
  );

  at_array #(.COORD_W(COORD_W)) u_at1 (
    .base(p1_base), .log2_w(p1_log2_w), .log2_h(p1_log2_h), .u(p1_u), .v(p1_v), .addr(p1_addr)
  );

  banked_tex_cache #(.DESIGN(DB_CONTINUOUS), .TILE_LOG2(TILE_LOG2)) u_cache_cont (
    .clk, .rst_n,
    .req_valid(p1_req_valid), .req_ready(p1_req_ready), .req_addr(p1_addr),
    .rsp_valid(p1_rsp_valid), .rsp_texel(p1_rsp_texel),
    .mem_req_valid(p1_mem_req_valid), .mem_req_ready(p1_mem_req_ready),
    .mem_req_addr(p1_mem_req_addr),
    .mem_rsp_valid(p1_mem_rsp_valid), .mem_rsp_line(p1_mem_rsp_line),
    .acc_valid(p1_acc_valid), .acc_hit(p1_acc_hit), .acc_tbanks(p1_acc_tbanks),
    .acc_dbanks(p1_acc_dbanks), .acc_conflict(p1_acc_conflict)
  );
endmodule
