// Address translation array: the four address translators AT0..AT3 that turn
// one bilinear footprint into four texel addresses.
//
// Given the texel coordinate (u, v) of the footprint's upper-left texel, AT0
// translates (u, v), AT1 (u+1, v), AT2 (u, v+1) and AT3 (u+1, v+1), each with
// recursive-Z placement; coordinates wrap at the texture edge. The thesis
// names the translators and the RZ formula; the request order above, on which
// the interleaved address control relies, and the wrapping are this design's
// choices. Purely combinational.
module at_array
  import tex_cache_pkg::*;
#(
  parameter int unsigned COORD_W = 12
) (
  input  addr_t                        base,
  input  logic [$clog2(COORD_W+1)-1:0] log2_w,
  input  logic [$clog2(COORD_W+1)-1:0] log2_h,
  input  logic [COORD_W-1:0]           u,
  input  logic [COORD_W-1:0]           v,
  output addr_t                        addr [4]
);
  logic [COORD_W-1:0] mask_w, mask_h;
  logic [COORD_W-1:0] tu [4];
  logic [COORD_W-1:0] tv [4];

  always_comb begin
    mask_w = COORD_W'((32'd1 << log2_w) - 1);
    mask_h = COORD_W'((32'd1 << log2_h) - 1);
    for (int i = 0; i < 4; i++) begin
      tu[i] = (u + COORD_W'(i % 2)) & mask_w;
      tv[i] = (v + COORD_W'(i / 2)) & mask_h;
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_at
    rz_addr_xlate #(.COORD_W(COORD_W)) u_at (
      .base(base), .log2_w(log2_w), .log2_h(log2_h),
      .tu(tu[i]), .tv(tv[i]), .addr(addr[i])
    );
  end
endmodule
