// Recursive-Z (RZ) texel address translation.
//
// RZ placement orders texels as nested Z curves: the texel offset interleaves
// the bits of the texel coordinates, u supplying bit 0, v bit 1, u bit 2 and so
// on, until the shorter coordinate runs out; the remaining high bits come from
// the longer one. Texel address = base + offset * 4 (four bytes per texel).
// The three cases (square, wide, tall texture) and the formula are the
// thesis's. Texture width and height are powers of two, given as log2 (up
// to 12, a 4096-texel edge); coordinates are wrapped to the texture size
// (repeat addressing), which is this design's choice. Purely combinational.
module rz_addr_xlate
  import tex_cache_pkg::*;
#(
  parameter int unsigned COORD_W = 12
) (
  input  addr_t                      base,
  input  logic [$clog2(COORD_W+1)-1:0] log2_w,
  input  logic [$clog2(COORD_W+1)-1:0] log2_h,
  input  logic [COORD_W-1:0]         tu,
  input  logic [COORD_W-1:0]         tv,
  output addr_t                      addr
);
  logic [2*COORD_W-1:0] offset;

  always_comb begin
    int unsigned lw, lh, lmin;
    lw   = 32'(log2_w);
    lh   = 32'(log2_h);
    lmin = (lw < lh) ? lw : lh;
    offset = '0;
    for (int unsigned b = 0; b < 2 * COORD_W; b++) begin
      if (b < 2 * lmin) begin
        offset[b] = b[0] ? tv[b/2] : tu[b/2];
      end else if (b < lw + lh) begin
        // b - lmin < max(lw, lh) <= COORD_W here
        offset[b] = (lw > lh) ? tu[(b - lmin) % COORD_W] : tv[(b - lmin) % COORD_W];
      end
    end
    addr = base + (ADDR_W'(offset) << 2);
  end
endmodule
