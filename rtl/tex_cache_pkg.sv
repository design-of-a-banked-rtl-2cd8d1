// Shared constants, types and address-field helpers of the banked texture cache.
// The design follows the master's thesis "Design of a Banked Texture Cache for
// Graphic Processing Unit" (National Chiao Tung University, 2007), called
// "the thesis" in the comments of these files.
//
// The cache holds 16 KB in 64-byte lines, two ways per set. A texel is 32 bits
// (one byte each of R, G, B and A) and addresses are 32-bit byte addresses, so
// a line carries 16 texels and the cache 256 lines in 128 sets. The line is cut
// into four data banks (DB0..DB3) and the 128 sets into four tag banks
// (TB0..TB3) of 32 sets each.
//
// Byte address fields, default configuration:
//   [1:0]   byte inside the texel (word offset)
//   [5:2]   texel inside the line, 4 bits
//   [7:6]   tag bank id (the two low bits of the set index)
//   [12:8]  set index inside the tag bank
//   [31:13] tag
// Continuous data banks take the two high bits of the texel-in-line field as
// their bank id. Interleaved data banks take texel bits {lg(N), 0} for an NxN
// placement tile (bits 1 and 0 for recursive-Z), and the remaining texel bits
// give the position inside the bank. Cache size, line size, associativity and
// the field layout follow the thesis; the 32-bit address width is this
// design's choice.
package tex_cache_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned TEXEL_W     = 32;
  localparam int unsigned CACHE_BYTES = 16384;
  localparam int unsigned LINE_BYTES  = 64;
  localparam int unsigned WAYS        = 2;
  localparam int unsigned NBANKS      = 4;   // data banks and tag banks

  localparam int unsigned LINE_TEXELS = LINE_BYTES / 4;                 // 16
  localparam int unsigned BANK_TEXELS = LINE_TEXELS / NBANKS;           // 4
  localparam int unsigned LINES       = CACHE_BYTES / LINE_BYTES;       // 256
  localparam int unsigned SETS        = LINES / WAYS;                   // 128
  localparam int unsigned OFF_W       = $clog2(LINE_BYTES);             // 6
  localparam int unsigned TOFF_W      = OFF_W - 2;                      // 4
  localparam int unsigned SET_W       = $clog2(SETS);                   // 7
  localparam int unsigned TB_SET_W    = SET_W - 2;                      // 5
  localparam int unsigned TAG_W       = ADDR_W - OFF_W - SET_W;         // 19
  localparam int unsigned WAY_W       = (WAYS > 1) ? $clog2(WAYS) : 1;  // 1
  localparam int unsigned POS_W       = TOFF_W - 2;                     // 2
  localparam int unsigned LINE_W      = LINE_TEXELS * TEXEL_W;          // 512

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [TEXEL_W-1:0] texel_t;
  typedef logic [1:0]         bank_id_t;
  typedef logic [TAG_W-1:0]   tag_t;

  // The two data-bank organisations the thesis proposes.
  typedef enum logic {
    DB_INTERLEAVED = 1'b0,   // design v2: one texel per bank per access
    DB_CONTINUOUS  = 1'b1    // design v1: a quarter line per bank per access
  } db_design_e;

  // One tag entry of one way.
  typedef struct packed {
    logic valid;
    tag_t tag;
  } tag_entry_t;

  // Texel number inside the line (byte address bits [5:2]).
  function automatic logic [TOFF_W-1:0] texel_in_line(addr_t a);
    return a[OFF_W-1:2];
  endfunction

  function automatic logic [SET_W-1:0] set_of(addr_t a);
    return a[OFF_W+SET_W-1:OFF_W];
  endfunction

  function automatic bank_id_t tag_bank_of(addr_t a);
    return a[OFF_W+1:OFF_W];
  endfunction

  function automatic logic [TB_SET_W-1:0] tb_index_of(addr_t a);
    return a[OFF_W+SET_W-1:OFF_W+2];
  endfunction

  function automatic tag_t tag_of(addr_t a);
    return a[ADDR_W-1:OFF_W+SET_W];
  endfunction

  // Continuous data bank id: the two high bits of the line offset.
  function automatic bank_id_t cont_bank_of(logic [TOFF_W-1:0] t);
    return t[TOFF_W-1:TOFF_W-2];
  endfunction

  // Interleaved bank id for an NxN tile, N = 2**tile_log2: texel bits
  // {tile_log2, 0}. Also the column-select number of a continuous design.
  function automatic bank_id_t intl_bank_of(logic [TOFF_W-1:0] t, int unsigned tile_log2);
    return {t[tile_log2], t[0]};
  endfunction

  // Position inside the interleaved bank: the two texel bits other than the
  // bank id, in their original order (tile_log2 is 1, 2 or 3).
  function automatic logic [POS_W-1:0] intl_pos_of(logic [TOFF_W-1:0] t, int unsigned tile_log2);
    case (tile_log2)
      2:       return {t[3], t[1]};
      3:       return {t[2], t[1]};
      default: return {t[3], t[2]};
    endcase
  endfunction

  // Inverse of the two functions above: texel number from bank id and position.
  function automatic logic [TOFF_W-1:0] intl_texel(bank_id_t id, logic [POS_W-1:0] p,
                                                    int unsigned tile_log2);
    case (tile_log2)
      2:       return {p[1], id[1], p[0], id[0]};
      3:       return {id[1], p[1], p[0], id[0]};
      default: return {p[1], p[0], id[1], id[0]};
    endcase
  endfunction

endpackage
