# Banked texture cache: one access per bilinear footprint

Bilinear texture filtering blends the 2x2 texels nearest a sample point. A
plain single-port texture cache needs up to four accesses to collect them,
because the four texels can sit in different cache lines or in non-adjacent
words of one line. A four-port cache would fetch them at once, but at a large
cost in area and energy per access.

This design gets the four texels in **one access from single-port memories**.
The data array is split into four data banks and the tag array into four tag
banks. Textures are stored in recursive-Z (Morton) order. With that order, the
four texels of any 2x2 footprint always fall in four different banks, so no
bank ever has to serve two of them.

The RTL follows the banked texture cache of the master's thesis *Design of a
Banked Texture Cache for Graphic Processing Unit* (National Chiao Tung
University, 2007). It builds both data-bank organisations the thesis proposes,
each with the banked tag, in the thesis's main configuration:

- 16 KB capacity
- 64-byte lines
- 2-way set-associative
- 32-bit RGBA texels
- recursive-Z placement

Where the thesis is silent (interfaces, miss sequencing, replacement, reset),
the choices made here are listed under "Departures and open points".

## Address layout

Addresses are 32-bit byte addresses. A texel is 4 bytes, so a line holds
16 texels. The cache holds 256 lines, arranged as 128 sets of 2 ways.

| bits    | field                                   |
|---------|-----------------------------------------|
| [31:13] | tag (19 bits)                           |
| [12:8]  | set index inside a tag bank (5 bits)    |
| [7:6]   | tag bank id = two low set-index bits    |
| [5:2]   | texel number *t* inside the line        |
| [1:0]   | byte inside the texel                   |

How *t* is split depends on the data-bank organisation:

| organisation              | bank id       | position in bank |
|---------------------------|---------------|------------------|
| interleaved (design v2)   | `{t[1], t[0]}`| `{t[3], t[2]}`   |
| continuous (design v1)    | `{t[3], t[2]}`| `{t[1], t[0]}`   |

For the continuous design, `{t[1], t[0]}` also selects the outside column
multiplexer, as described below.

The interleaved bank id is the recursive-Z case of a general rule: for an NxN
placement tile, the bank id is `{t[log2 N], t[0]}`. The parameter `TILE_LOG2`
(default 1) sets log2 N.

## Why a 2x2 footprint never collides

In recursive-Z order a texel's offset interleaves the coordinate bits:
`... v2 u2 v1 u1 v0 u0`. A footprint at (u, v), (u+1, v), (u, v+1),
(u+1, v+1) has these properties:

- **Data banks.** Inside a 64-byte line, `{t1, t0} = {v0, u0}`. The four
  texels differ in u parity and in v parity, so they occupy four different
  interleaved banks.
- **Tag banks.** A 64-byte line is a 4x4 block of texels, and the two low
  set-index bits are `{v2, u2}` of the block. Neighbouring blocks therefore
  land in different tag banks. Two texels that share a tag bank share the
  line, so one tag read serves both.
- **Pairwise swaps.** If the requests are ordered as above, the request-to-bank
  mapping is `bank(i) = i XOR {v0, u0}`. That mapping only swaps pairs: if
  request i goes to bank j, then request j goes to bank i. The address control
  relies on this. The multiplexer of bank j can be steered by the bank id of
  request j's *own* address, with no search.

With 4D or 6D row-major tiled placements, or with other line sizes, two texels
can need different rows of one bank. The cache flags that case on
`acc_conflict` and by an assertion. It does not resolve it.

## Interleaved data banks (design v2, path 0)

Each bank holds a quarter of every line (256 rows x 4 texels) and returns one
texel per access. The address control is four 4-to-1 multiplexers. Bank j
receives `{set, way, position}` of the request whose bank id is j. All four
banks are read on every access. The four bank outputs are then put back into
request order.

## Continuous data banks (design v1, path 1)

Bank j holds texels 4j..4j+3 of every line, i.e. a contiguous quarter line.
Banks are enabled only when a request needs them:

- A footprint aligned on a 2x2 sub-block touches **one** bank.
- A footprint straddling two sub-blocks touches **two** banks.
- A footprint at the centre of a 4x4 block touches **four** banks.

Fewer enabled banks mean less energy per access.

Because a bank can hold several requested texels, each enabled bank returns
its whole quarter line. The path from banks to output has three parts:

1. **Address control.** For every bank, it compares the four bank ids with the
   bank number. A priority encoder (request 3 first) turns the result into a
   multiplexer select and a bank enable.
2. **Column select.** Four multiplexers sit outside the banks and pick the
   texels. Their 16 inputs are the line's texels, wired *interleaved*: texel
   *t* goes to multiplexer `{t1, t0}` at input `{t3, t2}`. The four texels of a
   footprint therefore reach four different multiplexers.
3. **Word select.** It builds each multiplexer's select. Like the interleaved
   address control, it relies on the pairwise swaps: multiplexer k takes the
   position field of request `MUX_k`.

## Banked tag

Tag bank j holds the valid bits and tags of both ways for the 32 sets whose
low set-index bits are j.

- **Tag control** uses the same structure as the continuous address control.
  Comparators and a priority encoder per tag bank send one set index to each
  tag bank that is asked for, and leave the other tag banks idle.
- **Tag compare** puts a multiplexer in front of each request's comparator. The
  multiplexer picks the entries of that request's tag bank, and both ways are
  compared.

## Misses

A footprint is answered only when all four texels hit. On a miss, the cache
takes these steps:

1. Drops `req_ready`.
2. Fetches the first missing line, the lowest-numbered request first.
3. Writes the tag into its tag bank.
4. Writes the **same row of all four data banks**. The whole line is replaced,
   as the thesis prescribes, so no bank ever holds part of a line.
5. Looks the footprint up again.

A footprint that spans four uncached lines takes four fills. The victim way is
chosen round-robin per set.

## Interface and timing

`banked_tex_cache` has the following ports. The top adds a `p0_`/`p1_` prefix
to each.

| port | meaning |
|------|---------|
| `req_valid`, `req_ready`, `req_addr[4]` | Footprint request. It is taken in any cycle where `req_ready` is high, which means the cache is idle. `req_addr[i]` is request i of the order (u,v), (u+1,v), (u,v+1), (u+1,v+1). |
| `rsp_valid`, `rsp_texel[4]` | One-cycle pulse carrying the four texels in request order. |
| `mem_req_valid`, `mem_req_ready`, `mem_req_addr` | Line fill request. The address is line aligned and is held until `mem_req_ready`. |
| `mem_rsp_valid`, `mem_rsp_line[511:0]` | The whole line in one beat. Texel k is in bits `[32k +: 32]`. |
| `acc_valid`, `acc_hit`, `acc_tbanks`, `acc_dbanks`, `acc_conflict` | One record per cache access, including the retry after a fill: whether it hit, how many tag and data banks it enabled, and whether a bank conflict occurred. |

Timing:

- Tag read, tag compare, data read and texel selection happen in the same
  cycle. Tag and data banks read combinationally, and the response is a
  register.
- A footprint that hits is answered **one cycle** after it is accepted.
- Hits stream at one footprint per cycle.
- The thesis argues that the whole access fits one GPU clock cycle in 0.13 um.

Reset (`rst_n`, asynchronous, active low) invalidates all lines.

`banked_texture_cache_top` places the two organisations side by side as
independent paths:

- path 0: interleaved data banks
- path 1: continuous data banks

Each path takes a footprint as its texture description (`base`, `log2_w`,
`log2_h`) and the integer texel coordinate (`u`, `v`) of its upper-left texel.
The four address translators in `at_array` compute the recursive-Z addresses,
with repeat wrapping at the texture edges, and feed the cache. The texture
filter, which turns texels and fractional weights into a colour, and the
texture memory are outside the design.

## Module map

```
banked_texture_cache_top
├── at_array            four RZ translators (AT0..AT3)
│   └── rz_addr_xlate
└── banked_tex_cache    (DESIGN = DB_INTERLEAVED / DB_CONTINUOUS)
    ├── tag_ctrl ── priority_encoder
    ├── tag_bank x4
    ├── tag_compare
    ├── interleaved:  addr_ctrl_intl, data_bank x4 (one-texel read)
    └── continuous:   addr_ctrl_cont ── priority_encoder,
                      data_bank x4 (quarter-line read), word_select, column_select
tex_cache_pkg           sizes, field functions, types
```

## Simulating

Every testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. For example, the full design at its default
size:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
  rtl/tex_cache_pkg.sv tb/tb_top.sv --top-module tb_top -o sim
./obj_dir/sim
```

`tb/tex_mem_model.sv` is a behavioural texture memory. It has a fixed latency,
random back-pressure, and texel contents that are a known function of the
address. Each leaf module has its own testbench (`tb_<module>.sv`).

`tb_top` models a small frame: a 32x32-pixel tile textured from a 256x256
mip-mapped texture, mixing bilinear, trilinear (two levels) and 2:1 anisotropic
pixels. It then runs wide and tall textures and edge wrapping, plus a forced
eviction. It checks every texel and requires that each mechanism occurred:

- hits and misses
- multi-line fills
- evictions
- memory stalls
- 1/2/4-bank accesses

In that run, 2537 footprints cost 2537 hit accesses. A cache returning one
texel per access would need 10148 accesses. A wide-bus cache returning one
aligned group of four texels per access would need 5763. That is about a 56%
reduction against wide bus, close to the ~50% the thesis reports for a full
game frame. The continuous design enabled one, two and four banks in 24%, 46%
and 30% of accesses (the thesis reports about 20/50/30).

## Departures and open points

- **Access timing.** The thesis gives no port timing or pipelining; the
  one-cycle, combinational-read arrangement is this design's choice. Real SRAM
  macros with registered reads would add a pipeline stage. The banks here are
  plain arrays, so energy, delay and area cannot be taken from this RTL.
- **Miss handling.** The sequencing (one line at a time, then retry), the
  memory handshake, the whole-line response, round-robin replacement and reset
  behaviour are all not given by the thesis.
- **Bank conflicts.** These are detected, not handled. The thesis avoids them
  by choosing recursive-Z placement and 64-byte lines, and this design assumes
  the same. 4D and 6D placements are not built.
- **Request order.** The thesis's bank-select formula is printed with 1-based
  bit numbers. It is read here as texel-number bits `{log2 N, 0}`, which agrees
  with all of the thesis's worked examples. The request order
  (u,v), (u+1,v), (u,v+1), (u+1,v+1) is assumed; the pairwise-swap address
  control is only correct for that order.
- **Priority encoder.** It outputs 00 when no input is set; the thesis leaves
  that case open.
- **Cache geometry.** Line size, capacity and associativity are package
  constants, fixed at the thesis's main configuration. The cache geometry is
  only verified at that configuration, although the `TILE_LOG2` mapping of the
  column select and word select is also tested for 4x4 tiles.
- **Lint warning.** Verilator reports `SYNCASYNCNET` on `rst_n`. The reset is
  asynchronous in the logic, and the assertions' `disable iff` samples it on
  the clock; no circuit depends on the latter.
