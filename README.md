# Recursive-Z texture memory system for bilinear filtering

A bilinear texture lookup needs the 2x2 block of texels around a sample point. How fast the
texture unit can fetch those four texels depends mostly on how the texture is laid out in
memory. The layout decides three things: how many cache lines the 2x2 block spreads over, how
well the cache hits, and how much logic it takes to turn a (u, v) coordinate into an address.

This RTL implements a texture unit front end built around **recursive-Z placement**: texels are
stored in Z (Morton) order, so the texel index is the bits of v and u interleaved. Every aligned
power-of-two square of the texture is then contiguous in memory. A 64-byte cache line holds an
aligned 4x4 block of texels, and the address comes from wiring and ORs instead of an adder
chain. On top of that layout the unit uses **one cache access per cache line touched**: the
four texels of a bilinear footprint lie in one, two or four lines. The unit works out which
case applies from a few coordinate bits, issues only one access per line, and picks every
texel it needs out of the returned line buffer.

The design follows a published thesis on texture memory systems for GPU texture mapping. That
work names this organisation "texture cache support 2". It weighs the placements against two
cheaper cache organisations as well: a baseline cache that returns one texel per access, and a
cache with burst reads of consecutive texels ("support 1"). Both are built in as modes, chosen
by the `support` input, so the same RTL can measure all three. Where this RTL had to make its
own choices, the sections below say so.

## Data flow

```
request ──► case identifier ──► coordinate generator ──► coordinate queue ──► address translation
 (u,v, fu,fv,     (1, 2 or 4 lines?)  (only explicit texels)   (8 entries)        (2 stages, A=(A'<<2)+B)
  m,n, base,                                                                           │
  placement)                                                                           ▼
colour ◄── bilinear filter ◄── texels router ◄── L1 texture cache ◄──────────── address queue
  RGBA8    (collects 4 texels)  (4 muxes on the     (8 KB, direct mapped,          (8 entries)
                                 line buffer)         64-byte lines, stall on miss) ──► texture memory
```

Every arrow is a valid/ready handshake. A cache miss stalls the cache. Accesses then pile up in
the address queue and the coordinate queue until `req_ready` drops. A colour consumer that is
not ready stalls the pipeline the same way.

**Timing.** With all stages flowing, the unit takes one request per cycle in case I and
delivers one colour per cycle. The colour of a request that hits is taken seven clock edges
after the edge that took the request. The seven registers are the coordinate generator, the
coordinate queue, two translation stages, the address queue, the cache line buffer and the
filter output. A request that needs k accesses (under support 2, k = 1, 2 or 4 lines) occupies
the front end for k cycles. A miss costs the memory latency plus one cycle per 8-byte beat (100 + 8 cycles with
the memory assumed here) more than a hit.

## Recursive-Z placement and its variants

A texture is 2^m texels wide and 2^n texels high, with m, n ≤ 16. Let k = min(m, n). The texel
index A' is built in two parts:

* the k low bits of u and v, cross-interleaved: `v(k-1) u(k-1) … v1 u1 v0 u0`;
* above those, the leftover high bits of the longer side's coordinate.

| texture | A' |
|---|---|
| square, m = n = r | `v(r-1) u(r-1) … v1 u1 v0 u0` |
| wide, m > n | `u(m-1) … u(n) · v(n-1) u(n-1) … v0 u0` |
| tall, m < n | `v(n-1) … v(m) · v(m-1) u(m-1) … v0 u0` |

The byte address is `A = (A' << 2) + B`, with 4-byte texels and base address B. Worked
examples, all checked by `tb_rz_xlate_core`:

* 8x8 texture, (4, 7): A' = 111010₂ = 58.
* 16x4 texture, (9, 3): A' = 101011₂ = 43.
* 4x16 texture, (3, 9): A' = 100111₂ = 39.

Four variants keep the recursive-Z order between tiles and change only the order inside the
smallest tile, that is, index bits a3..a0:

| placement | a3 | a2 | a1 | a0 | tile order |
|---|---|---|---|---|---|
| RZ    | v1 | u1 | v0 | u0 | Z in every 2x2 |
| RZU   | v1 | u1 | u0 | v0⊕u0 | U in every 2x2 |
| RZFU1 | v1 | u1 | u0 | u0⊕v0⊕v1 | U, lower row of U's flipped |
| RZFU2 | v1 | u1 | u0 | ¬(u0⊕v0⊕v1) | U, upper row of U's flipped |
| RZS4  | v1 | v0 | v0⊕u1 | v0⊕u0 | 4x4 tiles in snake (boustrophedon) order |

The placement is chosen per request (`tex_req_t.placement`). The variants change which texels
sit next to each other in memory, which matters for caches that fetch runs of adjacent words
(support 1, below).
In this unit each line is one aligned 4x4 block whatever the variant, so the variant changes
only the offsets inside a line. A variant needs its tile to fit: RZU needs k ≥ 1, the others
k ≥ 2. Smaller textures fall back to plain RZ, which is this design's own rule.

## Translation logic without carries (`rz_xlate_core`, `rz_addr_translate`)

The index is the OR of two fields that never overlap:

* **Compare and select** (`rz_compare_select`): a comparator with a 2:1 mux gives k = min(m, n)
  and the flag m ≥ n.
* **Enable encoder** (`rz_enable_encoder`): turns k into a mask of k ones from bit 0. For
  k = 3 the mask is 111₂.
* **Common field** (`rz_common_field_gen`): COORD_W identical cells (`rz_interleave_cell`). Cell i
  outputs `{v_i, u_i}` at index bits 2i+1..2i when its enable is set, and 00 otherwise. This
  replaces a wide mux selected by k.
* **Differential field** (`rz_diff_field_gen`): a mux picks u (if m ≥ n) or v. A bit filter
  clears its k interleaved bits with the same mask, and a shifter moves the rest up by k. Bit
  j ≥ k of the coordinate lands at index bit j + k. For m = 7, n = 3 this gives
  `u6 u5 u4 u3 000000`.
* **Placement remap** (`rz_placement_remap`): rewrites a3..a0 for the variants.

The only adder is the final `+ B`. `rz_addr_translate` puts A' in pipeline stage 1 and the
shift-and-add in stage 2. The source design pipelines the translation unit but does not fix
where it is split, so the split point is this design's own. Coordinates are wrapped to the
texture size first (u mod 2^m, v mod 2^n), so the neighbours of an edge texel stay inside the
texture. This amounts to "repeat" addressing and is this design's own choice.

## Cache lines as regions: the four cases (`case_identifier`)

This is the part that makes one access per line possible. A 64-byte line holds 16 texels. With
recursive-Z placement and a line-aligned base, those 16 texels form an aligned rectangle of the
texture, called a *region*. Its shape depends only on m and n:

| texture | region (w x h) |
|---|---|
| both sides ≥ 4 texels | 4 x 4 |
| height 2 (n = 1), wider | 8 x 2 |
| width 2 (m = 1), taller | 2 x 8 |
| height 1 (n = 0) | 16 x 1 |
| width 1 (m = 0) | 1 x 16 |

The footprint with top-left texel (u, v) leaves its region to the right when u is in the
region's last column (u mod w = w−1). It leaves downwards when v is in the last row
(v mod h = h−1). Each test is an AND of low coordinate bits. If the region already spans the
whole texture width (or height), the wrapped neighbour is in the same line and there is no
crossing. The case code is `{cross_right, cross_down}`:

| code | case | lines | texels per access |
|---|---|---|---|
| 00 | I   | 1 | all four |
| 01 | II  | 2 | the two of the upper row, then the two of the lower row |
| 10 | III | 2 | the two of the left column, then the two of the right column |
| 11 | IV  | 4 | one each |

`case_identifier` computes the region shape with a general formula for any line size
(`LINE_LOG2` texels per line). For 16-texel lines it reduces to the five shapes above; the
general form is this design's own.

## From explicit texels to a full quad

The four texels of a request are numbered as quad slots: 0 = (u, v), 1 = (u+1, v),
2 = (u, v+1), 3 = (u+1, v+1).

**Coordinate generator** (`coord_generator`). Emits one access record (`access_t`) per line,
for the *explicit* texels only:

* case I: slot 0;
* case II: slots 0 and 2;
* case III: slots 0 and 1;
* case IV: slots 0–3.

The last record of a request carries `last`. Records leave one per cycle. A new request is taken
in the cycle the previous request's last record leaves.

**Texels router** (`texel_router`). For each returned line, four 16:1 muxes (`texel_selector`)
pick texels from the line buffer:

* mux 1 takes the explicit texel, at the offset given by its own address bits [5:2];
* muxes 2, 3 and 4 take the right, lower and diagonal neighbours. `offset_generator` supplies
  their offsets;
* `enable_generator` switches on the muxes whose texel is in this line:
  E1 = 1, E2 = ¬s1, E3 = ¬s0, E4 = ¬s1·¬s0.

`offset_generator` does not use hand-minimised equations. It runs the incremented low four
coordinate bits through three 4-bit copies of the translation logic. This gives the same
equations for plain RZ (explicit texel (1,1) of a 4x4 region gives offsets 6, 9 and 12). It
also covers the other placements. A texel found by mux r is written to quad slot (explicit
slot + r), so the second access of case II (slot 2) fills slots 2 and 3. This slot mapping is
this design's own.

**Bilinear filter** (`bilinear_filter`). Merges the delivered slots into a quad register. On
the last access it computes, per 8-bit channel, with F = 8 fraction bits:

```
top    = t0·(256−fu) + t1·fu
bottom = t2·(256−fu) + t3·fu
colour = (top·(256−fv) + bottom·fv) >> 16
```

The weight format and the truncation are this design's own; the source design only says
"weighted average". An assertion checks that all four slots are present when `last` arrives.

## The other two organisations: one texel, or one run, per access

The `support` input (`support_e`) selects what one cache access may return. Change it only
while the unit is empty.

| `support` | organisation | accesses per request |
|---|---|---|
| 2 `SUP_2` | every footprint texel in the accessed line (the design above) | 1, 2 or 4 |
| 1 `SUP_1` | a burst: a run of consecutive texels from a start texel, at most 16 bytes, in one line | 1 to 4 |
| 0 `SUP_BASE` | one texel | always 4 |

**Baseline.** The coordinate generator emits slots 0–3, and the router enables only mux 1.

**Support 1.** A burst names a start address and a length. It can return only texels that sit
next to each other in memory, so the count depends on the order inside the line, and thus on
the placement. `quad_offsets` gives the in-line offset of all four footprint texels: the
offset generator for slots 1–3, plus one more 4-bit translation copy for slot 0. The shared
function `burst_mask` (in `tex_pkg`) says which texels a burst starting at slot s returns. It
takes the texels of the same line at offsets s, s+1, s+2, … for as long as each is occupied,
up to four. The coordinate generator keeps a mask of texels already returned. It starts each
burst at the uncovered texel with the lowest offset, taking lines in slot order, and repeats
until all four are covered. The router computes the same mask for the start texel it receives.
It picks those texels with a second set of four muxes and writes each straight to its own slot,
because a run may include texels left of or above its start. With plain RZ a footprint at
(0,0) of a 2x2 tile is offsets 0–3, one burst. At (1,0) it is offsets 1, 3, 4 and 6, three
bursts. The U and snake variants shorten such gaps, which is their purpose.

## L1 texture cache (`tex_cache`)

* **Organisation:** direct mapped, 8 KB, 64-byte lines (128 lines); tag = address bits 31:13,
  index = address bits 12:6.
* **Hit:** the whole line is copied into the output line buffer and presented one cycle later,
  together with the request's address and access record.
* **Miss:** the cache stalls with one miss outstanding. It requests the line on the memory port
  (`mem_req_*`), receives 8 beats of 8 bytes (beat i = bytes 8i..8i+7) on `mem_rvalid` /
  `mem_rdata`, writes the line into its arrays and presents it.
* **Reset:** valid bits are cleared at reset; tags and data are not.
* **Taken from the source design:** size, associativity, line size, bus width and
  stall-on-miss.
* **This design's own:** the handshakes and the one-cycle hit latency.

The off-chip texture memory is not part of the RTL. `tb/tex_mem_model.sv` is a behavioural
model of it:

* the first beat arrives 100 cycles after the request;
* the content of every word is a fixed function of its address.

## Interface of `texture_unit`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `support` | in | `support_e` (2) | cache organisation: 0 baseline, 1 bursts, 2 one access per line |
| `req_valid` / `req_ready` | in / out | 1 | request handshake |
| `req` | in | `tex_req_t` | u, v (16 b), fu, fv (8 b), m, n (5 b), base (32 b, 64-byte aligned), placement (3 b) |
| `color_valid` / `color_ready` | out / in | 1 | colour handshake, colours in request order |
| `color` | out | 32 | filtered RGBA8 |
| `mem_req_valid` / `mem_req_ready` / `mem_req_addr` | out / in / out | 1/1/32 | line fill request (line-aligned byte address) |
| `mem_rvalid` / `mem_rdata` | in | 1 / 64 | fill beats |
| `cache_hit`, `cache_miss` | out | 1 | one pulse per cache lookup |
| `coord_q_full`, `addr_q_full` | out | 1 | queue full flags |

Parameters:

* `COORD_QDEPTH`, `ADDR_QDEPTH` (8): this design's choice.
* `CACHE_BYTES` (8192), `LINE_BYTES` (64), `BUS_BYTES` (8): from the source design.
* `tex_pkg` sets COORD_W = 16, ADDR_W = 32, 4-byte texels and LINE_LOG2 = 4. The router and the
  case identifier take their line size from LINE_LOG2, so a different line size must be changed
  there and in `LINE_BYTES` together. Only 64-byte lines have been simulated.

## Files

`rtl/` holds one module or package per file:

* **Package:** `tex_pkg`, the types `tex_req_t`, `access_t`, `placement_e`, `case_e`,
  `support_e`, the functions `same_line` and `burst_mask`, plus constants.
* **Translation:** `rz_compare_select`, `rz_enable_encoder`, `rz_interleave_cell`,
  `rz_common_field_gen`, `rz_diff_field_gen`, `rz_placement_remap`, `rz_xlate_core`,
  `rz_addr_translate`.
* **Access logic:** `case_identifier`, `coord_generator`, `offset_generator`,
  `enable_generator`, `texel_selector`, `texel_router`, and `quad_offsets` for bursts.
* **Storage and filtering:** `sync_fifo` (both queues), `tex_cache`, `bilinear_filter`.
* **Top:** `texture_unit`.

`tb/` has one self-checking testbench `tb_<module>.sv` per module. It also holds the reference
package `tex_ref_pkg` and the memory model `tex_mem_model`. `tex_ref_pkg` computes the index with
a bit loop and gets the variants from hand-drawn tile orders. It counts lines by comparing the
line addresses of the four texels, independently of the RTL. It also lists the accesses each
organisation makes, from sorted texel addresses.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/tex_pkg.sv tb/tex_ref_pkg.sv \
  tb/tb_texture_unit.sv --top-module tb_texture_unit -o sim
./obj_dir/sim
```

Replace `tb_texture_unit` with any other `tb_<module>`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_texture_unit` runs the top at its default sizes:

* **Workload:** raster scans over textures of every region shape and placement (including a
  4096x4096 texture and one smaller than a line), then 600 random requests with conflict misses
  and a colour consumer that stalls at random. Scans and random requests follow under the
  baseline and burst organisations.
* **Checks:**
  * every colour;
  * the case code of every request;
  * total hits and misses against a cache model fed by the reference access list;
  * one colour per cycle on cached case I requests;
  * the seven-edge latency;
  * that every mechanism happened: the four cases, hits, misses, both queues full, colour
    back-pressure, all five placements, all region shapes and all three organisations.

`tb_tex_cache` checks the hit latency (1 cycle) and the miss latency (109 cycles, i.e. 100 + 8
more than a hit).

`tb_workload_bilinear` measures the memory system the way it is meant to be judged. It renders
32x32-pixel screen tiles onto a 256x256 texture with bilinear filtering. Each tile is rendered in
three mappings: 1:1, magnified 2x, and rotated by about 30 degrees at 0.9 texel per pixel. Each
mapping runs under every organisation and all five placements from a cold cache. It checks
every colour, and that the cache lookups equal the reference access list. For every run it
prints accesses per request, miss rate and cycles per colour. Accesses per request:

| mapping      | baseline | support 1: RZ | RZU   | RZFU1 | RZFU2 | RZS4  | support 2 |
|--------------|----------|---------------|-------|-------|-------|-------|-----------|
| 1:1          | 4.000    | 2.625         | 2.250 | 2.250 | 2.250 | 2.125 | 1.562     |
| 2x magnified | 4.000    | 2.625         | 2.250 | 2.250 | 2.250 | 2.125 | 1.562     |
| rotated 0.9  | 4.000    | 2.628         | 2.259 | 2.263 | 2.255 | 2.124 | 1.565     |

Cycles per colour, RZ (all placements alike under baseline and support 2):

| mapping      | baseline | support 1 RZ / RZS4 | support 2 |
|--------------|----------|---------------------|-----------|
| 1:1          | 12.55    | 11.18 / 10.68       | 10.11     |
| 2x magnified | 7.80     | 6.43 / 5.93         | 5.37      |
| rotated 0.9  | 11.71    | 10.33 / 9.83        | 9.27      |

Each variant only reorders texels inside a 16-texel tile, so every line holds the same set of
texels. The number of misses is therefore the same for every placement under every
organisation, and the testbench checks this. Under the baseline and support 2 the access
counts are identical too, also checked. Only bursts see the order inside the line. There the
testbench checks that U tiles beat Z tiles and that the 4x4 snake beats both.

## Departures and limits

* Only bilinear filtering is built. Point, trilinear and anisotropic filtering are not.
* The baseline and burst organisations are modes of the support-2 datapath, not separate
  cache designs. The cache always reads a whole line; the modes limit what one access returns.
  How bursts are chosen (lowest uncovered offset first, lines in slot order) is this design's
  own.
* The earlier row-major and tiled (4D/6D) layouts it was compared with are not built either.
* The cache has a single outstanding miss and no miss-under-miss.
* Each access fetches only its own line, so a line shared by two requests is read twice (as
  hits).
* Texture base addresses must be 64-byte aligned.
* Coordinates wrap at the texture edge. Clamp or border modes are not provided.
* These are this design's own choices: queue depths, pipeline split, handshakes, weight format,
  reset behaviour, wrap behaviour and the quad-slot mapping of second accesses.
* Some details of the source were read as follows:
  * *Case identifier:* a footprint crosses when both low coordinate bits of u (or v) are set,
    i.e. u mod 4 = 3. The text also words this as "mod 3 equal to 0", which is not literally
    the same.
  * *Enable generator:* its prose contradicts its own equation table. The table (E2 = ¬s1,
    E3 = ¬s0, E4 = ¬s1¬s0) is used, because it agrees with the offset generator.
