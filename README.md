# Two-level hierarchical Z-buffer with bi-level compression

A conventional rendering pipeline decides visibility at the very end: every
pixel of every triangle is lit, set up, rasterized and textured before the
Z-buffer test finds that most of them are hidden. This RTL adds two early
visibility tests in front of that work. Both read a small on-chip
*hierarchical Z-buffer* (HZ buffer), a reduced-resolution copy of the Z
buffer that holds, for each screen block, the farthest depth found in it.
Anything farther than that depth is hidden by what is already drawn there
and can be thrown away.

```
Transform -> Back-face culling -> [triangle HZ test] -> Lighting -> Setup -> Rasterize
                                          |                                     |
                                          |                            [pixel HZ test]
                                          |                                     |
                               +----------+-----------+          Texture -> Z-buffer test -> Color
                               | HZ management        |                          |
                               |  bit-mask cache      | <------------------------+
                               |  HZ buffer (on chip) |     pixels that passed the Z test
                               +----------------------+
```

The unit in this repository is everything inside the brackets and the box:
`hz_top`. The other stages are outside it and meet it at its ports.

The scheme follows the two-level HZ-buffer architecture published by
C.-H. Chen and C.-Y. Lee (2003): two hierarchy levels stored in one entry,
a triangle test and a pixel test, a bit-mask cache that keeps the HZ
buffer current without reading the Z buffer, and a "dynamic bi-level"
entry compression. Widths, handshakes, pipelining, reset and clear,
and a few rules that the published description leaves open are this
implementation's own; they are listed in
[Departures and choices](#departures-and-choices).

## Blocks, levels and the HZ entry

The screen is cut into *level-1* blocks of 8x8 pixels, grouped 2x2 into
*level-2* blocks of 16x16 (the "16x16-8x8" configuration). One HZ-buffer
entry describes one level-2 block. Within it the four level-1 blocks are
numbered

```
 k = 0 | k = 1        k = 2*(y is in the lower half) + (x is in the right half)
-------+-------
 k = 2 | k = 3
```

Depths grow with distance; all ones is the far plane. The pipeline carries
16-bit depths (`ZW`). The HZ buffer keeps only the top 8 bits (`DW`). A
stored code `q` means "every pixel in the block is at most
`q * 2^(ZW-DW) + (2^(ZW-DW) - 1)`". An item is discarded only when the top
bits of its depth are strictly greater than `q`. That rule never throws
away a visible pixel, however coarse `DW` is.

Two entry formats are built (`COMPRESS`):

| format | layout, MSB first | bits at DW=8 | level-2 depth |
|---|---|---|---|
| uncompressed (`COMPRESS=0`) | `index[1:0], L1_0, L1_1, L1_2, L1_3` | 34 | `L1_index` |
| bi-level (`COMPRESS=1`, default) | `HHZ, LHZ, M0, M1, M2, M3` | 20 | `HHZ` |

In the uncompressed format the 2-bit index names the farthest of the four
level-1 depths, so the level-2 depth costs 2 bits instead of 8. In the
bi-level format each level-1 block belongs to one of two depth groups:
`Mk = 1` means block `k` takes depth `HHZ`, and `Mk = 0` means it takes `LHZ`.

The buffer size for a W x H screen is
`(W / level-2 width) * (H / level-2 height) * entry bits`. At 1280 x 1024
that gives (KB = 1000 bytes):

| configuration | entries | uncompressed | bi-level |
|---|---|---|---|
| 32x32-16x16 (`L1_SHIFT=4`) | 1 280 | 5.44 KB | 3.2 KB |
| 16x16-8x8 (`L1_SHIFT=3`, default) | 5 120 | 21.76 KB | 12.8 KB |
| 8x8-4x4 (`L1_SHIFT=2`) | 20 480 | 87.04 KB | 51.2 KB |

## The two visibility tests

**Triangle test** (`hz_tri_test`). It takes a screen-space triangle after
back-face culling and forms the bounding box of its vertices. If the box lies
inside a single level-2 block, the nearest vertex depth is compared with
that block's level-2 depth. A triangle behind it is discarded before
lighting. If it survives and also lies inside a single level-1 block, it is
compared with that level-1 depth. Triangles that straddle blocks pass
unchanged and are left to the pixel test. An entry holds the level-2 block
and all four of its level-1 blocks, so one read serves both comparisons.

**Pixel test** (`hz_pixel_test`). It takes each rasterized pixel and
compares it with the depth of its level-1 block. A pixel behind that depth
is discarded before texturing and before any Z-buffer traffic.

The pixel test can take several pixels per cycle (`PIX_LANES`, default 1).
All lanes share one HZ-buffer read, addressed by the level-2 block of lane
0. That entry holds all four level-1 depths of the block, so each lane in
that block gets its own verdict. A lane whose pixel lies in another
level-2 block passes untested; it is not discarded. Such a lane wastes
throughput but is never wrong. A rasterizer should therefore send the
pixels of one block together. With `PIX_LANES = 1` the `pix_*` ports are
plain vectors; otherwise they are packed arrays with one element per lane.

The triangle test takes one triangle per cycle and the pixel test one
group per cycle. Both answer two cycles later with a pass flag. The read
is issued in the input cycle, and the verdict is registered after the data
returns.

## Keeping the HZ buffer current: the bit-mask cache

This is the part that needs the most care. When the Z buffer changes, the
farthest depth of a block may move nearer. Finding it again would mean
reading all 64 depths of the block from the external Z buffer, which would
cost more bandwidth than the HZ tests save. Instead, the unit watches the
pixels that *passed* the Z-buffer test (`zp_*` port) and collects them per
level-1 block in the bit-mask cache (`bitmask_cache`, 64 entries by default).
Each entry holds:

* a tag: the level-1 block coordinates;
* a coverage mask with one bit per pixel of the block (64 bits);
* `tmpZ`: the farthest depth among the pixels that entered since the entry
  was started.

For each pixel the tags are searched in a single cycle; the cache is fully
associative.

* **Hit:** the pixel's mask bit is set and `tmpZ = max(tmpZ, z)`.
* **Miss:** the entry at the FIFO pointer is taken over. Whatever it had
  collected is dropped. It is restarted with this pixel and the pointer
  advances.
* **Full coverage:** when a mask becomes all ones, every pixel of the block
  has been overwritten since the entry started. `tmpZ` is then a safe new
  farthest depth for the block. The cache emits `(block, tmpZ)` one cycle
  later and zeroes the entry's mask and `tmpZ`; the entry keeps its tag.

Why this is safe: a pixel passes the Z test only if it is nearer than the
Z buffer, and the Z buffer is never farther than the HZ depth. So `tmpZ`
can only lower a block's HZ depth to a value that still covers every pixel
in it. A pixel overwritten twice in one entry's lifetime contributes its
older, farther depth, which errs on the safe side. A block that is never
fully covered within one entry's lifetime just keeps its older, farther
HZ depth.

`hz_update_unit` folds each `(block, tmpZ)` into the level-2 entry by a
read-modify-write through the entry codec, one per cycle:

* request cycle: the read is issued;
* next cycle: the write is issued; it lands at the end of that cycle.

A request that reads the entry being written by the request just ahead of
it takes the written value instead of the stale one (the *bypass*). The
whole path is short. If a `zp_*` pixel in cycle 0 completes a block, a test
read issued in cycle 3 sees the new depth.

Replacement is FIFO, and the cache is small. A triangle much wider than
64 level-1 blocks, rasterized row by row, evicts its own entries before any
block is complete, and those blocks then keep their old HZ depth. This is
safe but loses culling. The end-to-end test shows it: a full-screen
background quad of 1280 x 1024 spans 160 blocks per row and causes about
140 000 evictions.

## Bi-level compression

`hz_bilevel_codec` stores two depths per level-2 block instead of four. The
idea is that neighbouring blocks usually belong to the same one or two
surfaces. The reset entry is `HHZ = LHZ = far`, index `1111`. A new level-1
depth `newZ` for block `a` is folded in by these rules; `case_o` reports the
branch taken:

| branch | condition | effect |
|---|---|---|
| 0 first split | all four blocks in the HHZ group | `LHZ = newZ`, `Ma = 0` |
| 1 join HHZ | `|newZ-HHZ| < |newZ-LHZ|` | `Ma = 1`; if no other block is in the HHZ group, `HHZ = newZ` |
| 2 join LHZ | otherwise, some block still in HHZ | `Ma = 0`, `LHZ = max(newZ, LHZ)` |
| 3 collapse | otherwise, no block left in HHZ | `HHZ = LHZ = max(newZ, LHZ)`, index `1111` |

The depth each block represents never moves nearer than its true farthest
depth, except for the block being updated, which moves to `newZ`. The code
above is therefore lossy but safe. `HHZ >= LHZ` always holds, so `HHZ` is
the level-2 depth. These rules rely on `newZ` never being farther than the
depth the block already represents. The bit-mask cache guarantees that for
every update.

## Top-level interface (`hz_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `clear_i` / `busy_o` | in / out | 1 | frame clear: resets every entry to the far plane (one entry per cycle, 5120 cycles) and empties the cache; `busy_o` is high while it runs |
| `tri_valid_i` / `tri_ready_o` | in / out | 1 | triangle handshake; ready is low only while clearing |
| `tri_vx_i[3]`, `tri_vy_i[3]`, `tri_vz_i[3]` | in | 11, 10, 16 | screen-space vertices |
| `tri_id_i` / `tri_out_id_o` | in / out | 16 | tag carried with the triangle |
| `tri_out_valid_o`, `tri_out_pass_o` | out | 1 | verdict, 2 cycles after acceptance |
| `tri_rej_l2_o`, `tri_rej_l1_o`, `tri_straddle_o` | out | 1 | discarded at level 2, at level 1, or not inside one level-2 block |
| `pix_valid_i` / `pix_ready_o` | in / out | `PIX_LANES` / 1 | pixel group handshake, one valid bit per lane |
| `pix_x_i`, `pix_y_i`, `pix_z_i` | in | `PIX_LANES` x 11, 10, 16 | rasterized pixels |
| `pix_out_valid_o`, `pix_out_pass_o`, `pix_out_{x,y,z}_o` | out | `PIX_LANES` x ... | per-lane verdict with the pixel, 2 cycles later |
| `zp_valid_i`, `zp_x_i`, `zp_y_i`, `zp_z_i` | in | 1, 11, 10, 16 | a pixel that passed the Z-buffer test (no back-pressure) |
| `cache_hit_o`, `cache_miss_o`, `cache_evict_o`, `hz_write_o`, `bypass_o`, `enc_case_o` | out | 1, 2 | status pulses for counters |

The consumer drops items whose pass flag is low. Nothing downstream can
stall the tests: they have no back-pressure on their outputs.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `WIDTH`, `HEIGHT` | 1280, 1024 | screen size (multiples of the level-2 block) |
| `L1_SHIFT` | 3 | level-1 block is 2^L1_SHIFT pixels square; level-2 is twice that |
| `DW` | 8 | HZ depth accuracy |
| `ZW` | 16 | pipeline depth width (`DW <= ZW`) |
| `CACHE_BLOCKS` | 64 | bit-mask cache entries |
| `COMPRESS` | 1 | 1 = bi-level entries, 0 = uncompressed entries |
| `IDW` | 16 | triangle tag width |
| `PIX_LANES` | 1 | pixels tested per cycle by the pixel test |

The shared defaults live in `rtl/hz_pkg.sv`.

## Files

| file | contents |
|---|---|
| `rtl/hz_pkg.sv` | default constants and the entry-width function |
| `rtl/hz_top.sv` | top level: the two tests and the management unit |
| `rtl/hz_tri_test.sv` | triangle HZ test |
| `rtl/hz_pixel_test.sv` | pixel HZ test |
| `rtl/hz_management.sv` | HZ buffer, bit-mask cache and update unit with clear control |
| `rtl/bitmask_cache.sv` | bit-mask cache |
| `rtl/hz_update_unit.sv` | read-modify-write of entries with bypass |
| `rtl/hz_buffer.sv` | HZ-buffer memory, 3 read ports, 1 write port, sweep clear |
| `rtl/hz_raw_codec.sv` | uncompressed entry decode and update |
| `rtl/hz_bilevel_codec.sv` | bi-level entry decode and update |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the configuration sweep |
| `tb/hz_scene_runner.sv` | parameterised scene driver used by the sweep |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself.
Each one also has a watchdog.

* `tb_hz_raw_codec`, `tb_hz_bilevel_codec`: random and hand-worked
  entries. The bi-level test compares every update with a reference of the
  rules above. It also checks that represented depths stay safe over random
  update sequences, and that all four branches occur.
* `tb_hz_buffer`: clear length and contents, three read ports,
  read-before-write.
* `tb_bitmask_cache`: compared cycle by cycle with a reference model, over
  more blocks than the cache holds, so hits, misses, evictions and
  full-coverage updates all occur.
* `tb_hz_update_unit`: back-to-back updates of one entry must not be lost,
  and a bypass must occur.
* `tb_hz_tri_test`, `tb_hz_pixel_test`: verdicts and 2-cycle latency
  against values computed in the testbench. The pixel test runs with one
  lane and with four lanes. Four-lane groups mix pixels inside lane 0's
  level-2 block with pixels outside it, and the test checks that one read
  serves each group.
* `tb_hz_management`: exact entries after directed coverage, including the
  3-cycle visibility of an update. With random coverage it checks that the
  stored depths stay safe.
* `tb_hz_top` (end to end, all defaults, about 1.5 M cycles, about 1 s).
  The testbench rasterizes triangles, runs the Z-buffer test against a
  model and feeds the survivors back. It checks:
  * every discarded triangle or pixel is really hidden;
  * the final Z buffer equals an unculled rendering;
  * every HZ depth is at or beyond its block's farthest Z;
  * the triangle and pixel verdicts come 2 cycles after acceptance;
  * each mechanism occurs at least once: level-2 and level-1 triangle
    discards, straddling triangles, pixel discards, cache hit, miss and
    eviction, HZ writes, bypass, all four encoder branches, and the stall
    during a clear.
* `tb_hz_configs`: the same scene through eleven configurations at
  1280 x 1024:
  * block sizes 8x8-4x4 and 32x32-16x16;
  * the uncompressed format;
  * 6, 12 and 16-bit depths;
  * 16, 32 and 128-block caches;
  * a four-lane pixel test.

  In the four-lane run, pixels that pass the Z test wait in a queue for the
  one-pixel-per-cycle `zp_*` port. Each triangle waits until that queue has
  drained, as a Z-buffer stage running at one pixel per cycle would throttle
  it.

  It also checks the built buffer sizes against the table above. It takes
  about 1.5 min to compile and 10 s to run.

All of these pass. The scene is synthetic: 602 triangles and about
1.45 M pixels over two frames. The discard rates it prints depend on that
scene and say nothing about real workloads. Both scene testbenches also
print the share of Z-buffer reads avoided: the pixels of discarded
triangles plus the discarded pixels, over all rasterized pixels. At the
defaults it is 4.7 %. Almost all of it comes from the pixel test, because
the scene's discarded triangles are small.

| configuration | triangles discarded | pixels discarded | cache evictions |
|---|---|---|---|
| 16x16-8x8, bi-level, 32 / 128-block cache | 24.3 % / 20.4 % | 4.7 % | 156 k / 48 k |
| 16x16-8x8, uncompressed | 21.8 % | 4.6 % | 140 k |
| 16x16-8x8, 6 / 12 / 16-bit depth | 21.8 % / 19.9 % / 21.8 % | 4.6-4.7 % | 140 k |
| 16x16-8x8, 16-block cache | 7.6 % | 1.1 % | 169 k |
| 16x16-8x8, four pixel lanes | 20.6 % | 4.2 % | 140 k |
| 32x32-16x16 | 27.9 % | 4.5 % | 20 k |
| 8x8-4x4, bi-level / uncompressed | 12.8 % / 11.3 % | 4.8 % | 316 k |

The figures come from one run. Each configuration draws its own random
triangles, and the seed changes between runs. Triangle discards move by a
few percent from run to run, so small differences are noise. The 16-block
cache stands out. With it, evictions stop most blocks from completing, so
the HZ buffer is rarely lowered.

To run one test with plain Verilator:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv rtl/hz_pkg.sv tb/tb_hz_top.sv \
          --top-module tb_hz_top -o sim && ./obj_dir/sim
```

## Departures and choices

* **Triangle test compares the nearest vertex.** The published description
  tests the triangle's *farthest* vertex against the block depth. Taken
  literally, that would discard triangles with a visible front part. This
  implementation compares the nearest vertex, which is the safe comparison.
* **Index polarity in the bi-level format.** The published text gives two
  opposite meanings for the index bits. Here `1` = HHZ group, which agrees
  with the reset value `1111`.
* **Block containment** is judged on the vertex bounding box.
  **Off-screen** triangles and pixels pass untested; clipping is expected
  upstream.
* **Pixel lanes.** Testing several pixels per cycle is offered as a
  throughput option, and no lane count is given for this design (the 8 or 16
  pixels per cycle quoted for comparison belong to other hardware). The lane
  count is therefore a parameter with default 1. Grouping on lane 0's block,
  and passing other lanes untested, are this design's choices. The `zp_*`
  return port stays at one pixel per cycle.
* **Widths and timing are this design's own:** the 16-bit pipeline depth,
  truncation to the top `DW` bits, the valid/ready handshakes, the 2-cycle
  test latency, the three-read-port memory, the update bypass, and the
  5120-cycle sweep clear.
* **Fully associative single-cycle cache search.** With 64 entries this
  needs 64 parallel 15-bit tag comparators. It is the likely critical path,
  and a real implementation might pipeline it.
* **Not built:** the other pipeline stages (transform, culling, lighting,
  setup, rasterizer, texturing, Z-buffer test, color) and the external
  buffers. The testbench models the rasterizer, the Z-buffer test and the
  Z buffer.
