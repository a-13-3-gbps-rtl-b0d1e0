# 9/7M integer wavelet transform at two samples per clock

This is a streaming, three-level, two-dimensional 9/7M integer discrete
wavelet transform (the reversible "integer 9/7" of the CCSDS 122.0-B-1 image
compression recommendation). It is built to keep up with fast image sensors.
Pixels arrive in raster order, two per clock cycle. Ten sub-band streams leave
the design as soon as their coefficients can be computed: LL3, HL3, LH3, HH3,
HL2, LH2, HH2, HL1, LH1 and HH1. No frame buffer is used. The only large storage is
eight row memories per vertical filter, so the memory grows with the maximum
image width but not with the image height. Frames of any height and endless
push-broom strips therefore run on the same hardware.

Main figures at the default configuration (`MAX_WIDTH = 4096`, 16-bit
pixels, 20-bit coefficients):

| image       | cycles (always-valid source, always-ready sinks) | samples/cycle |
|-------------|--------------------------------------------------|---------------|
| 288 x 248   | 37,293                                           | 1.915         |
| 512 x 512   | 133,965                                          | 1.957         |
| 1024 x 1024 | 529,997                                          | 1.978         |
| 2048 x 2048 | 2,108,493                                        | 1.989         |
| 4096 x 4096 | 8,411,213                                        | 1.995         |

Every number in the table comes from simulation, and every coefficient was
checked against a reference model.

## The arithmetic

One lifting step turns a line `x_0 .. x_{2N-1}` into N high-pass values D and
N low-pass values C:

```
D_j = x_{2j+1} - ((9*(x_{2j} + x_{2j+2}) - (x_{2j-2} + x_{2j+4}) + 8) >>> 4)
C_j = x_{2j}   - ((2 - (D_{j-1} + D_j)) >>> 2)
```

The shifts are arithmetic shifts, so every division rounds toward minus
infinity. The ends of the line use symmetric extension: `x_{-2} = x_2`,
`x_{2N} = x_{2N-2}`, `x_{2N+2} = x_{2N-4}`, and `D_{-1} = D_0`. The
transform is applied to rows first and then to columns. Each level works on
the LL band of the level before it.

One block, `dwt_pipeline`, does all of this arithmetic for every filter in the
design. It needs no multipliers: `9*b` is computed as `(b << 3) + b`. Its
input is the 5-tuple `(x_{2j-2}, x_{2j}, x_{2j+1}, x_{2j+2}, x_{2j+4})`. It
has eight compute stages (sums, times 9, difference, round and shift, D,
D plus previous D, second round and shift, C), so the results appear 8 cycles
after a tuple is accepted. Inside, the sums are 26 bits wide; the results are
cut back to 20 bits.

`D_{j-1}` is the one value that depends on the direction:

* In a horizontal filter, the previous D is the one computed one cycle
  earlier. The delay is a single register (`DEPTH = 1`).
* In a vertical filter, the previous D belongs to the same column one output
  row earlier. The delay is a row-length memory (`DEPTH` = row length). The
  memory wraps at the `eol` flag, so rows shorter than `DEPTH` work too.

A `left_mirror` bit travels with the tuples of `C_0`. When it is set, the
stage-5 multiplexer takes `D_0` in place of the delayed value.

## Feeders: building tuples and mirroring the edges

Most of the design's difficulty is in the two feeders. A feeder turns a
stream into 5-tuples and makes the boundary extension happen without
stopping the pipeline for longer than it must.

**Horizontal feeder (`h_feeder`).** It takes one `(x_even, x_odd)` pair per
cycle and keeps the last pairs in registers. One tuple leaves per pair after
the first two pairs of a row.

* Start of a row: while the third pair loads, the `x_{-2}` register is loaded
  from `x_2` in place of the older sample. That tuple is marked
  `left_mirror`.
* End of a row: two flush cycles follow, with no input taken. The registers
  are recirculated so that `x_{2N}` and `x_{2N+2}` take their mirrored
  values.

A row of N pairs therefore costs N + 2 cycles. The second flush cycle carries
`eol`, and it carries `eos` when the row was the last one.

**Vertical feeder (`v_feeder`).** It takes one coefficient per cycle in
raster order. Seven row FIFOs, `F0`..`F6`, are chained so that each one
delays its input by exactly one row.

* Each step writes the same column into all seven FIFOs and reads what each
  one held for that column one row earlier. The FIFO outputs therefore show
  the six previous rows.
* On every odd row from the fifth on, taps `F0, F2, F3, F4, F6` are the
  tuple `x_{2j+4}, x_{2j+2}, x_{2j+1}, x_{2j}, x_{2j-2}` of one column.
* Top edge: while row 4 is written, `F6` is loaded from `F1` (row 2) instead
  of `F5`. The first output row thus uses `x_{-2} = x_2`, and all its tuples
  carry `left_mirror`.
* Bottom edge: after the row marked `eos`, the feeder runs four more rows
  without input.
  * The first writes `F1` into `F0` (`x_{2N} = x_{2N-2}`).
  * The third writes `F5` into `F0` (`x_{2N+2} = x_{2N-4}`).
  * The second and fourth emit the last two output rows.

A frame of 2N rows of width w takes `(2N + 4) * w` cycles. The row length is
learned from `eol` at run time, up to the FIFO depth.

The row FIFOs (`row_fifo`) are written as plain arrays with a single pointer.
The pointer wraps at the end of each row. Each location is read and then
written in the same cycle, so a synthesis tool can map the array to block RAM
or to distributed RAM.

## Elastic control

Every stage-to-stage link is a valid/ready stream; data moves on a clock edge
when both signals are high. Each sub-unit has its own controller, and no
global controller exists.

* `elb` is a two-slot elastic buffer. It takes one beat per cycle even when
  its consumer stalls for a cycle, so links run at full rate while each
  `ready` path stays local.
* `dwt_pipeline` stalls as a whole when its output is blocked. Its C and D
  results go to two consumers through an eager fork: each stream follows the
  handshake rules by itself, and a result retires once both have taken it.
* `gearbox_fifo` joins the levels. Each 2D level sends out its LL band one
  coefficient per cycle. The next level's horizontal filter takes two per
  cycle. The gearbox packs two coefficients into one pair and buffers a few
  pairs. The pair takes its `eol` and `eos` flags from its odd sample.

The elastic links make the design insensitive to latency: a source or a sink
may pause at any cycle, and the results do not change. The self-checking
testbenches insert random stalls on both sides to confirm this.

## Structure

```
dwt97m_top
 ├─ eol_eos_wrapper       generates eol/eos from cfg_width/cfg_height (optional)
 └─ dwt97m_3level
     ├─ level 1: dwt2d_unit (DEPTH = MAX_WIDTH/2)
     │    ├─ hdwt_unit:  elb → h_feeder → elb → dwt_pipeline (DEPTH 1)  → L, H
     │    ├─ vdwt_unit on L: elb → v_feeder → elb → dwt_pipeline(DEPTH) → LL1, LH1
     │    └─ vdwt_unit on H: elb → v_feeder → elb → dwt_pipeline(DEPTH) → HL1, HH1
     ├─ gearbox_fifo (LL1, 1 → 2 per cycle)
     ├─ level 2: dwt2d_unit (DEPTH = MAX_WIDTH/4) ...
     ├─ gearbox_fifo (LL2)
     └─ level 3: dwt2d_unit (DEPTH = MAX_WIDTH/8) → LL3, HL3, LH3, HH3
```

Shared types and constants are in `dwt97m_pkg`: pixel and coefficient widths,
the stream structs, and the `subband_e` enumeration that indexes the ten
output streams.

### Ports of `dwt97m_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `cfg_gen_flags` | in | 1 | 1: generate `eol`/`eos` from `cfg_width`/`cfg_height`; 0: take `s_eol`/`s_eos` |
| `cfg_width`, `cfg_height` | in | 16 | image size in pixels, used only when `cfg_gen_flags` is set |
| `s_valid`, `s_ready` | in/out | 1 | input handshake, one pixel pair per transfer |
| `s_x_even`, `s_x_odd` | in | 16 | two horizontally adjacent pixels; even column first |
| `s_eol`, `s_eos` | in | 1 | last pair of a row / of the frame |
| `m_valid`, `m_ready` | out/in | 10 | one handshake per sub-band, indexed by `subband_e` |
| `m_data` | out | 10 x 20 | signed coefficients |
| `m_eol`, `m_eos` | out | 10 | last coefficient of a sub-band row / of the sub-band |

Parameters:

* `MAX_WIDTH` (default 4096) is the widest image the design accepts.
* `PIX_SIGNED` (default 0) chooses how the 16-bit pixels are widened:
  zero-extended or sign-extended.

## Cycle count and latency

With a source that is always valid and sinks that are always ready, a
W x H frame takes this many cycles, from the first accepted pair to the last
output coefficient:

```
W*H/2 + 2*H + 4*(W/2 + W/4 + W/8) + 4 + 73  =  W*H/2 + 2*H + 3.5*W + 77
```

* `W*H/2`: the pixels enter two per cycle.
* `2*H`: two mirroring cycles per row in the first horizontal filter.
* `4*(W/2 + W/4 + W/8)`: four extra rows per column in each vertical filter.
* `4`: the flush cycles of the horizontal filters in levels 2 and 3.
* `73`: the fill latency of the whole chain of pipelines, elastic buffers and
  gearboxes.

A published analysis of this architecture counts the same mirroring terms
with a fill latency of 79 cycles, so its formula ends in 83 instead of 77.
Against the published cycle counts, this design needs 6 cycles fewer at
512 x 512 and 73 cycles more at 1024 x 1024 and above; the samples per
cycle agree within 0.001. The eight compute stages per pipeline are fixed by the
architecture; the latency of the buffers and gearboxes around them is this
design's own.

## Memory

The vertical filters of level k+1 work on rows of `MAX_WIDTH/2^(k+1)`
coefficients. Each vertical unit holds eight row memories of that depth:
seven FIFOs in its feeder and the one-row `D_{j-1}` delay in its pipeline.
With two vertical units per level, the total is
`2 * 8 * 20 * (2048 + 1024 + 512) = 1,146,880` bits, which is
`280 * MAX_WIDTH`. The horizontal filters, elastic buffers and gearboxes add
only a few thousand register bits. No memory depends on the image height.

## Where this design differs from the published architecture

* The row FIFOs hold one row of their own level: `MAX_WIDTH/2` coefficients
  in level 1, `/4` in level 2, `/8` in level 3. One description of the
  architecture states a depth of `width/2^k`. That would make the level-1
  FIFOs a full image row deep, twice the `280 * width` memory budget given
  for the same design. The depths here follow the per-level sizing and the
  memory budget.
* The EOL/EOS wrapper in the top, and the run-time choice between generated
  and supplied flags, are this design's own take on a wrapper the
  architecture only mentions.
* The fill latency is 73 cycles rather than 79 (see Cycle count).
* Pixels are treated as unsigned unless `PIX_SIGNED` is set. Coefficients are
  20-bit two's complement everywhere, as the architecture specifies.

## Limits

* Width and height must be multiples of 8, so that every level sees rows and
  columns of even length.
* Width and height must each be at least 24, so that level 3 still gets six
  rows and six columns.
* The width may be at most `MAX_WIDTH`. Shorter rows work without any change
  to the hardware.
* There is no check for frames that break these rules. Such a frame produces
  wrong coefficients.
* The bit-plane encoder and the segment buffer that would follow the
  transform in a complete compressor are not part of this design.

## Simulating

Every testbench is self-checking and needs only Verilator 5. The testbench
packages and helper modules are in `tb/`. Example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dwt97m_pkg.sv tb/dwt97m_ref_pkg.sv tb/dwt97m_top_tb.sv \
    --top-module dwt97m_top_tb
./obj_dir/Vdwt97m_top_tb
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<n>`.

* `dwt97m_ref_pkg` is the reference model. It is an independent
  line-by-line software version of the lifting step and of the three-level
  decomposition, written with SystemVerilog queues and wrapping to 20 bits
  like the hardware.
* Block testbenches `elb_tb`, `row_fifo_tb`, `dwt_pipeline_tb`, `h_feeder_tb`,
  `v_feeder_tb`, `hdwt_unit_tb`, `vdwt_unit_tb`, `dwt2d_unit_tb`,
  `gearbox_fifo_tb`, `eol_eos_wrapper_tb` and `dwt97m_3level_tb` check one
  unit each. They use random data and random stalls. They also check rates
  and latencies: 8 cycles through the pipeline, N + 2 cycles per horizontal
  row, and `(2N + 4) * w` cycles per vertical frame.
* `dwt97m_top_tb` runs the whole design at `MAX_WIDTH = 64`. It counts each
  mechanism and fails if any of them never happened: back-pressure from the
  sinks, source stalls, left and right mirroring in both feeders, gearbox
  packing, end of frame on all ten sub-bands, and both flag modes. It also
  checks the cycle-count formula.
* `dwt97m_workloads_tb` uses the default parameters and runs four frames.
  The first is a 288 x 248 full-scale checkerboard. The others are random
  512², 1024² and 2048² images. Every coefficient and every cycle count is
  checked.
* `dwt97m_top_full_tb` uses the default parameters and runs a random
  4096 x 4096 frame. It checks all 16.7 M coefficients and the cycle count
  8,411,213. With Verilator it runs in under half a minute.
