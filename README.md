# Specialised units for imaging and video: a Convolution Engine, H.264 motion-estimation helpers and a bilateral-grid engine

Image and video kernels do very little arithmetic per operation (8- to
16-bit adds, multiplies and absolute differences). On a general-purpose core
almost all of the energy goes into fetching instructions, reading register
files and moving data. The units here fix that by keeping the data close
to wide arrays of simple ALUs, in storage shaped like the algorithm's data
flow. One instruction then does tens to hundreds of operations.

The RTL contains three groups of hardware:

- **Convolution Engine (CE).** A programmable stencil datapath. Every
  kernel it runs is written as *map* (an operation on each pixel and
  coefficient pair) followed by *reduce* (combining the results of one
  stencil). Filters, SADs, differences and extrema all fit this form.
  Four CE slices sit behind two host instruction ports.
- **H.264 encoder units.** Fixed-function datapaths that a host core drives
  through wide custom instructions:
  - a 16x16 SAD array for integer motion estimation (IME);
  - a six-tap upsampler for fractional motion estimation (FME);
  - a coefficient LIFO for CABAC binarisation.
- **Bilateral-grid engine.** 16 lock-step 4-lane SIMD units that run the
  splat, blur and slice steps of a modified bilateral grid, behind a 1 KB
  multi-ported L0 cache.

`spec_top` places all of these side by side. The host processors, their
caches and main memory are not part of the RTL. Each unit exposes the
ports that a host or memory would drive.

## Convolution Engine

### Map, reduce and the stencil patterns

A slice (`ce_slice`) contains these parts:

| Part | Size |
|---|---|
| Map ALUs | 64 ALUs, 10 bits each |
| 1D shift register | 40 entries |
| 2D input shift register | 16 rows x 18 columns |
| Output register | 16 rows x 18 columns |
| Coefficient register | 16 x 16 |
| SIMD unit (works on output-register rows) | 16 lanes |

Register elements are 10 bits wide, which holds an 8-bit pixel and its
sign. The register sizes are set in `ce_pkg`.

A convolution step uses the interface unit (`ce_if_unit`). It is purely
combinational. It places one operand pair on each of the 64 lanes, using a
pattern chosen by the flow and the stencil size:

| Flow | Sizes | Lane `l` gets | Outputs per step |
|---|---|---|---|
| `CONV_HOR` | K = 4, 8, 16 | `r1[in_off + p + k]` and `coef[row][k]`, where `p = l / K` and `k = l % K` | 64 / K |
| `CONV_VER` | K = 4, 8, 16 | `r2[row_off + k][in_off + p]` and `coef[row][k]` | 64 / K |
| `CONV_2D` | 4x4 | `r2[row_off + r][in_off + p + c]` and `coef[r][c]` | 4 |
| `CONV_2D` | 8x8 | one 8x8 window | 1 |
| `CONV_2D` | 16x16 | one 4-row band (`band` operand), summed later with the SIMD unit | 1 partial |
| any, reduce = `NONE` | matrix | element-wise on 16 lanes | 16 |

After the interface unit, the data goes through these stages in turn:

1. **Map.** `ce_map_array` applies one operation to every lane: multiply,
   absolute difference, add, subtract, compare >, compare <, rounded
   average or pass.
2. **Reduce.** `ce_reduce_tree` combines groups of 4, 8, 16, 32 or 64 lanes
   with add, logical AND, logical OR, max or min.
3. **Normalise.** `ce_normalize` applies a rounding right shift, then
   clamps to 0..255 or to signed 10 bits.
4. **Write.** The results go to the output register or back into the 2D
   input register (`dest_in2d`). The second option lets a separable filter
   run its vertical pass without a trip through memory.

Each stencil also has a 16-bit mask that switches taps off. With the mask,
kernels that are not a power of two run on the nearest pattern: a 15-tap
blur on the 16 pattern, a 6-tap half-pixel filter on the 8 pattern, a 3x3
extremum on the 4x4 pattern. A masked lane adds the identity of its
reduction.

### Instructions and timing

A host core sends one `ce_instr_t` per command using a valid/ready
handshake (`ce_pkg` holds the format). The opcodes are:

| Opcode | What it does |
|---|---|
| `SET_OPS` | Sets the map and reduce operations. |
| `SET_SIZE` | Sets the stencil size, the mask, the normalise shift and the 8-bit clamp. |
| `LD_COEFF` | Loads one coefficient row. |
| `LD_1D` | Loads the 1D register, optionally shifting it left first. |
| `LD_2D` | Loads the top row of the 2D register, optionally shifting the rows down first. `ilv` splits even and odd pixels into two rows. |
| `ST_OUT` | Stores the top row of the output register. |
| `CONV_HOR`, `CONV_VER`, `CONV_2D` | One convolution step. |
| `SIMD` | One SIMD operation on output-register rows: add, subtract, add or subtract a constant, max, min, threshold or move. |

The host computes every address and passes it in the instruction.

Timing of the controller (`ce_ctrl`):

- **Configuration, convolution and SIMD** are accepted back to back, one
  per cycle. Results are written at the clock edge.
- **Loads and stores** go through `ce_lsu` and hold off the next
  instruction until they finish.

Memory accesses are 32, 64, 128 or 256 bits at any byte address. An
access that crosses a 32-byte line becomes two line transactions. The
memory port uses request/grant, and read data returns with `rvalid` some
cycles later. With a memory that never waits, access times are:

| Access | Cycles (one line) | Cycles (crossing a line) |
|---|---|---|
| Load | 2 | 4 |
| Store | 1 | 2 |

A 15-tap filter loop uses these steps:

1. `SET_OPS MUL, ADD`.
2. `SET_SIZE 16, mask 0x7FFF, norm s, clamp`.
3. One `LD_COEFF`.
4. Repeat: `LD_1D` with shift, then 4 x `CONV_HOR` with `in_off` 0, 4, 8
   and 12 and result column 0, 4, 8 and 12, then `ST_OUT`.

### Multiprocessor

`ce_cmp` connects two host ports to four slices. Each host port names a
target slice with every command. When both hosts address the same slice,
that slice alternates between them (round robin). Each slice has its own
memory port.

## H.264 units

### IME SAD array (`ime_sad_unit`)

- **Storage.** 16 rows of reference pixels. Each row is two 16-pixel
  registers:
  - the compare register, which feeds the 256 absolute-difference units;
  - a staging register behind it.
- **Loads.** 128-bit loads fill either register.
- **Horizontal shift** (`ref_hshift`). Moves every row one pixel toward the
  array, so the next search position reuses 15 of the 16 columns.
- **Vertical step.** A load with `ref_vshift` moves all rows down one and
  puts the new row on top.
- **Output.** `sad_en` registers the SAD of the present window. One cycle
  later `sad_valid` rises, with the 16x16 total and the sixteen 4x4
  sub-block SADs. Larger H.264 partitions are sums of the 4x4 values.

### FME upsampler (`fme_upsampler`)

- **Row filters.** Each input row holds ten integer pixels. Five row
  filters apply the H.264 six-tap filter (1, -5, 20, 20, -5, 1).
- **Column storage.** The unrounded row results and the matching integer
  pixels are shifted into six-deep column registers.
- **Outputs.** Once six rows are held (`out_valid`), column filters give the
  vertical half-pixels and the centre half-pixels, and the row results
  give the horizontal half-pixels. All are rounded and clipped.
- **Throughput.** One new row per cycle.
- **Quarter pixels.** These are averages, left to the CE's `AVG` map
  operation.

### CABAC coefficient LIFO (`cabac_lifo`)

- **Storage.** 16 coefficients, pushed in scan order and popped in reverse.
- **Zero flag.** Each entry carries a flag that marks zero values, so the
  binariser tests for zero without a compare.
- **Non-zero count.** A running count of non-zero entries is also output.

## Bilateral-grid engine

The modified bilateral grid works on (r, g, b, w) values stored in small
hash tables. It maps naturally onto 4-lane SIMD. Parallelism comes from
processing 16 pixels at once. Each pixel touches different table entries,
so every unit needs its own address registers and its own memory port.

`bg_simd_array` has 16 units. Each unit has:

- 8 vector registers of four 16-bit lanes;
- 4 address registers;
- a condition flag.

All units execute one broadcast instruction stream (`bg_pkg`):

| Instructions | What they do |
|---|---|
| `VADD`, `VSUB` | Lane add and subtract. |
| `VMUL` | Lane multiply with a right shift. |
| `VADDI` | Add a constant to every lane. |
| `CMPLT` | Sets the flag. |
| `AADDI` | Address plus a constant. |
| `AADDV` | Address plus a data value shifted left, which turns a hash into an address. |
| `AUID` | Address plus the unit index shifted left, which gives each unit its own base. |
| `LD`, `ST` | 32-bit load and store of half a vector. |

Any instruction can run only on units whose flag is set, or only on units
whose flag is clear. A short branch therefore runs both paths, and each
unit keeps one result.

`bg_l0_cache` has these properties:

- 1 KB, direct mapped, 32-byte lines, write-back, 16 ports.
- **All hits.** If every requesting port hits, all accesses finish in that
  cycle.
- **Any miss.** `stall` rises and the array holds the instruction. Misses
  are served one line at a time, lowest port first: a dirty victim is
  written back, then the line is fetched from L1.
- **Hits during a stall.** A port that hits while others wait completes at
  once, and its read data is kept. This also keeps two ports that map to
  the same line with different tags from evicting each other forever.

`hit_count` and `miss_count` let software measure the hit rate.

## What is not here, and where the RTL makes its own choices

Missing:

- **Slice concatenation.** Joining neighbouring slices into one wider
  engine, with 128 ALUs and a 16x32 register, is not built. Slices work
  only independently. As a result, the 16x32-register form of the IME
  mapping has no single-slice equivalent.
- **Symmetric-kernel folding.** The interface units do not add symmetric
  taps before multiplying. Results are the same; only energy differs.
- **CABAC arithmetic encoder.** Its pipeline is not built.
- **Bilateral engine extras.** The fused hash-and-lookup instruction and
  the serial execution of one unit after a hash-table miss are not built.
- **Hosts and memory system.** The RISC hosts, their instruction decode,
  the caches and DRAM are not built.
- **Other fixed-function blocks.** The motion-vector cost and Hadamard
  blocks used beside the CE in an H.264 encoder are not built.

Design choices not fixed by the architecture:

- the instruction encodings;
- handshakes and latencies;
- the 16-result matrix mode;
- the 4-row bands for 16x16 stencils;
- the six-tap coefficients and rounding, which are the H.264 standard's;
- the SIMD and bilateral operation lists;
- the cache organisation.

Range limit: exact 4x4 SADs of 8-bit pixels reach 4080 and do not fit a
10-bit output element. Use a normalise shift, or the dedicated
`ime_sad_unit`.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb_spec_top`
runs the whole design at its default sizes:

- filters, SADs, an interleaved load and the 2D-register path on the CE;
- contention between the two host ports;
- IME shifts, FME rows and the LIFO;
- a bilateral program with conditional paths, L0 misses and dirty
  write-backs.

It counts each of these mechanisms and fails if one never occurred.

`tb_ce_workloads` runs the remaining kernels on one slice:

- the six-tap FME half-pixel filter on the masked 8-tap pattern;
- quarter-pixel averaging as a matrix operation;
- 9-tap and 13-tap Gaussian blurs on the masked 16-tap pattern.

`tb_ce_slice` covers a 15-tap filter, 4x4 and 16x16 SADs, a separable
filter through the 2D register, a difference of images, a 3x3 extremum
test and the interleaved load.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
  rtl/ce_pkg.sv rtl/bg_pkg.sv tb/tb_spec_top.sv --top-module tb_spec_top
./obj_dir/Vtb_spec_top
```

Replace `tb_spec_top` with any other testbench name to run it. The
behavioural line memory `tb/tb_mem_model.sv` stands in for the caches and
can insert random grant delays.
