# CDFT: a combined 2-D DFT / inverse DFT accelerator for correlation-filter tracking

A Kernelized Correlation Filter (KCF) tracker spends most of its time in small
two-dimensional Fourier transforms. It runs a forward DFT on every feature
channel it extracts, and an inverse DFT after each correlation. In the
multiscale tracker this design targets, one video frame needs 379 transforms:
252 forward and 127 inverse. The rest of the tracker is irregular code that
runs well on a processor.

This RTL is the accelerator for that split. It is one programmable-logic block
that does a 2-D DFT or a 2-D IDFT on demand. It has its own input and output
buffers and an AXI4-Lite slave port. The processor copies a patch in, picks
the mode, sets *start*, waits for *done* and copies the result out. Everything
else in the tracker (features, kernel correlation, training, detection) stays
in software and is not part of this RTL.

The engine does not use an FFT. The transforms are small, so it evaluates the
definition directly. It takes sine and cosine values from a precomputed
table, uses fixed-point arithmetic, and computes every product of one output
point in the same clock cycle. At the default size of 32 × 32 this gives one
output point per cycle: a whole transform takes 1024 + 5 cycles between
*start* and *done*.

## The transform the hardware computes

For an M × N array (index `i = x*N + y` for samples, `i = u*N + v` for
frequencies):

    DFT : F(u,v) =           Σx Σy  f(x,y) · e^(−j·2π(ux/M + vy/N))
    IDFT: f(x,y) = 1/(M·N) · Σu Σv  F(u,v) · e^(+j·2π(ux/M + vy/N))

Both are the same double sum with the roles of the two index pairs swapped.
Only the sign of the exponent and the final scale differ. So one datapath
serves both directions, and a mode bit selects the sign and the 1/(M·N) scale.

**Real-input shortcut.** In DFT mode the input is taken as real: the
imaginary input words are never read, and the product terms that would use
them are forced to zero. A tracker only ever forward-transforms real feature
maps. The IDFT uses the full complex product. Don't use DFT mode on complex
data: the imaginary part will be silently ignored.

**Twiddle table folding.** The angle of a term is `2π(ux/M + vy/N)`. Both
fractions wrap, so the angle depends only on `a = (u·x) mod M` and
`b = (v·y) mod N`. `cdft_twiddle_rom` therefore holds M·N entries indexed by
`(a, b)`. Each entry holds `cos` and `sin` of `2π(a/M + b/N)`, rounded to
18-bit signed values with 16 fraction bits (so ±1.0 is exact). A table
indexed directly by `(u, v, x, y)` would hold the same values in (M·N)²
entries. The table is computed at elaboration time with `$cos`/`$sin`, so no
data file is needed. Each lane gets its own copy: one read port per product
computed in a cycle.

## The engine pipeline (`cdft_core`)

`LANES` input samples are processed per cycle. The M·N samples fall into
`CH = M·N / LANES` chunks. `cdft_ctrl` walks a single flattened loop with one
step per clock (initiation interval 1). The order is `u` outermost, then `v`,
then chunk `c`, so the chunks of one output point follow each other directly.

| stage | what happens |
|---|---|
| S0 | `cdft_ctrl` issues `(u, v, c)`. The input buffer reads chunk `c` (all banks at once). Lane `l` handles sample `s = c·LANES + l`, with `x = s / N` and `y = s mod N`. It computes `(a, b)` and reads its twiddle. |
| S1 | Each `cdft_cmac` lane multiplies its sample by its twiddle. There are four 51-bit products; in DFT mode two of them are zero. |
| S2 | `cdft_accum` adds the LANES lane products. |
| S3 | The sum is added to the running sum of the point (restarted on the first chunk). On the last chunk the result is scaled, rounded and saturated. |
| S4 | The point is written to the output buffer at `u·N + v`. |

`done` pulses one cycle after the last write, which makes a run last
`M·N·CH + 5` cycles from the cycle *start* is seen. The default `LANES = M·N`
fully unrolls the inner double sum (CH = 1). This is the fastest setting and
costs M·N lanes of four multipliers each. A smaller `LANES` that divides M·N
trades speed for area, and the results are identical.

Every lane recomputes its `(a, b)` from its `(u, x)` and `(v, y)` each cycle
with small multiplies and constant modulos. When `LANES = M·N`, `x` and `y`
are constants per lane, and synthesis reduces this logic a great deal.

## Number formats and accuracy

| quantity | format |
|---|---|
| input / output sample | separate 32-bit real and 32-bit imaginary words, signed 16.16 |
| twiddle | 18-bit signed, 16 fraction bits |
| lane product | 51 bits, no rounding |
| accumulator | 51 + log2(M·N) + 1 bits, no rounding |
| IDFT scale | × round(2^30 / (M·N)), exact when M·N is a power of two |
| output | rounded half-up, saturated to the 32-bit range |

The only rounding inside a sum is twiddle quantization, at most 2^-17 per
value. For a forward transform the error is therefore at most about
`2 · M·N · max|f| · 2^-17`, plus half an output LSB. For the inverse it is
`M·N` times smaller. The testbenches use exactly these bounds.

**Range.** A forward transform grows by up to a factor of M·N at the DC
term. The largest 16.16 value is about 32767. So a 32 × 32 DFT stays exact
only while the input magnitudes are below 32. Windowed, normalized tracker
features satisfy this; raw 0–255 pixels would saturate the DC term. Check this
before feeding other data. To trade range for resolution, change
`DATA_FRAC`-style constants in `cdft_pkg` and the scale shifts in
`cdft_accum`.

## Buffers and who owns them

`cdft_in_buf` holds the input as LANES single-port banks: sample `i` is
stored in bank `i mod LANES`, at word `i / LANES`. This lets the engine read
a whole chunk in one cycle. With `LANES = M·N` each bank is a single
register. `cdft_out_buf` is a pair of single-port RAMs of M·N words.

The ports are single, and they are shared in time. While the engine is busy
it owns every bank, and processor accesses are refused. Otherwise the
processor owns them. Dual-port buffers would allow overlapping transfers with
computation, but they cost considerably more memory; this design keeps single
ports.

## Programming model (`cdft_axil`)

The port is AXI4-Lite: 32-bit words, byte addresses, 20 address bits, one
transaction at a time.

| address | name | access |
|---|---|---|
| `0x0_0000` | CTRL | write bit0 = 1: start (ignored while busy). Read: bit0 busy, bit1 done (sticky, cleared by reading CTRL or by the next start), bit2 idle |
| `0x0_0004` | MODE | bit0: 0 = DFT, 1 = IDFT |
| `0x0_0008` | SIZE | read only: M in bits 15:0, N in bits 31:16 |
| `0x1_0000 + 4i` | input, real part of sample i | read/write |
| `0x2_0000 + 4i` | input, imaginary part | read/write (not needed for a DFT) |
| `0x3_0000 + 4i` | output, real part of point i | read only |
| `0x4_0000 + 4i` | output, imaginary part | read only |

A buffer access while busy, a write to the output, an index of M·N or above,
or an unmapped address completes with SLVERR and has no effect. `wstrb` is
ignored: writes are whole words.

One transform, as a driver does it:

1. Write the M·N input words (the real parts only, for a DFT).
2. Write MODE.
3. Write 1 to CTRL.
4. Poll CTRL until bit1 is set, or wait for the `done_irq` pulse.
5. Read the M·N result words.

In the tracker, an IDFT always follows two DFTs. The results of one call can
be written straight back as the input of the next.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `M`, `N` | 32, 32 | all | transform size; at most 16384 samples (the address map) |
| `LANES` | `M*N` | `cdft_top`, `cdft_core` | products per cycle; must divide M·N |
| `ADDR_W` | 20 | `cdft_top`, `cdft_axil` | AXI address width |
| `DATA_W`, `DATA_FRAC`, `COEF_W`, `COEF_FRAC` | 32, 16, 18, 16 | `cdft_pkg` | sample and twiddle formats |

## Files

`rtl/`:

- `cdft_pkg`: shared types (`cplx_t`, `twiddle_t`, `mode_e`, `host_req_t`) and widths.
- `cdft_top`: the accelerator.
- `cdft_axil`: the AXI4-Lite slave.
- `cdft_in_buf`, `cdft_out_buf`: the two buffers.
- `cdft_sp_ram`: a single-port RAM.
- `cdft_core`: the engine, built from:
  - `cdft_ctrl`: the sequencer;
  - `cdft_twiddle_rom`: the twiddle table;
  - `cdft_cmac`: one lane;
  - `cdft_accum`: reduction, accumulation and scaling.

`tb/`:

- One self-checking testbench per module, `tb_<module>.sv`.
- `tb_cdft_top_full.sv`: the end-to-end test at the default size.
- `tb_cdft_ref_pkg.sv`: a double-precision DFT/IDFT reference that shares
  nothing with the RTL.
- `tb_axil_master.svh`: the bus-master tasks.

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself
through a watchdog if it hangs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      --top-module tb_cdft_top -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/cdft_pkg.sv tb/tb_cdft_ref_pkg.sv tb/tb_cdft_top.sv
    ./obj_dir/Vtb_cdft_top

Replace `tb_cdft_top` with any other testbench name. What each top-level test
covers:

- `tb_cdft_top` (4 × 8, 8 lanes, so 4 chunks per point):
  - DFT and IDFT against the reference, and the round trip back to the image;
  - garbage in the imaginary input during a DFT;
  - a refused buffer write and an ignored second start during every run;
  - the sticky done flag;
  - a saturating DC term;
  - the engine time of `M·N·CH + 5` cycles.

  It counts each of these mechanisms and fails if one never happened.
- `tb_cdft_top_full` does the same at the defaults (32 × 32, fully unrolled).
  Verilator takes about a minute to build it; it runs in about a second.
- `tb_cdft_core` runs a 4-lane engine and a fully unrolled engine side by
  side, on the same data.

## How far to trust it

All testbenches pass, and each one fails against a deliberately broken copy
of its module. The numerical checks compare against an independent
floating-point DFT within the error bound above.

What is not tested:

- timing closure, or any FPGA implementation;
- resource use at the default size. Full unrolling at 32 × 32 means 1024
  lanes of four 32 × 18 multipliers. On a large UltraScale+ device that is
  comparable to the DSP budget, but it has not been synthesized here.

## Where this departs from, or adds to, the design it implements

- **Transform size.** The size of the original accelerator is not stated.
  32 × 32 is chosen because the tracker's patches were padded to 32 points
  for the FFT comparison. The original reports 857 cycles for its own size,
  with an initiation interval of 1. This design takes 1029 cycles at
  32 × 32.
- **Twiddle table.** The original stores the table as a
  four-index array. Here it is folded to M·N entries as described above, and
  held in fixed point rather than floating point, like the rest of the
  fixed-point datapath.
- **Kernel signs.** The signs follow the textbook definition of the DFT.
- **Buffer ports.** The original describes its internal arrays as
  dual-ported, but also reports that a dual-port buffer variant did not fit
  the device. This design uses single-port, time-shared buffers.
- **This design's own choices:**
  - the numeric format beyond "32 bits per real/imaginary word"
    (16.16 samples, 18-bit twiddles, rounding and saturation);
  - the IDFT reciprocal constant;
  - the lane organisation and the `LANES` parameter;
  - the pipeline depth;
  - the register and address map, the SLVERR rules and `done_irq`;
  - synchronous active-low reset.
- **Outside the RTL:**
  - the processor system (Linux, the driver, the `memcpy` transfers, the
    tracker);
  - the vendor AXI interconnect: the top's AXI4-Lite port is where it would
    connect;
  - the on-chip GPU, which the design leaves unused.
