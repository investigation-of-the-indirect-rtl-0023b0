# Indirect-hypercube FFT arrays (radix-2 and radix-4)

This is synthesizable SystemVerilog for two SIMD FFT processors. Each one is a
single physical stage of an *indirect hypercube*: P processor blocks (PBs)
joined by a fixed perfect-shuffle network. Each block holds N/P of the signals,
and the same shuffle is used after every FFT stage. So one stage of hardware,
used log_G N times, computes an N-point transform. Every block reads and writes
every clock, and no memory conflict is possible.

`rtl/hc_top.sv` places the two arrays side by side, each with its own ports:

| array | radix G | hypercube class | blocks P | points N | PE | memories per block | transform time |
|---|---|---|---|---|---|---|---|
| `u_radix2` | 2 | 1 | 4 | 256 | butterfly, 7-clock loop | 2 dual-port RAMs | 304 clocks |
| `u_radix4` | 4 | 2 | 4 | 256 | dragonfly, 8-clock loop | 2 quad-port RAMs (each built from 4 dual-port RAMs) | 92 clocks |

Both arrays compute a complex forward or inverse DFT on 16-bit fixed-point
data, with block floating point. The transform time follows

    L = log_G N * (N/(P*G) + K - 1) clocks,   K = 7 (radix 2) or 8 (radix 4)

and the testbenches check it to the clock.

## Identifiers: why one stage suffices

Each of the N signals of a decimation-in-time FFT carries an n-bit identifier
(N = 2^n). The identifier is split as

    id = { LI , q }     q  = low p bits  (P = 2^p): the processor block that holds the signal
                        LI = high n-p bits: its address (local identifier) inside that block

A radix-G operation (G = 2^g) takes the G signals whose identifiers differ only
in their top g bits. Those signals have the same q, so they are already in the
same block: with LI = {d, j}, block q reads the G words at addresses {d, j},
d = 0..G-1, for one operation j. The G results get the identifier rotated left
by g bits, with the output number o in the low g bits:

    id' = { j, q, o }   ->   new block r = (q*G + o) mod P,
                             new address {j, w} with w = (q*G + o) div P

`shuffle_net` implements exactly this wiring. It is the same in every stage, so
the stage-to-stage data movement is one fixed network (a rank-g perfect
shuffle). Each block sends to min(P, G) blocks and receives from min(P, G)
blocks. For a fixed j, all P*G results of the P blocks go to distinct
(block, w) pairs. So each block receives exactly one word per write port per
clock, and writes them to addresses {j, w} that differ only in w.

After log_G N stages the rotation has reversed the digit order: the spectrum
lies in the memories in bit-reversed order. The unload phase reads the
memories in bit-reversed address order, so `out_data` leaves in natural order
k = 0..N-1, with k also shown on `out_idx`.

### Ping-pong memories

The PE is pipelined, and results of operation j come back K-1 clocks after its
read. Each block therefore has two banks: one is read as the source of the
current stage, and the other is written with the results arriving from the
shuffle. They swap roles every stage. Load writes bank 0. The final stage
leaves the spectrum in bank (number of stages mod 2).

### Quad-port memory from four dual-port memories (radix 4)

In a radix-4 block, one operation reads 4 words that differ in the top two
bits of LI (the read port digit). It writes 4 words that differ in the bottom
two bits (the write port digit). This needs a memory with 4 read and 4 write
ports per clock. `quad_mem` builds it from four ordinary dual-port RAMs. DM
(a,b), with a, b in {0,1}, holds the words whose LI has bit 1 = a and top bit
= b, at local address {LI[AW-2:2], LI[0]}. Then:

- QM write port {a, x} maps to port x of DM (a, LI_top), for x = 0/1.
- QM read port {b, x} maps to port x of DM (LI[1], b).

The four words of one operation hit four different DM ports on both the read
side and the write side, so there is never a conflict. The read data are put
back in order with the registered LI bits. Assertions in `quad_mem` check the
port-digit rules. This mapping requires N/P >= 16, so that the read and write
digits of LI do not overlap.

## Twiddle factors: the CLUT

Operation j of block q in stage t (t = 0..S-1) uses the twiddle

    W_N^e,   e = bitrev_{g*t}( id mod 2^{g*t} ) * 2^{n - g*t - g}

The radix-4 operation uses W^e, W^2e and W^3e. Each block has its own
coefficient table (`coef_lut`, filled at elaboration with rounded cos/sin).
The table has two parts:

- **Low part (stages with g*t < p).** The exponent depends only on q and t, so
  the block needs one coefficient (set) per stage. The address is the stage
  number.
- **High part (the remaining stages).** The top p bits of e are bitrev_p(q),
  which is fixed per block. Only the low bits vary with j, so the block needs
  2^(n-p-g) entries. The address is bitrev_{gt-p}(j mod 2^{gt-p}), shifted
  left to the top of the field. This is the address sequence of a scalar FFT.

All blocks use the same addresses, so the controller is shared: the array is
truly SIMD.

## Processing elements

- **`bfly_pe` (radix 2).** This is the DIT butterfly y0 = a + w*b,
  y1 = a - w*b, divided by 2^shift. Its 5 register stages (2-stage `cmul`,
  add/subtract, scale, output with headroom) plus the memory read and the
  write give K = 7.
- **`dragonfly_pe` (radix 4).** This is the DIT dragonfly. The three inputs
  are multiplied by W, W^2 and W^3. Then P = x0 + x2', Q = x0 - x2',
  R = x1' + x3' and S = x1' - x3'. Output o carries frequency offset
  bitrev2(o): y0 = P + R, y1 = P - R, y2 = Q - jS, y3 = Q + jS. In inverse
  mode the j terms swap and the twiddles are conjugated. The results are
  divided by 2^shift. It has 6 register stages, giving K = 8.
- **`cmul`.** This is the complex multiplier. Parameter `CMUL3` selects
  either the standard form (4 multiplications, 2 additions) or the 3-multiply
  form (3 multiplications, 5 additions). Twiddles are 16 bits with 14 fraction
  bits, and products are rounded half-up.

## Block floating point

Data are 16-bit two's complement integers with one shared exponent per
transform. While the PE writes a stage's results, `bfp_ctrl` tracks the
smallest headroom over all P blocks. Headroom here means the number of
redundant sign bits, capped at GB: GB = 2 for radix 2 and 3 for radix 4, the
largest growth of one stage. At the next stage start it sets the right shift
to GB - headroom, and the exponent adds up the shifts. The shift enters the
PE with the operands it belongs to and travels down the pipeline with them. It
divides the stage's results, with rounding, before they are written. A
stage can therefore never overflow, and small signals are not scaled at all.
The true spectrum is `out_data * 2^out_exp`. The 256-point arrays reach a
worst error of about 7 output LSBs, measured against a double-precision DFT
on full-scale noise.

## Interface and timing (`hc_array`; `hc_top` repeats it with prefixes `r2_` / `r4_`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock, synchronous active-high reset |
| `in_valid`, `in_data` | in | complex sample `{re, im}` (`hc_pkg::cplx_t`, 2x16 bits) |
| `in_ready` | out | high during the load phase |
| `inv` | in | 1 = inverse transform (no 1/N factor), taken with the first sample |
| `out_valid`, `out_data`, `out_idx` | out | spectrum X[k] with k on `out_idx`, one per clock, k = 0..N-1 |
| `out_exp` | out | block exponent of the transform |
| `out_last` | out | marks k = N-1 |
| `busy` | out | high during the transform phase |
| `cur_shift`, `cur_stage` | out | current block floating point shift and stage (status only) |

The arrays use the *1-phase* scheme: load, transform and unload run one after
another.

1. Load N samples in natural order. `in_valid` may have gaps.
2. `busy` is high for exactly L clocks.
3. `out_valid` is high for N consecutive clocks. The first output appears
   L + 3 clocks after the last input sample. There is no back-pressure on the
   output.
4. `in_ready` then rises again.

## Files

| file | content |
|---|---|
| `rtl/hc_pkg.sv` | word lengths, `cplx_t`, bit reversal, headroom, twiddle generation |
| `rtl/hc_top.sv` | the two arrays side by side |
| `rtl/hc_array.sv` | one array: controller, P blocks, shuffle, block floating point, output register |
| `rtl/hc_ctrl.sv` | shared controller: load/run/unload sequencing, read/write/CLUT addresses |
| `rtl/hc_pb.sv` | processor block: two banks, CLUT, PE |
| `rtl/shuffle_net.sv` | rank-g perfect shuffle between blocks |
| `rtl/bfly_pe.sv`, `rtl/dragonfly_pe.sv`, `rtl/cmul.sv` | processing elements |
| `rtl/coef_lut.sv` | per-block twiddle table (low and high parts) |
| `rtl/dp_mem.sv`, `rtl/quad_mem.sv` | dual-port RAM; quad-port RAM made of four of them |
| `rtl/bfp_ctrl.sv` | block floating point control |
| `tb/tb_<module>.sv` | self-checking bench per module |
| `tb/fft_checker.sv` | driver/checker against a floating-point DFT, used by the array benches |
| `tb/tb_hc_sizes.sv` | arrays at other sizes (16/4 and 1024/8 radix-2; 64/4 and 1024/16 radix-4), two of them with the 3-multiply complex multiplier |

Every bench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.
`tb_hc_top` runs the top at its default parameters. It performs six
transforms per array: impulse, full-scale noise, small noise, a tone, and two
inverse runs. It counts the mechanisms it exercised: every shift value, both
CLUT parts, all stages, and inverse mode.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/hc_pkg.sv tb/tb_hc_top.sv --top-module tb_hc_top
    ./obj_dir/Vtb_hc_top

Replace `tb_hc_top` with any other bench name. Add
`+verilator+rand+reset+2 +verilator+seed+<n>` to the run to start from random
register contents. The benches pass with random start values, because reset
gates every memory access.

## Changing the design

- `hc_top` parameters: `N2`, `P2` (radix-2 array) and `N4`, `P4` (radix-4
  array).
- `hc_array` parameters: `N`, `P`, `G` (2 or 4) and `CMUL3`.
- Limits, checked by assertions:
  - P is a power of two, at least 2.
  - N is a power of G.
  - N/P >= G*G.
  The architecture itself would allow P up to N/G. Here at least G operations
  per block per stage are required.
- Word lengths (`DATA_W`, `TW_W`, `TW_FRAC`, `EXP_W`) are in `hc_pkg`.
- The CLUT is computed at elaboration with `$cos`/`$sin`. No table files are
  needed.

## What follows the original architecture and what is this design's own

Taken from the architecture description:

- the identifier scheme and the single-stage indirect hypercube with a rank-g
  perfect shuffle;
- two ping-pong memories per block;
- the quad-port memory built from four dual-port memories, selected by LI
  digits;
- the CLUT split into a low part addressed by stage and a high part holding
  2^(n-p-g) entries that begin with the bit-reversed block number, addressed
  like a scalar FFT;
- radix-2 butterfly and radix-4 dragonfly, DIT;
- standard and 3-multiply complex multiplication;
- block floating point;
- the 1-phase operation;
- pipeline lengths 7 and 8 and the latency formula;
- 256 points on 4 blocks for the radix-2 array.

This design's own choices:

- **Word lengths.** 16-bit data, and 16-bit twiddles with 14 fraction bits.
- **Rounding.**
- **Block floating point scheme.** The headroom-based rule, with the shift
  carried down the pipeline.
- **Pipeline split.** K is read as the whole memory-to-memory loop (read +
  PE + write), and the PE registers are split to fit it.
- **Handshake.** valid/ready on input, valid only on output.
- **Output order.** The spectrum is unloaded in natural order.
- **Radix-4 size.** 256 points on 4 blocks.
- **Forward sign.** The forward transform uses exp(-j2 pi kn/N).

Not built:

- **Other input order.** Bit-reversed input order with right rotation of the
  identifiers.
- **2-phase and 3-phase (streaming) variants.** They need one or two more
  memories per block.
- **Dual-port memory from single-port RAMs.** Building the dual-port memory
  from four single-port RAMs is only mentioned as possible; `dp_mem` is an
  inferred dual-port RAM.
- **Real-valued transforms.** The real-valued FFT / Hartley transform mode and
  the fast cosine transform mode are not built. These modes pair complex
  conjugate signals, use the A/B/C/D butterfly types and extra cosine-transform
  butterflies, and address the CLUT by D-class codes. With them, an N-point
  array would compute a 2N-point real transform. The arrays here compute
  complex FFT/IFFT only.
