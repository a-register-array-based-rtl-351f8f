# Register-array radix-2 FFT/IFFT processor (256 points, 16 bit)

This is a small, low-power FFT engine for speech feature extraction. Computing
Mel-frequency cepstral coefficients (MFCC) needs one FFT per 30 ms frame
(240 samples at 8 kHz, zero-padded to 256). That leaves plenty of time, so
the engine uses a single radix-2 butterfly, reused N/2 times in each of the
log2(N) stages. The twist is where the intermediate results live. There is no
SRAM. Instead there is a **register array**: four banks take the four
butterfly output words, and a second set of four banks holds a copy of the
previous stage for reading. Only one word per bank is written in a cycle,
which keeps the switching activity of the storage low.

The transform is decimation-in-frequency (DIF). It takes the input in natural
order, `x(n)` and `x(n+N/2)` side by side, and the design returns the
spectrum in natural order, two bins per cycle. A 256-point transform takes
(128 butterflies + 2 stall cycles) × 8 stages = **1040 cycles** from the first
butterfly to the last stored result. At 100 MHz that is 10.4 µs per frame,
far inside the 30 ms frame period.

```
        +-----+   +------------------+   +------------------+   +--------------------+   +-----+
 xr,xi  | in  |   | SE  fft_selector |   | BF fft_butterfly |   | RA  register array |   | out | mr,mi
 yr,yi->| reg |-->| 0: pins          |-->| c=(a+b)/2        |-->| level 1: bank 0..3 |-->| reg |-> nr,ni
        +-----+   | 1: sd0..sd3 <----+---+------------------+---+ level 2: bank 4..7 |   +-----+
                  +------------------+   | d=(a-b)W/2       |   | sd0..3 @ sw1, sw2  |
                         ^ input_sel     +------------------+   +--------------------+
                         |                  ^ cos, sin             ^ regWr  ^ next_stage_en
                  +------+------------------+----------------------+--------+   ^ sw1, sw2
                  | fft_control (stages, stalls, regWr)  --num_stage,num_buf--> fft_addr_gen
                  |            --addr--> fft_coef_rom                                     |
                  +-----------------------------------------------------------------------+
```

## Pipeline: SE, BF, RA

Each butterfly takes three pipeline steps, one clock cycle each:

1. **SE, the selector** (`fft_selector`). It registers the two complex
   operands `a = ar + j·ai` and `b = br + j·bi`. In stage 0 they come from the
   input pins through the input register. In every later stage they come from
   the register array's read ports `sd0..sd3`. The selector also samples the
   mode pin `ifftfft_sel` when a frame starts and holds it for the whole
   frame.
2. **BF, the butterfly** (`fft_butterfly`). It forms `c = a + b` and
   `d = (a − b)·W`. With `in1 = ar − br` and `in2 = ai − bi`:
   `dr = in1·cos − in2·s` and `di = in1·s + in2·cos`. The datapath uses four
   multipliers, four adders (one of them negates the sine) and three
   subtractors. `s` is the stored sine for the IFFT (`ifftfft_sel = 1`) and
   its two's complement for the FFT (`ifftfft_sel = 0`). So the FFT uses
   `W = e^{−j2πk/N}` and the IFFT uses its conjugate.
3. **RA, the register array** (`fft_register_array`). It writes
   `c0..c3 = (cr, ci, dr, di)` into banks 0–3 at the register selected by the
   one-hot `regWr`.

The coefficient ROM (`fft_coef_rom`) holds `cos(2πk/N)` and `sin(2πk/N)` for
k = 0 … N/2−1. The control unit reads it in the issue cycle, so the
coefficients reach the butterfly together with the operands. Butterfly
`num_buf` of stage `s` uses entry `(num_buf << s) mod N/2`.

## The register array and its addressing

This is the part that takes some thought.

**Writing.** Butterfly number `j` (`num_buf = j`, 0 … N/2−1) of any stage
writes its sum output `c` into register `j` of banks 0/1 (real/imaginary) and
its difference output `d` into register `j` of banks 2/3. The write select
`regWr` is a shift register. It is `…0001` for the first butterfly of a stage
and shifts left once per butterfly (`…8000` after 16 writes in a 32-point
build). It is all zero during stalls. Each stage therefore fills level 1
sequentially, with no address arithmetic at all.

**Level 2.** The next stage must read operands that were written in any
order, and level 1 is being overwritten at the same time. So at the end of a
stage the whole of level 1 is copied into banks 4–7 in one edge
(`next_stage_en`, driven by `dataWr`). Reads come only from level 2.

**Reading.** A level-2 word has the address `{d, j}` (log2 N bits). `d = 0`
means the sum output (banks 4/5) and `d = 1` means the difference output
(banks 6/7). Let `α` be the width of `num_buf` (log2 N − 1) and `β` the stage
number. The two operands of butterfly `num_buf` in stage `β` are read at:

```
sw1[α−β]            = 0          sw2[α−β] = 1
sw1/sw2[α : α−β+1]  = num_buf[α−1 : α−β] rotated right by one bit
sw1/sw2[α−β−1 : 0]  = num_buf[α−β−1 : 0]
```

Example (32 points, α = 4): stage 3 with `num_buf = 0111` gives
`sw1 = 101_0_1` and `sw2 = 101_1_1`.

Why this works: in the textbook in-place DIF algorithm, stage β pairs indices
`i` and `i + N/2^{β+1}`. Storing each result at `{sum/difference, butterfly
index}` permutes those in-place indices by one more bit rotation per stage.
The rule above undoes exactly that permutation. Over one stage the N/2
butterflies read each of the N words exactly once.

**Output.** After the last stage, sum and difference of butterfly `j` are
`X[k]` and `X[k+N/2]`, where `k` is the bit-reversal of `j`. In output mode
(`num_stage = log2 N`) the address generator therefore issues
`{0, bitrev(k)}` and `{1, bitrev(k)}` for k = 0, 1, … N/2−1. The result
leaves in natural order: `mr/mi = X[k]` and `nr/ni = X[k+N/2]`.

## Stalls

An operand for stage β+1 may be the very last result of stage β. That result
is written two cycles after its butterfly was issued (SE → BF → RA), so the
next stage waits two cycles:

```
cycle   T1  T2  T3     T4     T5     T6  T7  T8
        SE  BF  RA                                  butterfly N/2-3
            SE  BF     RA                           butterfly N/2-2
                SE     BF     RA                    butterfly N/2-1 (last of stage)
                       stall  stall  SE  BF  RA     butterfly 0 of next stage
```

The level-2 copy happens on the same edge as the last level-1 write (end of
T5). On that edge the word being written is forwarded straight into level 2,
so two stalls are enough. The control unit asserts that nothing is issued in
a cycle that completes a stage.

## Interface and timing (`fft_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clock`, `reset` | in | 1 | clock; synchronous active-high reset |
| `start` | in | 1 | one-cycle pulse, accepted only when idle |
| `ifftfft_sel` | in | 1 | 0 = FFT, 1 = IFFT, sampled with `start` |
| `xr, xi` / `yr, yi` | in | 16 | `x(n)` / `x(n+N/2)`, signed |
| `mr, mi` / `nr, ni` | out | 16 | `X[k]/N` / `X[k+N/2]/N` |
| `out_valid` | out | 1 | high for N/2 consecutive cycles |
| `finish` | out | 1 | high with the last output pair |
| `busy` | out | 1 | frame in progress |

Let `start` be high in cycle S. Drive the pair `n` on the pins in cycle
S + n, for n = 0 … N/2−1. Butterflies issue from S + 1. The last result of
the last stage is stored at the end of cycle S + 1040. `out_valid` is high
from S + 1042 to S + 1169. After that the engine is idle and accepts the next
`start`. The engine does not overlap the output of one frame with the input
of the next. (For N = 32 the numbers are 90 and 92.)

## Number format

- Data are 16-bit two's complement throughout: input, register array and
  output.
- Every stage halves both butterfly outputs, so the output is `DFT/N`. For
  the IFFT that is the usual `1/N` normalisation. No stage can overflow on
  the sum path. The difference path saturates, which only matters for inputs
  near full scale with a large rotation.
- Twiddles are signed 16-bit with 14 fractional bits (1.0 = 16384), rounded
  to nearest. Products are truncated by an arithmetic shift.
- Against an exact double-precision transform, the largest error measured by
  the test benches is about 3 LSB for 256 points and 2 LSB for 32 points.

## Where this RTL departs from the original processor

- **Register array cells.** The original array is asynchronous: its words
  are latches written by their own strobes, not by the global clock. That is
  where its area and power savings come from. Here the array is made of
  ordinary edge-triggered registers with per-word write enables (`regWr`,
  `next_stage_en`), which any flow can map to clock-gated or latch cells. The
  behaviour at the ports is the same; the power and area benefit depends on
  that mapping.
- **Added or chosen here:**
  - the `start` / `out_valid` / `busy` handshake;
  - the per-stage scaling and saturation;
  - the twiddle format;
  - the output-mode addressing (natural order);
  - the forwarding on the level-2 copy;
  - folding the four operand multiplexers into the selector module.
- **Mode encoding.** The published butterfly shows a two-input sine
  multiplexer. The sine is negated on input 0 and passed straight through on
  input 1. Input 0 is taken as FFT.
- **Storage size.** The original reports 512 bytes of memory for the
  256-point processor. This design needs 2 levels × 4 banks × 128 words ×
  16 bit = 2 KiB of register storage. The twiddle ROM adds
  2 × 128 × 16 bit.
- **Not included:** the rest of the MFCC chain (windowing, Mel filter bank,
  logarithm, DCT), the pad ring, and anything about clock rate (100 MHz),
  area or power, none of which RTL simulation can confirm.

## Files

| file | contents |
|---|---|
| `rtl/fft_pkg.sv` | default sizes, mode enum, cycle-count function |
| `rtl/fft_top.sv` | the processor: input/output registers and wiring |
| `rtl/fft_selector.sv` | SE: operand select and register, mode latch |
| `rtl/fft_butterfly.sv` | BF: radix-2 DIF butterfly with output register |
| `rtl/fft_register_array.sv` | RA: two-level register array and read multiplexers |
| `rtl/fft_addr_gen.sv` | read addresses `sw1`/`sw2` from `num_stage`/`num_buf` |
| `rtl/fft_coef_rom.sv` | cosine/sine tables, computed at elaboration |
| `rtl/fft_control.sv` | stage/butterfly/stall sequencing, `regWr`, output phase |
| `tb/tb_*.sv` | one self-checking bench per module, plus `tb_fft_top_n32` |

Parameters: `FFT_N` (power of two ≥ 8, default 256), `DATA_W` (16),
`COEF_W` (16) and `COEF_FRAC` (14) on the top. They are passed down to the
modules that use them. The stall count is `STALLS_PER_STAGE` in the package.

## Verification

Every bench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

- `tb_fft_top` runs the default 256-point build end to end. It runs four
  frames: a real 240-sample frame padded with zeros, a complex random frame,
  a two-tone frame, and an IFFT. Each bin is compared with a floating-point
  DFT within 6 LSB. The bench also checks the latency (1042 cycles to the
  first result), `finish`, and that a `start` during a frame is ignored. It
  counts stalls (64), level-2 copies (32) and register-array feedback issues.
- `tb_fft_top_n32` runs the same test on the 32-point build.
- `tb_fft_control` checks the whole schedule cycle by cycle.
- `tb_fft_addr_gen` checks the complete 32-point address pattern and the
  bit-reversed output addresses. It also checks the structure of the rule at
  256 points.
- `tb_fft_register_array` runs random writes, copies and reads against an
  array model.
- `tb_fft_butterfly` runs random and directed cases in both modes, including
  saturation.
- `tb_fft_coef_rom` checks every entry of the ROM.
- `tb_fft_selector` checks the multiplexers, the hold while disabled, and the
  mode latch.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/fft_pkg.sv \
    tb/tb_fft_top.sv --top-module tb_fft_top -Mdir obj
./obj/Vtb_fft_top
```

Replace `tb_fft_top` with any other bench name. Each bench finishes in well
under a second.
