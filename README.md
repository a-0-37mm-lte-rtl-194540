# Reconfigurable 2ⁿ3ᵐ5ᵏ streaming FFT for LTE and Wi-Fi

This is a single memory-based FFT engine that can be switched at run time between all 42
transform lengths that LTE and Wi-Fi need. It covers the power-of-two OFDM sizes 64 to 2048,
1536, and the 35 SC-FDMA DFT sizes from 12 to 1296, all of the form N = 2ⁿ·3ᵐ·5ᵏ. It streams:
one complex sample goes in and one comes out every two clock cycles, continuously, with outputs
in natural order.

Three ideas keep it small:

* **Two N-word memories, no unscrambling memory.** One memory takes the next symbol in while the
  other is transformed. The input and output orders of a DIF transform are digit-reversed
  relative to each other. The engine therefore alternates between a forward (DIF) and a
  mirrored reverse (DIT) decomposition. Each new sample is written exactly where the previous
  symbol's result for the same output index sits, and that result is read in the same cycle.
* **No address tables.** Bank and address of every sample come from mixed-radix counters that
  are configured at run time.
* **Small twiddle tables.** Three twiddle ROMs for 2048, 243 and 25 points serve every length
  by renormalising the exponent. That is 1,718 words in all, fewer than N_max.

One processing element computes one radix-2, 3, 4 or 5 butterfly, or two radix-2 butterflies,
per cycle. It does this with conflict-free access to five memory banks. The engine sits behind a
small memory-mapped register interface with a test SRAM and a snapshot SRAM. That interface is
meant for a RISC-V processor. A ring oscillator model and a clock divider/mux complete the chip
top.

## Supported lengths

`FFT_IDX` selects the length:

| idx | N |
|---|---|
| 0–5 | 64, 128, 256, 512, 1024, 2048 |
| 6 | 1536 |
| 7–41 | 12, 24, 36, 48, 60, 72, 96, 108, 120, 144, 180, 192, 216, 240, 288, 300, 324, 360, 384, 432, 480, 540, 576, 600, 648, 720, 768, 864, 900, 960, 972, 1080, 1152, 1200, 1296 |

The largest factors that occur are 2¹¹ = 2048, 3⁵ = 243 and 5² = 25. These fix the twiddle
ROM sizes and the six-digit width of the counters.

## Where a sample lives: digits, banks and addresses

The prime factor algorithm splits N into the coprime groups 2ⁿ, 3ᵐ and 5ᵏ. Cooley-Tukey then
splits each group into stages. For 2ⁿ that means radix-4 stages first and a single radix-2 stage
when n is odd. Each stage corresponds to one digit of a mixed-radix "location".

A location has 13 digit slots:

| slots | used for |
|---|---|
| 0–5 | 2ⁿ digits |
| 6–10 | 3ᵐ digits |
| 11–12 | 5ᵏ digits |

Unused slots have radix 1 and hold 0.

* **Bank.** The bank is the digit sum modulo the largest radix in use, r_max. With r_max = 5 all
  five banks are used.
* **Address.** The address is the mixed-radix value of all digits except one digit of radix
  r_max, called the dropped slot.

The r operands of a butterfly differ in a single digit, so they land in r different banks. Every
bank holds N/r_max words:

* banks 0–3 are 512 deep, enough for 2048/4;
* bank 4 is 240 deep, enough for 1200/5.

This gives 2,288 words per memory.

Example: for N = 24 the radices are 4, 2, 3. Location (d0, d1, d2) has bank (d0+d1+d2) mod 4 and
address 3·d1 + d2 (d0 is the dropped digit). In the radix-2 stage, the butterfly with d0 = 0 and the one with
d0 = 2 use four different banks and the same address, so they can run together.

## Forward and reverse symbols in one memory

The forward (DIF) decomposition:

1. reads natural-order input;
2. processes the slots from most to least significant, each stage doing butterfly then twiddle;
3. leaves the results digit-reversed.

The reverse (DIT) decomposition processes the slots in the opposite order, each stage doing
twiddle then butterfly. The same twiddle exponents work for both because the DFT matrix is
symmetric. The reverse decomposition takes its input in exactly the order in which a forward
symbol left its output, and it leaves natural order where a forward symbol started.

So `io_ctrl` runs as follows, for each memory:

* It fills a symbol in forward input order. At the same addresses it reads out the previous
  reverse symbol's output.
* The next symbol in that memory is filled in forward *output* order. At the same addresses it
  reads out the forward symbol's output.
* Memories A and B take turns, so a symbol's output leaves the engine while the symbol two
  later is written in.

## Index mapper

`index_mapper` turns the IO index i = 0..N−1 into a location without tables. Each coprime
group y has two registers:

* **Counter n_y′.** A mixed-radix counter. The inner group counts every sample, and an outer
  group's counter steps when all inner groups wrap.
* **Accumulator R_y.** It adds a constant Q_y′ at every step and is cleared whenever its own
  counter steps.

The group's digits are n_y′ + R_y, added digit by digit with `mr_adder`. Its adder units compute
a + b + cin and subtract the radix when the sum reaches it. This works because the sum is always
below twice the radix. The digits then pass through the slot permutation of the chosen map,
then the bank (digit sum mod r_max) and address logic.

The constants Q′ are modular inverses:

| map | group order | Q′ values |
|---|---|---|
| forward input | 2ⁿ, 3ᵐ, 5ᵏ | Q₂ = (3ᵐ5ᵏ)⁻¹ mod 2ⁿ, Q₃ = (5ᵏ)⁻¹ mod 3ᵐ |
| forward output | 5ᵏ, 3ᵐ, 2ⁿ, digit-reversed radices | Q₅ = (2ⁿ3ᵐ)⁻¹ mod 5ᵏ, Q₃ = (2ⁿ)⁻¹ mod 3ᵐ |

In the forward output map a 4/2 counter becomes a 2/4 counter. `fft_setup` finds these
inverses after each setup request by a short search in mixed-radix arithmetic. The search steps
through candidate values one per cycle, so it takes up to a few thousand cycles for the largest
groups. `SETUP` reads 1 when it is done.

## Calculation schedule, dual radix-2 and stalls

`calc_ctrl` walks through the stages of the symbol in the other memory. It issues one butterfly
per cycle with all operands read in parallel. Results are written back in place two cycles
later (`PE_LAT = 2`).

**Dual radix-2.** In the radix-2 stage, the butterfly whose dropped digit is v is paired with the
one whose dropped digit is v+2, so two radix-2 butterflies issue per cycle. With five banks,
v = 4 has no partner and runs alone.

**Stalls.** After every stage the controller waits `STALL_CYCLES = 7` cycles so that the
pipeline drains before the next stage reads what the last one wrote.

With these rules the cycle counts are, for example:

| N | calculation cycles | 2N |
|---|---|---|
| 256 | 284 | 512 |
| 972 | 1905 | 1944 |
| 2048 | 3114 | 4096 |
| 1296 | 2418 | 2592 |

Every length finishes in under 2N cycles. With IO at one sample every two cycles, a symbol
therefore always finishes before the other memory is full. The stall count 7 is not a measured
property of the original hardware. It is the value for which this schedule gives both published
cycle counts (284 and 1,905). Change the `STALL_CYCLES` parameter of `fft_engine` to explore
others; it must be at least the PE latency.

## Twiddles

A stage of radix r and size M within group g, at lower-digit value n_low, multiplies lane l by
W_M^(l·n_low).

`twiddle_ctrl` rewrites this as an entry of the group's full-size table:

    exponent = l · n_low · (N_g,max / M)

The 2ⁿ ROM holds 1536 entries, the 3ᵐ ROM 162 and the 5ᵏ ROM 20. A radix-r stage never needs an
exponent of (r−1)/r·N_g,max or more, so these depths suffice.

The ROMs hold W^e = cos(2πe/N) − j·sin(2πe/N) as Q1.22 words. Each ROM is a constant computed
at elaboration with integer arithmetic only, so no data file or real-number support is needed and
synthesis sees an ordinary ROM. The angle is first reduced to a quadrant. Cosine and sine are
then Taylor series in 2.30 fixed point, and the result is rounded to 22 fraction bits. Lanes
without a twiddle get 1.0.

## Processing element

`pe` contains one `wfta_butterfly` with Winograd small-DFT kernels (radix 2, 2×2, 3, 4, 5) and
four complex multipliers.

* **Forward symbols:** butterfly, then multiplier.
* **Reverse symbols:** multiplier, then butterfly.

Two muxes on `fwd` reorder the shared units. A lint tool therefore sees a combinational loop
butterfly → multipliers → butterfly. No setting of `fwd` can activate that loop, so it stands.

Multiplier count:

* 16 real multipliers for the twiddles;
* 10 for the radix-5 constants;
* 2 more for the radix-3 constant, unless synthesis shares them.

**Number format and scaling:**

* Data is 24-bit two's complement per part.
* Products are rounded to nearest.
* There is no scaling between stages, so inputs need about log₂N bits of headroom.
* The output block shifts right by ⌊log₂N⌋/2 with rounding.

**Inverse transforms** (`IS_FFT` = 0) conjugate the input and the output. The result is the
unscaled inverse DFT with the same shift.

In simulation with random ±1000 inputs, all 42 lengths, forward and inverse, match a
double-precision DFT to within a few output LSBs. The largest error is 9 LSB, at 972 points.

## Chip top and register interface

`fft_soc` joins the engine, `fft_rocket_if`, `clk_gen` and the `ring_osc` model.

**Clock selection.** `clk_sel` picks the core clock:

| clk_sel | core clock |
|---|---|
| 0 | external clock |
| 1 | ring oscillator |
| 2–5 | ring oscillator ÷2, ÷4, ÷8, ÷16 |

Change `clk_sel` only while `rst` is high. `rst` also clears the dividers, so the divided clocks
start after reset is released.

**Bus.** The processor side is a simple bus:

* `mmio_addr`, `mmio_we`, `mmio_re` and 64-bit data;
* one access per cycle;
* read data one cycle later, flagged by `mmio_rvalid`.

| address | name | access |
|---|---|---|
| 0x0000 | IS_FFT | rw, 1 = FFT, 0 = inverse |
| 0x0008 | FFT_IDX | rw, length index |
| 0x0010 | TEST_MODE | rw, 1 = keep streaming after a captured frame |
| 0x0018 | SETUP | write: start setup; read: done |
| 0x0020 | CALC | write: start streaming; read: frame captured |
| 0x0028 | K_OFFSET | r, k of the first captured output |
| 0x4000 + 8i | test SRAM word i | rw, {re, im} in bits 47:0 |
| 0x8000 + 8i | snapshot SRAM word i | r |

**Test sequence.** Software does the following:

1. Write IS_FFT and FFT_IDX.
2. Write SETUP and poll it.
3. Write N input words into the test SRAM.
4. Write CALC and poll it.
5. Read N output words from the snapshot SRAM.

The interface streams the first N test words into the engine over and over, one every two
cycles. It captures the first complete output frame into the snapshot SRAM at address k. Unless
TEST_MODE is 1, it then pauses streaming so that new vectors can be loaded.

## Files

| file | role |
|---|---|
| `rtl/fft_pkg.sv` | types, widths, location helpers |
| `rtl/fft_soc.sv` | chip top |
| `rtl/fft_engine.sv` | FFT engine |
| `rtl/fft_setup.sv` | length → configuration, modular-inverse search |
| `rtl/index_mapper.sv`, `rtl/mr_adder.sv` | IO location generator |
| `rtl/io_ctrl.sv` | streaming IO, ping-pong and forward/reverse alternation |
| `rtl/calc_ctrl.sv` | stage/butterfly schedule |
| `rtl/twiddle_ctrl.sv`, `rtl/twiddle_rom.sv` | twiddles |
| `rtl/pe.sv`, `rtl/wfta_butterfly.sv` | processing element |
| `rtl/mem_arbiter.sv`, `rtl/data_memory.sv`, `rtl/sram_bank.sv` | memories A/B and routing |
| `rtl/normalize.sv` | output shift |
| `rtl/fft_rocket_if.sv` | register interface, test and snapshot SRAMs |
| `rtl/clk_gen.sv` | clock dividers and mux |
| `rtl/ring_osc.sv` | behavioural ring oscillator (delay-based, not synthesizable) |

## Simulation

Each testbench in `tb/` is self-checking. It prints one line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. Build and run a testbench with Verilator 5
from the repository root:

    verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
        rtl/fft_pkg.sv tb/tb_fft_soc.sv --top-module tb_fft_soc -Mdir obj_soc
    ./obj_soc/Vtb_fft_soc

Replace the name to run another testbench.

**System-level tests:**

* `tb_fft_soc` drives the chip top through its bus at default parameters, in four runs:
  * a 2048-point FFT in continuous mode;
  * a 1536-point inverse FFT with pause;
  * a 300-point FFT on the ring oscillator ÷8;
  * a 12-point FFT on the ring oscillator ÷8.

  It compares every output bin with a DFT. It also counts stalls, dual radix-2 issues, radix-5
  issues, forward and reverse symbols, use of both memories, inverse symbols, captured frames
  and pauses, and fails if any of them never happens.
* `tb_fft_all_sizes` streams five symbols of every length, forward and inverse, through the
  engine. It checks the outputs of the first three and that each calculation fits in 2N cycles.
* `tb_fft_engine` checks selected lengths and the published cycle counts.

The remaining testbenches each exercise one module. The full runs take seconds to a minute.

## Departures and open points

* **Length list.** The 35 SC-FDMA lengths are the standard LTE set. Four of them (96, 288, 576,
  972) were filled in from that standard rather than from the source table.
* **Things this design chose, not taken from the original description:**
  * the index encoding;
  * register addresses;
  * the bus protocol;
  * the meaning of TEST_MODE;
  * the output shift amount;
  * the IFFT method;
  * the twiddle ROM partition;
  * the stall count (fitted, see above).
* **Multiplier count.** Unless synthesis merges the radix-3 multipliers into the radix-5 path,
  the PE holds two more real multipliers than the 26 of the original.
* **No overrun handling.** The engine assumes the IO rate is at most half the clock. An
  assertion in `io_ctrl` fires if a symbol is completely loaded while the other memory is still
  calculating.
* **Fixed word width.** Only the 24-bit data width is built. A 16-bit variant would need the
  constant and twiddle widths re-chosen.
* **Not built:**
  * the RISC-V processor, its caches, on-chip network and host link, which the `mmio_*` ports
    stand in for;
  * the level shifter, SRAM macros and pads;
  * any real oscillator.
