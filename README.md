# PLL-jitter true random number generator

This is a true random number generator (TRNG) for an FPGA soft-processor
system. Its only entropy source is the random timing jitter of the FPGA's
on-chip analog PLLs. Two clocks are made from one reference: the system clock
CLK (33.3 MHz) and a second clock CLJ at a frequency with an awkward, coprime
ratio to CLK. A plain D flip-flop samples CLJ on every CLK edge. Most of those
samples are fixed by the clock ratio. A few samples in every period fall so
close to a CLJ edge that PLL jitter decides them. XOR-ing a full period of
samples cancels the fixed part and keeps the parity of the jitter-decided
samples. The result is one random bit per period, about 10 kbit/s.
The bits are packed into 16-bit words and read by the processor through two
bus registers, by polling or by interrupt.

Everything except the PLLs is synthesizable SystemVerilog. The PLLs are analog
macros, so they are given as a behavioural model with configurable Gaussian
jitter. On an FPGA they would be replaced by the vendor's PLL primitive set to
the same factors.

## Clock plan

| clock | made by | frequency |
|---|---|---|
| F_EXT | external oscillator | 33.3 MHz |
| CLK (`sys_clk`) | PLL2 output clk1, F_EXT × 14/14 | 33.3 MHz |
| PLL4 reference | PLL2 output clk0, F_EXT × 14/101 | 4.616 MHz |
| PLL4 output | PLL4 output clk1, 4.616 MHz × 80/11 | 33.570 MHz |
| CLJ | PLL4 output ÷ 3 (`clk_div3`) | 11.19 MHz |

Overall, F_CLJ = F_CLK × K_M / K_D with K_M = 80·14 = 1120 and
K_D = 11·101·3 = 3333. A single PLL cannot reach factors this large, which is
why two PLLs are cascaded and a ÷3 stage follows. CLK is also the processor
clock, so the sampler, the decimator and the registers share one clock domain
with the bus. CLJ is the only clock that crosses into it, and it is sampled on
purpose.

## Why the samples become random

K_M and K_D are coprime (GCD(1120, 3333) = 1). The two clocks therefore return
to the same relative phase only after

    T_Q = K_D · T_CLK = K_M · T_CLJ   (= 3333 × 30.03 ns ≈ 100.09 µs)

Within one T_Q, the 2·K_M edges of CLJ (both edges count, since CLJ has a 50 %
duty cycle) land at 2·K_M different offsets from the nearest CLK edge. These
offsets are spread evenly, and the largest gap between neighbouring offsets is

    max ΔT_min = T_CLK · GCD(2·K_M, K_D) / (4·K_M) = 30.03 ns / 4480 ≈ 6.7 ps

This step is smaller than the intrinsic PLL jitter (σ ≥ 15 ps, Gaussian). So in
every period a handful of CLJ edges lie within about one σ of a CLK edge, and
for each of them the sampled value depends on that edge's jitter. All other
samples repeat exactly from one T_Q to the next.

The XOR decimator folds the K_D samples of one T_Q into a bit. The fixed
samples add the same constant in every period. The jitter-decided samples add
a fresh random parity. The output bit X(n·T_Q) is that parity, at a rate of
1/T_Q = 33.3 MHz / 3333 ≈ 9991 bit/s.

The choice of K_M, K_D and T_CLK is what makes this work. If the step is larger
than the jitter, some periods can have no edge close enough to a CLK edge and
the bits become predictable. If the ratio is changed, recompute the step with
the formula above before trusting the output. A jitter-free simulation shows
the failure: it gives the same bit every period (see `tb_trng_stats`).

## Checking the clocks: status bit C

The status register has a "clocks proper" bit, C. This design computes it from
the same property that makes the generator work. During one T_Q, a correctly
running CLJ makes the sampled signal toggle exactly 2·K_M = 2240 times, give
or take an edge that jitter pushes across a window boundary. `clock_checker`
counts the toggles in each window and sets C when the count is within ±4 of
2240. Each of these faults moves the count far from 2240: a stopped PLL, a
stopped divider, or a PLL locked to the wrong multiplier. C is 0 after reset
until the first full window has been judged, so for about 200 µs. Software
should discard words read while C is 0.

## Processor interface

The registers sit on a simple synchronous slave bus (`chipselect`, `address`,
`read`, `write`, `writedata`, `readdata`) clocked by `sys_clk`. It has zero
wait states: `readdata` is valid in the cycle in which `read` is high. Each
register is DATA_W bits wide (16 by default; 32 for the wide variant).

| offset | access | contents |
|---|---|---|
| 0 | read | random data word. The first bit generated is the MSB. |
| 1 | read | status: bit 0 **V** (a new word is waiting), bit 2 **C** (clocks proper). All other bits read 0. |
| 1 | write | control: bit 0 **IE** (interrupt enable). All other bits are ignored. |

- A word is complete after DATA_W bits. It is copied to the data register and V is set.
- Reading offset 0 clears V. A word that completes in the same cycle wins, and V stays set.
- An unread word is replaced by the next one. V then stays set.
- `irq` is the level V AND IE, so reading the data word removes the request.
- Writes to offset 0 are ignored.

A new word arrives every 16 × T_Q ≈ 1.6 ms (3.2 ms for 32 bits).

Polling sequence: read the status until V = 1, then read the data. Interrupt
sequence: write 1 to the control register, and on each `irq` read the data.

## Modules

```
trng_top            complete generator (PLL models + core)
├── pll_model  ×2   behavioural PLL: PLL2 (14/101, 14/14), PLL4 (clk1 80/11)
└── trng_core       synthesizable generator
    ├── clk_div3        33.570 MHz → CLJ, 50 % duty (posedge + negedge flop)
    ├── jitter_sampler  D flip-flop: CLJ sampled on CLK
    ├── xor_decimator   mod-K_D counter + 1-bit XOR accumulator
    ├── clock_checker   toggle count per T_Q → C
    └── trng_regs       word assembly, data/status/control registers, irq
trng_pkg            K_M, K_D, register offsets and bit positions
```

Parameters with their defaults:

- `trng_core`: `DATA_W` = 16, `K_M` = 1120, `K_D` = 3333, `CLK_TOL` = 4.
- `pll_model`: `CLKn_MUL` and `CLKn_DIV` per output, `JITTER_RMS_PS` = 15, `LOCK_CYCLES` = 8.
- `trng_top`: `DATA_W`, and `JITTER_RMS_PS`, which it passes to both PLLs.

`trng_top` also brings out the raw bit stream (`rnd_bit` with a one-cycle
`rnd_valid` strobe per bit) and CLJ as test points. These are meant for
statistical testing of long sequences and for measuring the clock ratio.

The reset `rst_n` is asynchronous and active low. Hold it until `pll_locked`
is high. The divider's reset is released asynchronously to its clock; this is
harmless because the divider's phase does not matter.

### The PLL model

The model estimates the period of its input from all input edges seen so far.
It places output edge k at t0 + k·T_in·DIV/(2·MUL) plus a fresh Gaussian
offset, where t0 is the first input edge. Outputs are therefore locked to the
input in both frequency and phase, and the jitter does not accumulate. The
Gaussian offset is the sum of 12 uniform variates with `JITTER_RMS_PS` rms.
The outputs start, and `locked` rises, after `LOCK_CYCLES` input edges. Use a
time precision of 1 fs (all files declare `timeprecision 1fs`): the edge
spacing that matters is a few picoseconds.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_pll_model` | Edges sit on the ideal grids of 14/14 and 14/101, with 15 ps ±25 % rms deviation and no edge off by more than 8σ. |
| `tb_clk_div3` | Output period is 3 input periods. High time is 1.5 input periods. |
| `tb_jitter_sampler` | Sampling and reset of the flip-flop. |
| `tb_xor_decimator` | Each bit is the XOR of its K_D = 3333 samples. Strobes come exactly every 3333 cycles. |
| `tb_clock_checker` | C is 1 for 2240±4 toggles and 0 for 2245, 2235, 0, 1120 and 3000 toggles, and 0 for the first window. |
| `tb_trng_regs`, `tb_trng_regs32` | Word assembly, V, C, IE, irq, overwrite, read/complete collision. Run at 16 and 32 bits. |
| `tb_trng_core` | Core with jittered testbench clocks. Every bit matches an independent model of sampler and decimator. The rate is 3333 cycles per bit. CLJ has 1120 rising edges per T_Q. Words arrive by interrupt. C falls when the PLL clock stops and recovers when it restarts. |
| `tb_trng_top` | The whole design at default parameters, from a 33.3 MHz reference. It checks PLL lock, the `sys_clk` period, T_Q = 100.09 µs, the clock ratio, C = 0 before the first window and C = 1 after it, a polled word with the interrupt masked, two interrupt-driven words, and an unread word replaced by the next. |
| `tb_trng_stats` | 2000 raw bits pass the NIST SP 800-22 frequency, block-frequency (M = 100) and runs tests at α = 0.01. A second core with jitter-free clocks gives a constant bit, so the randomness comes from the jitter. |

Passing these tests in simulation shows that the logic does what is described
above. It does not show that real silicon is random. That depends on the real
PLL jitter and on the board. The full NIST suite on gigabit-length sequences
is the test to run on hardware, using the `rnd_bit` stream. At about 10 kbit/s,
1 Gbit takes roughly 28 hours to collect.

Simulating with Verilator, for example the full design:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_trng_top rtl/trng_pkg.sv tb/tb_trng_top.sv
./obj_dir/Vtb_trng_top
```

Swap the top module and file for any other testbench.
`tb_trng_top` simulates about 8 ms and takes under a second of run time.
`tb_trng_stats` simulates 200 ms and takes about half a minute.
Verilator uses only two states, so all state that is read is reset or
initialised.

## Design choices beyond the basic scheme

These points are this implementation's own decisions, not part of the basic
sampling scheme:

- **Bus.** The timing of the bus slave is a choice of this design: zero wait
  states, with the read side effect at the end of the read cycle.
- **Registers.** These are choices too: the bit order in the word, the
  overwrite-on-overflow policy, and clearing V by reading the data register.
- **Status bit C.** Only its meaning ("proper clocks") is given by the scheme.
  Counting toggles per window, and the ±4 tolerance, are this design's.
- **CLJ duty cycle.** The divider makes a 50 % duty cycle, which the 2·K_M
  edge-spacing argument assumes. A simple ÷3 counter with a 1/3 duty cycle
  would change the spacing of the falling edges.
- **Sampler.** There is a single sampling flop and no extra synchronizer
  stage. The flop's output may go metastable. It only feeds the XOR
  accumulator and the toggle counter, and both tolerate a random value.
  Adding a second flop is safe. It delays the stream by one cycle, and
  because the sampled pattern repeats every T_Q, moving the window by a
  cycle changes nothing but which jitter-decided samples fall in it.
- **Decimation counter.** It is a plain binary counter.
- **Unused PLL output.** PLL4's clk0 output is not used.
- **Not included.** The soft processor and its other peripherals (such as a
  UART) are outside this RTL. The testbenches act as the processor.

For comparison, a reference implementation of this kind of generator was
reported at roughly 150 logic elements (16-bit) and 200 (32-bit) on an Altera
APEX 20K device, not counting the PLLs.
