# Memory-based chirp generator for synthetic aperture radar

A SAR transmitter sends linear-FM pulses ("chirps"). A chirp's frequency sweeps
linearly across the band during the pulse. This generator does not compute the
chirp at run time. One chirp is computed ahead of time and quantised to 8 bits.
It is stored in a ROM and played out again and again by a binary counter, one
sample per clock, into an 8-bit DAC. Compared with a direct digital synthesiser
(DDS), the output is an exact preset waveform. The price is that a different
chirp needs a new ROM table. Here that means new parameter values: the table is
computed from them at elaboration.

The specification behind it:

| quantity | value |
|---|---|
| sweep | 0 MHz to 10 MHz (bandwidth 10 MHz) |
| chirp duration T | 5 us |
| samples per chirp | 1000 |
| quantisation | 8 bit, unsigned |
| sample clock | 24 MHz (design); 6 MHz with the DAC0808 |
| board clock | 50 MHz |
| DAC output | 0 V to 5 V (DAC0808 plus TL081 current-to-voltage stage) |

## Signal chain

```
 clk_50 --> PLL --> sample clock --+-----------+-----------+
                                   |           |           |
            PRF timer --start--> counter --addr--> ROM --code--> DAC driver --8 pins--> DAC module --> reconstruction --> vout
                                 0..999       1000 x 8             (register)           (0-5 V)        filter
```

| block | module | kind |
|---|---|---|
| whole chain | `chirp_system` (top) | simulation top, holds behavioural models |
| FPGA logic | `chirp_fpga` | synthesizable |
| PRF timer | `prf_timer` | synthesizable |
| binary counter | `addr_counter` | synthesizable |
| chirp ROM | `chirp_rom` | synthesizable, table computed at elaboration |
| DAC driver | `dac_driver` | synthesizable |
| PLL | `chirp_pll` | behavioural model (the FPGA's own PLL in hardware) |
| DAC module | `dac0808_model` | behavioural model, `real` output in volts |
| reconstruction filter | `recon_filter` | behavioural model, `real` in and out |
| shared constants | `chirp_pkg` | package |

The board oscillator is not modelled: its 50 MHz clock is the top's input `clk_50`.

## The stored chirp

The waveform is `x(t) = A cos(2 pi f_t t)` with `f_t = k t + f0` and chirp rate
`k = (f1 - f0) / T`. It is sampled at `t_n = T * n / 1000`. The DAC cannot
produce negative voltages, so the cosine is raised by one and scaled onto the
full unsigned code range:

```
code[n] = round( (2^8 - 1) * (1 + cos(2 pi (k t_n + f0) t_n)) / 2 )
```

With the default numbers (`f0 = 0`, `f1 = 10 MHz`, `T = 5 us`) this becomes

```
code[n] = round( 127.5 * (1 + cos(pi * n^2 / 10000) ) ),   n = 0 .. 999
```

`chirp_rom` computes the table with the function `chirp_pkg::chirp_sample`. Its
parameters `F0`, `F1`, `DURATION`, `DEPTH` and `WIDTH` select another chirp. If
`F0 > F1`, the sweep runs downwards (a down-chirp).

Keep two points in mind about this table:

* **Sample count against sample rate.** The specification gives 5 us, 1000
  samples and a 24 MHz sample clock, but these three do not agree: 5 us at
  24 MHz is only 120 samples. This design keeps the 1000 samples and the
  0..999 counter. The 5 us only sets the time axis used to compute the table.
  In hardware, one chirp lasts 1000 / f_sample: 41.67 us at 24 MHz and
  166.7 us at 6 MHz. The sweep rate scales with the clock in the same way.
* **Frequency per sample.** The phase is `pi n^2 / 10000`. Its slope is
  `n / 10000` cycles per sample, so the last sample is at 0.1 cycles per sample.
  This is the equation exactly as written, with `f_t` multiplied by `t`. The
  output therefore sweeps from 0 to `0.1 * f_sample`: 2.4 MHz at 24 MHz and
  0.6 MHz at 6 MHz. Each cycle gets at least ten samples, so the table never
  aliases.

## Timing and control

* `prf_timer` counts sample clocks modulo `PRI_CYCLES`, the pulse repetition
  interval in samples. It gives a one-cycle `start` at the beginning of each
  interval. The first `start` comes in the same cycle that `run` rises.
* `addr_counter` answers `start` by showing addresses 0..999 on consecutive
  clocks, with `active` high. It then waits at address 0. A `start` that comes
  while address 999 is shown restarts the count with no gap. The default
  `PRI_CYCLES = 1000` uses this, so the chirps loop back to back. If
  `PRI_CYCLES` is larger, an idle gap of `PRI_CYCLES - 1000` samples follows
  each chirp. When `run` goes low, the counter stops at once.
* `chirp_rom` is read synchronously, with one clock of latency. A copy of
  `active` delayed by one clock marks its output as valid.
* `dac_driver` registers the code onto the GPIO pins. When no sample is valid,
  the pins hold mid-scale (`8'h80`, 2.5 V), which is the zero of the bipolar
  chirp. Pin 7 drives DAC input A1 (MSB) and pin 0 drives A8 (LSB).
* Latency: sample 0 reaches the pins three clock edges after the start pulse.
  From then on, the pins show one sample per clock. `busy` is high in exactly
  the cycles that show a chirp sample.
* Reset: `rst_n` is asynchronous and active low. A two-flop synchroniser inside
  `chirp_fpga` releases it. The top holds the logic in reset until the PLL
  reports lock.

## Clocking and the DAC settling limit

`chirp_pll` multiplies the 50 MHz board clock by `MULT/DIV`. The top's default,
12/25, gives the 24 MHz design rate. Setting `PLL_MULT = 3` gives 6 MHz.

The DAC0808 settles in about 150 ns, which limits the sample rate to about
6.67 MHz. `dac0808_model` models this as a first-order response whose time
constant makes a full-scale step settle to half an LSB in 150 ns.

* At 6 MHz (166.7 ns per sample), every sample settles.
* At 24 MHz (41.7 ns per sample), samples do not settle, so the analog chirp
  loses amplitude.

In both cases the digital side is exact. The limit belongs to the DAC. The
simulations show it directly (see below).

The DAC model's transfer function is `vout = 5 V * code / 256`: 19.53 mV per
LSB, 2.5 V at `10000000` and 4.98 V at `11111111`. On the real board, the
TL081 needs an 8 V positive supply to reach the top of this range. Supplies
are not modelled.

`recon_filter` is a first-order RC low-pass with unity DC gain and a 10 MHz
cutoff. The block's presence in the chain is given, but its order and cutoff
are this design's choice.

## Size

`chirp_fpga` at its defaults synthesises to 8,192 memory bits (the 1000 x 8
table), 33 flip-flops and about 30 word-level cells. The table is 8,000 bits of
data, so it fits easily in the block RAM of a small FPGA: two 4-kbit blocks of a
Cyclone II.

## Simulation

All testbenches run in Verilator 5 (`--timing` is required by the behavioural
models). Delays assume a 1 ns / 1 ps timescale. Every testbench prints
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb \
  rtl/chirp_pkg.sv tb/chirp_ref_pkg.sv tb/tb_chirp_system.sv --top-module tb_chirp_system
./obj_dir/Vtb_chirp_system
```

Swap the testbench name to run any other testbench.

| testbench | what it checks |
|---|---|
| `tb_chirp_rom` | all 1000 codes against the closed form, one-cycle latency, mid-scale beyond 999, and a 10-to-0 MHz down-chirp instance |
| `tb_addr_counter` | 0..999 per start, seamless restart on the last address, stop, random traffic against a cycle model |
| `tb_prf_timer` | start period 1000 and 5, first pulse when `run` rises, none while `run` is low |
| `tb_dac_driver` | registered codes, idle code, reset value |
| `tb_chirp_pll` | 41.67 ns and 166.67 ns periods from 50 MHz, lock after 16 edges, reset |
| `tb_dac0808_model` | the 16 design points of the DAC transfer table within 10 mV; a full-scale step is not settled after 41.7 ns but is within half an LSB after 150 ns |
| `tb_recon_filter` | step response at 1 and 10 time constants; 24 MHz against 1 MHz square-wave swing |
| `tb_chirp_fpga` | every pin code for back-to-back chirps (PRI 1000) and chirps with gaps (PRI 1500), chirp rate, stop and restart |
| `tb_chirp_system` | end to end, from the 50 MHz clock to the filtered voltage, at 24 MHz back to back and at 6 MHz with gaps: all codes, chirp periods (41.67 us, 250 us), every 6 MHz sample settled, 24 MHz samples unsettled, output swing, stop; counts each mechanism and fails if one never happened |
| `tb_chirp_system_full` | the top with all defaults: three complete chirps, every code, 41.67 us period, idle code before and after |

The reference values in the testbenches come from the closed form
`round(127.5 (1 + cos(pi n^2 / 10000)))` in `tb/chirp_ref_pkg.sv`, not from the
RTL's table function. A difference of one code is accepted only where the
exact value lies within 1e-6 of a rounding boundary.

## How far to trust it, and where it departs

* The synthesizable part (`chirp_fpga` and its four blocks) is the whole
  digital design. It is checked code by code against an independent reference.
* The PLL, DAC and filter are behavioural models, so `chirp_system` can be
  simulated but not synthesised. In hardware, an FPGA PLL and the analog board
  take their place.
* Choices of this design where the specification says nothing:
  * the PRF timer's structure and its default interval (1000 samples, so chirps loop);
  * the idle code (mid-scale);
  * the register stages and the resulting three-cycle latency;
  * the reset scheme;
  * the code scaling and rounding (`round(255 (1 + cos)/2)`);
  * the PLL ratios and lock delay;
  * the DAC settling shape;
  * the filter's order and cutoff.
* Departure from the specification: one chirp is 1000 samples long at the
  sample clock, not 5 us (see "The stored chirp").
* The analog output is unipolar (0 V to 5 V, idle at 2.5 V). A bipolar ±5 V
  output would need a different DAC stage.
* Verilator reports `SYNCASYNCNET` on the reset synchroniser. This is the
  intended structure: those flops reset asynchronously, and their output resets
  the rest of the logic.
