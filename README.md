# Moving average and moving standard deviation of a temperature stream

A sensor delivers one 12-bit temperature per clock. For every sample the
caller asks for one of two statistics over the last N samples, with
N = min(samples since reset, 14):

* the **moving average**, round(Tsum / N), or
* the **moving standard deviation**.

Two clocks later the rounded 12-bit answer leaves on `avg_sd`, ready for a
transmitter. A new sample, and a new request, can be taken on every clock.

## The one-division standard deviation

A square root and two divisions per result would be expensive. The unit
avoids both. It takes one Babylonian (Newton) step,
sqrt(V) ≈ (s + V/s) / 2, where s is a guess. It writes the variance as
V = Tsum_square/N − (Tsum/N)². Multiplying through by N² leaves a single
division:

    sigma = (N²·s² + N·Tsum_square − Tsum²) / (2·N²·s)

Tsum is the sum of the window and Tsum_square the sum of its squares. The
guess s is the last standard deviation the unit produced. After reset it is
1024. Temperatures change slowly, so the previous answer is a close guess,
and one step is enough. The consequence is that a deviation is *not* the
exact square root. It depends on the history of requests, and so does the
next one. Only the average is a pure function of the window. A reference
model must therefore replay the whole request sequence. `tb/tb_noaa_module.sv`
contains one.

The same divider serves both modes:

| mode | dividend (stored doubled) | divisor |
|------|---------------------------|---------|
| 0, average | 2·Tsum | N |
| 1, standard deviation | 2·(N²·s² + N·Tsum_square − Tsum²) | 2·N²·s |

**Rounding.** The dividend is shifted left one bit before the division, so
the quotient q is twice the wanted value, truncated. The result is
(q >> 1) + q[0], which rounds half up. q is kept to 13 bits and the result
to 12. A result of 4095.5 or more wraps around. That cannot happen for an
average, but it can for a deviation computed from a very poor guess, for
example right after a long run of identical temperatures.

## Pipeline and timing

Let E_k be the rising edge that takes sample k.

| edge | what happens |
|------|--------------|
| E_k   | The register file shifts in `tn` and its square. N counts up (it stops at 14). `mode` is stored in `mode1`. |
| E_k+1 | Stage 1: the dividend and divisor for sample k are chosen by `mode1` and registered. `mode1` moves to `mode2`. |
| E_k+2 | Stage 2: the divider output is rounded and registered on `avg_sd`, and `done` is high. If `mode2` is 1, the result also becomes the new guess s. |

The latency is two clocks, and the throughput is one result per clock.
`sample` is low in the first clock after reset and high from then on; the
unit cannot be paused. `done` rises with the first result and stays high
until the next reset. `calc_state` records which stages hold data. It only
matters for the first two edges after reset.

**Guess bypass.** Suppose deviations are requested for samples k−1 and k.
Sample k's numerator is formed at E_k+1. That is the same edge at which the
deviation for k−1 is written to the guess register. The calculator therefore
takes s straight from the rounded divider output when `mode1` and `mode2`
are both 1, and from the guess register otherwise. So every deviation is
seeded with the most recent one.

**Operand isolation.** The calculator's N, Tsum and Tsum_square inputs pass
through multiplexers. When `mode1` is 1 they carry the live values. Otherwise
they carry copies held from the previous sample. The multipliers therefore
stay quiet while only averages are requested. The held values never reach an
output.

## Blocks

| file | role |
|------|------|
| `rtl/noaa_pkg.sv` | The mode type and the width functions. At the defaults they give Tsum 16 bits, Tsum_square 28, N 4, numerator 33 and denominator 22. |
| `rtl/noaa_register_file.sv` | Two 14-stage shift registers, one for the samples and one for their squares, with combinational sums. Empty stages hold 0. |
| `rtl/noaa_sample_counter.sv` | N, counting samples and stopping at 14. |
| `rtl/noaa_calc_num_den.sv` | Combinational numerator and denominator of the formula above. |
| `rtl/noaa_div_round.sv` | Combinational division and the round-half-up step. |
| `rtl/noaa_module.sv` | Top level: the sample strobe, the mode pipeline, the hold registers, the two stage registers and the guess register. |

The top's parameters are `WINDOW` (14), `TW` (12) and `SIGMA_INIT` (1024).
All widths follow from `WINDOW` and `TW`. The numerator width gains one bit
automatically if a larger window needs it.

Ports of `noaa_module`: `clk`, `reset` (synchronous, active high), `mode`
(0 for average, 1 for deviation), `tn[11:0]`, `sample`, `done` and
`avg_sd[11:0]`. The sensor and the transmitter are outside this design.

## Where this RTL makes its own choices

* A zero divisor gives a result of 0. The datapath produces one only if a
  deviation has wrapped to 0 and is then used as the guess.
* The intermediate stored numerator is 33 bits. At the default sizes the
  doubled numerator is below 8.22·10⁹, which is less than 2³³.
* The division is written as a combinational `/`. That is correct, but it is
  the longest path in the design. A target that needs a fast clock would
  replace it with a multi-cycle or pipelined divider and adjust the latency.
* An equivalent form of the rounding shifts the dividend two bits and rounds
  on quotient bit 1. Its 12-bit results are identical; this RTL uses the
  one-bit form.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/noaa_pkg.sv tb/tb_noaa_module.sv --top-module tb_noaa_module
    ./obj_dir/Vtb_noaa_module

Run the simulation from the project root, because the top-level test reads
`tb/noaa_data_100.hex`.

* `tb_noaa_module` runs the top at its default parameters.
  * First it plays a published 100-sample case. Each word of the `.hex` file
    holds {mode, temperature, expected result}. All 100 expected results are
    reproduced.
  * Then it resets in mid-stream and plays 4000 random samples in segments:
    random modes, runs of one mode, constant temperatures, and narrow or full
    temperature spreads.
  * Every result is compared with a formula-level model. The test also checks
    the two-clock latency, the `sample` and `done` behaviour, and the clearing
    on reset.
  * It counts average and deviation requests, mode switches, back-to-back
    deviations (the bypass), evictions from the full window, round-ups and
    the mid-stream reset. It fails if any of them never happens.
* `tb_noaa_register_file` samples the ramp 1…16. The sums must end at 133 and
  1491 after 1 and 2 have left the window. It then samples random values
  with a random strobe, and full scale.
* `tb_noaa_calc_num_den`, `tb_noaa_div_round` and `tb_noaa_sample_counter`
  compare each block with 64-bit arithmetic over random and corner cases.

The published 100-sample case uses temperatures from 40 to 3195. It runs in
102 clocks.

## Not covered

There is no timing, area or power information here. A 65 nm implementation
of this architecture has been reported at a minimum clock period of about
55 ns, which is roughly 18 million samples per second, and about
20,800 µm². The RTL says nothing about those numbers for another library.
