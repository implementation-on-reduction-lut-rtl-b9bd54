# Parallel-DDS chirp generator with quarter-wave sine tables

A synthetic aperture radar sends a linear-FM pulse (a chirp). Its range
resolution is c/(2B), so the wider the swept bandwidth B, the better the image.
A direct digital synthesizer (DDS) makes a chirp by accumulating a ramped
frequency into a phase and looking that phase up in a sine table. To sweep a
wide band, the DDS must run at a high sample rate. On a satellite, a fast clock
is hard to come by. The way around this is a *parallel* DDS (PDDS): several
slow DDS lanes each compute every N-th sample, and a multiplexer interleaves
them back into one full-rate stream.

The cost of that trick is memory: every lane needs its own sine table. This
design keeps only **one quarter of a sine period** in each table. It rebuilds
the other three quarters on the fly:

- It mirrors the table address for the second and fourth quarters.
- It inverts the sign for the third and fourth quarters.

The default configuration has:

- 4 lanes and a 10-bit signed I/Q output.
- A 13.3 µs pulse sweeping 75 MHz.
- A 200 MS/s output rate, so each lane runs at 50 MS/s.

The 4 lanes, the 10-bit output, the pulse width and the bandwidth are the
reference numbers. The 200 MS/s rate is this design's own choice.

```
              +-----------+  ce (1 clock in 4), load, active
 start ------>| chirp_ctrl|----------------------------+
 pulse_words->+-----------+                            |
                                                       v
 fcw_start ---+--> dds_unit[0]: chirp_phase_acc -> quarter_wave_sincos --+
 chirp_rate --+--> dds_unit[1]:        "        ->        "            --+--> pdds_mux --> out_i/out_q
              +--> dds_unit[2]:        "        ->        "            --+    (lane 0,1,2,3 per
              +--> dds_unit[3]:        "        ->        "            --+     lane tick)
                                                  (sine_quarter_rom inside each)
```

## The chirp each lane computes

The chirp is defined one output sample at a time. The frequency and phase
words are unsigned, modulo 2^32, and count cycles/sample × 2^32:

```
f[0] = F0            f[n+1]   = f[n] + K
phi[0] = 0           phi[n+1] = phi[n] + f[n]
=> phi[n] = n*F0 + K*n*(n-1)/2
out_i[n] + j*out_q[n] = A * exp(j*2*pi*phi[n]/2^32),  A = 511
```

Lane k of N produces samples n = N·m + k. Stepping one lane word means
stepping N samples. Summing the recurrence over N steps gives the lane update:

```
f_lane   <- f_lane + N*K
phi_lane <- phi_lane + N*f_lane + K*N*(N-1)/2
start values:  f_lane = F0 + k*K,  phi_lane = k*F0 + K*k*(k-1)/2
```

This is exact integer arithmetic. The four lanes together therefore give
**bit for bit** the phase sequence of a single DDS running at 200 MS/s. This
is why the testbenches can compare every output sample exactly, with no
tolerance. N is a power of two at the default, so the multiplications by N
are shifts. The products by k and by the triangular numbers are constants
times a run-time input.

F0 and K are run-time inputs. The defaults in `pdds_pkg` centre the sweep on
DC, from -37.5 MHz to +37.5 MHz:

| constant            | value         | formula                          |
|---------------------|---------------|----------------------------------|
| `FCW_START_DEFAULT` | `32'hD0000000` | -37.5e6/200e6 · 2^32            |
| `CHIRP_RATE_DEFAULT`| 605494        | 75e6 / (13.3e-6 · 200e6²) · 2^32 |
| `PULSE_WORDS`       | 665           | 13.3e-6 · 200e6 / 4              |

For a different sample rate fs, pulse width T or bandwidth B, use
F0 = f_start/fs·2^32, K = B/(T·fs²)·2^32 and pulse_words = T·fs/N. A negative
K (two's complement) gives a down-chirp.

## Quarter-wave phase-to-amplitude conversion

The top 10 bits of the 32-bit phase address one full period of 1024 points.
The lower 22 bits are truncated. The top two of those 10 bits are the
quadrant q, and the low 8 bits are the index i.

```
ROM[i] = round(511 * sin(2*pi*(i + 0.5)/1024)),  i = 0..255   (256 x 9 bits)

q = 0 : +ROM[i]     q = 1 : +ROM[~i]     q = 2 : -ROM[i]     q = 3 : -ROM[~i]
```

The table is sampled half a step off zero. This makes the stored quarter
exactly symmetric, so reading it backwards (`~i`) gives the second quarter
with no duplicated or missing point. Without the half step, the peak and the
zero would each need special handling.

The table stores magnitudes only, 9 bits, and the sign is added afterwards.
The cosine (the I output) is the sine one quarter later: quadrant q+1, same
index. It uses the same table through a second read port. One lane's table is
therefore 2,304 bits, where a full signed period would take 1,024 × 10 =
10,240 bits. For the four lanes that is 9,216 bits instead of 40,960 (22.5 %).
Each extra output bit doubles what a full-period table costs. The quarter
table saves the same factor of four plus the sign bit.

`sine_quarter_rom` computes the table at elaboration with `$sin`, so no data
file is needed. Synthesis turns it into a ROM. Each lane instantiates its own
copy, as the PDDS structure requires.

## Timing

There is one clock, `clk`, at the output sample rate. `chirp_ctrl` divides it
by N into a clock enable `ce`. Everything in the lanes, including the table
reads, advances only on `ce`, so the lanes run at a quarter of the output rate
and the tables can be constrained as multicycle paths. Only the MUX selection
runs every clock.

| step                                  | when                                   |
|---------------------------------------|----------------------------------------|
| `start` seen while `busy` is low      | any clock                              |
| `load` (lanes take sample 0)          | next `ce`, at most N clocks later      |
| phase register holds word m = 0       | after the load edge                    |
| fold, ROM read, sign stages           | next three `ce` edges                  |
| MUX captures the lane word            | fourth `ce` edge after load            |
| first sample on `out_i/out_q`         | 4·N + 1 clocks after the `load` clock (17) |
| pulse                                 | `pulse_words`·N consecutive samples with `out_valid` |

Outside the pulse, `out_i`, `out_q` and `out_valid` are zero. This is the
rect(t/T) window of the chirp. A `start` during a pending or running pulse is
ignored. `pulse_words = 0` gives a one-word pulse. `lane_i/lane_q` with
`lane_valid` expose the four samples of each lane word before the MUX. They
are valid across the whole N-clock lane period.

Reset `rst_n` is asynchronous and active low. It clears the control state,
the valid pipeline and the accumulators. The data registers are not reset,
because `out_valid` and the zero window hide them.

## Interface of `pdds_chirp_top`

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`, `rst_n`| in  | 1     | output-rate clock, async active-low reset |
| `start`       | in  | 1     | request one pulse |
| `fcw_start`   | in  | 32    | F0, frequency word of sample 0 |
| `chirp_rate`  | in  | 32    | K, frequency increment per sample |
| `pulse_words` | in  | 16    | pulse length in lane words (samples / N) |
| `busy`        | out | 1     | pulse pending or running |
| `out_valid`, `out_i`, `out_q` | out | 1, 10, 10 | serial I (cosine) and Q (sine), signed |
| `lane_valid`, `lane_i`, `lane_q` | out | 1, 4×10, 4×10 | same samples per lane, lane k = sample 4m+k |

`fcw_start`, `chirp_rate` and `pulse_words` are captured on the clock where
`start` is accepted. They may change freely while a pulse runs.

Parameters: `P_N_DDS` (4), `P_OUT_W` (10), `P_PHASE_W` (32), `P_PHASE_BITS`
(10, must be ≥ 3) and `P_CNT_W` (16). The sub-blocks take the same parameters
under shorter names. The lane recurrence holds for any N, but only N = 4
has been simulated. The sine/cosine converter has been simulated at 10 and at
12 bits of phase and output. The MUX asserts that `ce` comes exactly
once every N clocks.

## What comes from the reference and what does not

These parts follow the reference:

- The PDDS structure: 4 DDS lanes feeding a MUX.
- One sine table per lane.
- Storing a quarter period, and rebuilding the full period by time mirroring
  and amplitude inversion.
- The 10-bit output, the 13.3 µs pulse and the 75 MHz bandwidth.
- The table covering 2^n phase points for n output bits.

These are this design's own choices:

- The 200 MS/s output rate, and the placement of the band at ±37.5 MHz.
- The 32-bit accumulators and the 10-bit phase truncation.
- The strided lane recurrence.
- Producing both I and Q from one dual-port table.
- The half-step table sampling.
- The single clock with a clock enable, in place of a separate slow lane
  clock.
- The three-stage pipeline.
- The controller and its start/length interface.
- The zero window.

The reference compares against a full-period table. That baseline is not
included here.

The clock generator and the DAC that follow the MUX are outside this RTL.
`clk` comes in from outside, and `out_i/out_q` go out at the full rate.

Spectral quality was not measured. The outputs are checked only against the
ideal quantised chirp. The expected spurious level follows from the 10-bit
phase truncation, about -60 dBc.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
Each also has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_sine_quarter_rom` | all 256 entries on both ports against rounded `$sin`; 1-clock read; hold when disabled |
| `tb_quarter_wave_sincos` | all 1024 phases, then 3072 random ones with irregular `ce`, against full-period `$sin/$cos`; 3-`ce` latency; all quadrants; a 12-bit instance swept in full |
| `tb_chirp_phase_acc` | 4 lanes against the closed-form phi[n], default and random F0/K, reload mid-sweep, no movement without `ce` |
| `tb_dds_unit` | lane 2 through a whole default pulse, I/Q values and latency |
| `tb_chirp_ctrl` | `ce` period, `accept` and `load` timing, pulse length in `ce` and in clocks, length captured at start, ignored starts, zero length |
| `tb_pdds_mux` | lane order, one-clock spacing, zeros for invalid words |
| `tb_pdds_chirp_top` | the full default design, end to end (see below) |

`tb_pdds_chirp_top` runs the design at its default parameters. It sends six
pulses:

1. The 2660-sample reference chirp.
2. A down-chirp over the same band.
3. Four random pulses with random settings and lengths.

It compares every serial and every lane sample exactly with the closed-form
chirp, about 27,000 checks in under a second of simulation. It also checks:

- The 17-clock latency and each pulse's length.
- That the output is zero outside the pulse.
- That starts during a pulse are ignored.
- That new settings applied during a pulse leave it untouched.
- That all four quadrants are used on both I and Q.

It counts how often each of these happens.

The reference values come from `tb/pdds_tb_pkg.sv`. This package computes the
phase from the closed form and the amplitude from `$sin/$cos` of the full
period, without any folding.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_pdds_chirp_top rtl/pdds_pkg.sv tb/pdds_tb_pkg.sv tb/tb_pdds_chirp_top.sv
./obj_dir/Vtb_pdds_chirp_top
```

For the other testbenches, change the top module and the last file. Lint a
module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/pdds_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are expected:

- The unused constants of the package.
- The truncated low phase bits.
- The reset being used both in flops and in the assertions' `disable iff`.

## Files

- `rtl/pdds_pkg.sv`: default sizes and frequency words.
- `rtl/sine_quarter_rom.sv`: the quarter-period table, two read ports.
- `rtl/quarter_wave_sincos.sv`: quadrant folding, table read, sign; sine and cosine.
- `rtl/chirp_phase_acc.sv`: strided frequency/phase accumulator of one lane.
- `rtl/dds_unit.sv`: one lane, accumulator plus converter.
- `rtl/chirp_ctrl.sv`: lane clock enable, pulse start and length.
- `rtl/pdds_mux.sv`: the lane-to-serial multiplexer with the zero window.
- `rtl/pdds_chirp_top.sv`: the generator.
- `tb/`: one testbench per module, plus the reference-model package.
