# All-digital BPSK/QPSK modem with carrier and symbol-timing recovery

This is a BPSK/QPSK transmitter and receiver that run on a single 120 MHz sample clock. The
receiver has three closed loops:
- an adapted Costas loop for the carrier;
- a slow phase stabiliser;
- a Gardner clock-and-data-recovery loop for the symbol timing.

Together they remove a carrier frequency offset and a symbol-rate offset between the two ends.
In simulation the chain locks, with zero bit errors, at the following conditions:
- carrier offsets of ±200 kHz;
- symbol-rate offsets of ±14 kHz;
- 1 Mbps BPSK, 5 Mbps BPSK and QPSK, and 6 and 10 Mbps QPSK, at a 30 MHz intermediate frequency (IF).

Not every combination was run. The ±14 kHz symbol-rate offset was tested at 5, 6 and 10 Mbps. See
"What the testbenches cover" for the exact cases.

The transmitter is built as a test source:
- Its bits come from two seeded LFSRs, so a receiver can recompute them and count bit errors.
- Its symbol clock is a DDS, so the symbol rate and timing can be shifted precisely.
- A noise source and shift attenuators set the signal-to-noise ratio.

Everything is in `rtl/`: one module or package per file, all synthesizable, sharing `modem_pkg`.
Each testbench in `tb/` checks one block against values it computes on its own.

## Signal path

```
 data_generator -> level_converter -> shaping_filter -> upconverter -> signal_attenuator --+
 (DDS clock, 2 LFSRs)  (polar NRZ hold)  (raised cosine)  (DDS carrier)   (shift)            |
                                                               noise_generator --(+)---------+
                                                                                  | rx_if
 symbol_decider <- clock_data_recovery <- phase_stabilizer <- carrier_recovery <- ddc
  (sign -> bits)     (Gardner, 4x DDS)     (slow phase loop)    (Costas loop)   (DDS, mixers, LPF)
                                                                agc watches rx_if -> agc_gain
```

`modem_top` wires this chain together:
- The offsets are simply differences between frequency words. The carrier offset is
  `ddc_freq − carrier_freq`. The symbol-rate offset is `cdr_freq/4 − tx_sym_freq`.
- Every frequency word is `f · 2^32 / f_clk`.
- `shape_sel` chooses the shaping filter's bank entry for the symbol rate, and `shape_bypass` turns
  shaping off.
- The mode, gains and offsets may change while the modem is running. A BPSK/QPSK switch needs no reset.
- The transmitted reference bits are brought out next to the decided bits, so a bit-error counter
  can sit outside.

### Number formats

| Quantity | Format |
|---|---|
| Samples | 16-bit two's complement, full scale ±32767 |
| Phases in the loops | Q3.13 radians (π = 25735), carried with 16 extra fraction bits (Q3.29) inside the accumulators |
| DDS and CORDIC angles | Binary angles, 2^16 = one turn |
| Loop gains | Right shifts (`g = 2^-k`), so no loop needs a multiplier for its gain |

## Transmitter

- **`lfsr`**: a 10-bit Fibonacci register.
  - Its feedback is bit 9 XOR bit 6, shifted in at bit 0, and bit 0 is the output. This gives period 1023.
  - Reset loads the seed, and `step` is a clock enable.
- **`data_generator`**: a DDS sine at the symbol rate.
  - Its sign is edge-detected, and each rising edge steps the I and Q LFSRs.
  - The DDS phase offset delays the data stream by a fraction of a symbol.
  - In BPSK the Q bit is held at 0.
- **`level_converter`**: maps bit 1/0 to ±32767 and holds the level for the symbol. This is a
  nearest-neighbour resampler.
- **`shaping_filter`**: a direct-form raised-cosine FIR with a small coefficient bank.
  - Roll-off 0.25, span of 4 symbols, 97 taps.
  - `rate_sel` picks the coefficients for 24, 20 or 12 samples per symbol. At 120 MHz these are
    5, 6 and 10 Msym/s.
  - The shorter responses are zero-padded around the same centre tap, so all entries have the
    same group delay.
  - The taps are computed at elaboration from the impulse response, scaled so that they sum to 2^15.
  - `bypass` passes the NRZ signal unshaped.
  - There is no entry for 1 Msym/s, which would need 481 taps, so 1 Mbps can only be sent unshaped.
- **`upconverter`**: `I·cos − Q·sin` from its own DDS, scaled by 2^-16.
- **`signal_attenuator`**: a signed shift. A left shift saturates.
- **`noise_generator`**: four 32-bit Galois LFSRs, each advanced 16 steps per clock.
  - Their 16-bit words are averaged, which gives a roughly Gaussian sample.
  - `atten` shifts the level down in 6 dB steps.

## Receiver

### Down-conversion (`ddc`)
- The real IF sample is multiplied by the cosine and the negated sine of a DDS.
- The two products are low-pass filtered by an 8-tap moving sum.
  - For a 30 MHz IF at 120 MHz, the filter's nulls fall on the 60 MHz image.
- The filter is followed by an optional down-sampler (`DEC`, default 1).
- If you move the IF, check that the image still falls in a null. Otherwise replace the filter.

### Carrier recovery (`carrier_recovery`)
This is a Costas loop working on baseband samples:
1. A phase shifter (`phase_shifter`: CORDIC sine/cosine and a complex multiplier) turns each
   sample by θ.
2. A cross-product detector measures the remaining phase error:
   `e = Q·sgn(I) − I·sgn(Q)`, where `sgn(x)` is +1 for `x > 0` and −1 otherwise.
3. A PI filter (`pi_loop_filter`) forms `X2 = g_p·e + Σ g_i·e`.
4. A second accumulator updates `θ ← wrap(θ − X2)`.
   - The wrapper (`phase_wrapper`) keeps θ in [−π, π].
   - Under a frequency offset, θ is a saw-tooth.
   - The filter's integral settles at the offset in radians per sample (`freq_est ≈ ω·2^29`).

The QPSK detector is used in both modes. A BPSK signal therefore locks with its points on the
diagonals, 45° away from the real axis. The phase stabiliser turns them back.

Tested gains: `kp = 6`, `ki = 11`, which makes `g_p = 32·g_i`.

### Phase stabiliser (`phase_stabilizer`)
- This is a second, slower rotation loop with a pure integrator, `H(z) = g/(1 − z^-1)`.
- Its detector follows the active scheme:
  - QPSK uses the cross product;
  - BPSK uses `Q·sgn(I)`, which pulls the points onto the real axis.
- It removes what the carrier loop leaves: the residual rotation at large offsets, and the 45° of BPSK.
- `enable = 0` holds θ at 0.
- Tested gain: `kg = 12` in the full chain.

### Clock and data recovery (`clock_data_recovery`)
This is the hardest part to follow, because no clock is derived.

1. A DDS runs at four times the nominal symbol rate.
2. Its sine drives a Schmitt trigger (`gardner_sampler`), which goes low below −16384 and high
   above +16384.
3. A 2-bit counter advances on each rising edge of the trigger:
   - Each time the counter becomes odd, one complex sample is shifted into a three-stage register.
     This happens at 2× the symbol rate.
   - When the counter goes from 1 to 2, the register is copied to `y[n]`, `y[n−1]` and `y[n−2]`,
     and `sym_strobe` pulses.
4. `gardner_ted` computes the Gardner error `(y[n−2] − y[n])·y[n−1]`, summed over I and Q and
   scaled by 2^-15.
5. A PI filter (no fraction bits, wrapping) integrates the error.
6. Its low 16 bits, negated, are the DDS phase offset. One wrap of that 16-bit value is a quarter
   symbol.
7. The recovered symbol is `y[n]`.

A symbol-rate offset makes the filter output ramp without bound, which the wrap absorbs.

The loop has one integrator, so a rate offset leaves a standing timing error. To hold 0.28 %,
that error must stay inside the detector's range:
- In the full chain (`kp = 6`, `ki = 3`), BPSK holds +14 kHz and QPSK holds −14 kHz at 5 Msym/s.
- With a BPSK-only error signal of amplitude 16000, the block test needs `ki = 2`.
- Flat-topped NRZ with very sharp edges gives the Gardner detector a dead zone. The loop needs the
  band-limited edges that the transmit path and the DDC filter provide.

### Decision and AGC
- **`symbol_decider`**: slices I and Q by sign into `bits = {I>0, Q>0}` with a strobe. It also
  gives a serial stream: the I bit, then the Q bit in QPSK.
- **`agc`**: estimates the RMS level and derives a gain.
  - The RMS level comes from a leaky mean square (time constant `2^avg_shift`) and an integer
    square root.
  - It forms `e = level − desired`.
  - It steps the gain by `−f(e)·e`:
    - `f(e) = 2^-s1` when e is below the dead zone `±delta_l`;
    - `f(e) = 2^-s2` above it;
    - `f(e) = 0` inside it.
  - With `s1 > s2`, the gain falls fast and rises slowly.
  - The gain is a Q8.8 code meant for an analog gain stage ahead of the ADC. The all-digital path
    has no such stage, so `modem_top` only brings the gain out.

## Latencies

| Block | Latency |
|---|---|
| CORDIC | 1 clock |
| DDS | 1 clock |
| Phase shifter | 2 clocks |
| Carrier loop | 2 clocks through, 5-clock loop delay |
| Phase stabiliser | 2 clocks through, 4-clock loop delay |

Every block accepts a sample on every clock.

## Where this design departs from its source description

- **Vendor cores.** The DDS, CORDIC, FIR and low-pass filters are vendor cores in the original
  design. Here they are written out: a 32-bit phase accumulator, a 16-iteration unrolled CORDIC,
  a direct-form FIR and a moving-sum filter.
- **Shaping filter.** The original shaping uses a filter bank, one filter per data rate. Here the
  bank covers 5, 6 and 10 Msym/s, but not 1 Msym/s.
- **AGC.** The AGC was a host-software loop driving the radio's analog gain. Here it is RTL whose
  output is a port.
- **Out of scope.** The radio front end, the PCI-e transfer to a host and the host's bit-error and
  SNR software are not part of this RTL. The testbenches count bit errors themselves.
- **Noise source.** It is this design's own construction. Only its role (additive Gaussian noise
  with adjustable level) is given.
- **Own choices.** These were chosen here:
  - all fixed-point formats;
  - the BPSK detector of the phase stabiliser;
  - the sign conventions of the loops;
  - the Schmitt thresholds read as signed values;
  - the DDC filter and decimation;
  - the AGC estimator.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a watchdog.

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/modem_pkg.sv tb/tb_modem_top.sv -o sim
./obj_dir/sim
```

Use the same command for any `tb/tb_<block>.sv`.

### What the testbenches cover

**`tb_modem_top`** runs the whole transceiver at its default parameters. It covers:
- BPSK and QPSK;
- shaped and unshaped transmission;
- ±100 and ±200 kHz carrier offsets;
- +5, ±10 and ±14 kHz symbol-rate offsets;
- noise;
- mode switches without reset;
- AGC gain moving in both directions.

It searches over the lag and the carrier phase ambiguity, as a receiver correlating against the
known LFSR sequence would. It counts each mechanism and fails if any of them never happened.

**`tb_modem_rates`** repeats the end-to-end test at 1 Mbps BPSK and at 6 and 10 Mbps QPSK. It runs
unshaped at all three rates, and shaped at 6 and 10 Mbps.

Each whole-chain test runs in seconds.

### What was not done

- BER-versus-SNR curves were not simulated. They need millions of bits and a calibrated noise level.
- Shaped 10 Mbps QPSK locks only without a symbol-rate offset. With the tested clock-recovery gains
  it slips symbols at a 5 kHz offset. A likely cause, not yet confirmed: at 12 samples per symbol,
  the shaping and the receive filter leave the Gardner detector little slope.
- Shaped 1 Mbps needs a bank entry that is not built.
