# Real-time nonlinear digital self-interference canceller

An in-band full-duplex radio transmits and receives at the same time on the
same frequency through one antenna. Its own transmission leaks into the
receiver through the circulator, is reflected by the antenna and comes back
by multipath. That self-interference can be 100 dB or more above the wanted
signal. An analog RF canceller removes most of it. This RTL removes what is
left in the digital domain, at the sample rate and while adapting.

The transmit power amplifier distorts the signal nonlinearly, so a linear
echo canceller is not enough. The canceller models the leakage with a
**parallel Hammerstein** model. The known transmit samples x(n) are expanded
into odd-order basis functions

    phi_p(x) = |x|^(p-1) x,   p = 1, 3, 5, 7

These are decorrelated by an orthogonalization matrix. Each one then passes
through its own FIR filter, and the filter outputs are summed. The sum is the
estimate of the self-interference, and it is subtracted from the received
signal. The filter coefficients adapt sample by sample with complex LMS.

The design follows a published FPGA implementation. The model size, word
lengths, step size, clock and sample rates and latency are that
implementation's. The pipelining, control, memory organisation, receive
filter and rounding details are this design's own (see
[Departures and own choices](#departures-and-own-choices)).

## The algorithm as built

For received sample n, u(n) is the regressor. It holds the four orthogonalized
basis values of transmit samples n+13 down to n-13: 13 pre-cursor taps and 14
post-cursor taps, the latter counting the current sample. That makes 27 taps
per basis function and 108 complex coefficients h. Per sample:

    y_DC(n) = y_RF(n) - h(n)^H u(n)                 cancelled output
    h(n+1)  = h(n) + 2^-13 * conj(y_DC(n)) * u(n)   LMS update

The coefficients start at zero. The step size 2^-13 is a right shift.

**Basis functions are not computed in hardware.** The transmitter repeats one
fixed sequence. The host therefore computes the orthogonalized basis values
of that sequence off-line and loads them into a block RAM (`basis_mem`). The
canceller reads the RAM cyclically, wrapping at the sequence length.
Generating the basis functions on chip is not part of this design.

## Data path and word lengths

```
 ADC 130 MHz ──► rx_decimator ──► y_RF 26 MHz ──► (+) ──► y_DC (Q1.15)
 (Q1.15 I/Q)     15-tap LPF, ↓5                  - ▲        │
                                                   │        ▼
 host ──► basis_mem ──► basis_tapline ──► u(n) ──► hp_branch x4 ──► Σ
          4096 x 200b   27-word shift reg          (h_1,h_3,h_5,h_7)
                                          └──────► lms_update ◄── y_DC
```

| quantity                           | format | bits per I or Q |
|------------------------------------|--------|-----------------|
| received and cancelled samples     | Q1.15  | 16              |
| basis values in memory             | Q8.17  | 25              |
| coefficients                       | Q1.24  | 25              |

(Qm.f: m integer bits including the sign bit, f fractional bits.)

The estimate h^H u is kept at full precision: products in Q10.41, and sums
with enough guard bits that nothing overflows. It is subtracted from y_RF
aligned to 2^-41. The result is truncated to Q1.15 by dropping the low bits
(rounding toward minus infinity) and saturated to 16 bits. `out_sat` flags a
clipped sample. The 16-bit cancelled sample is also the error used by the
update. The update term conj(e)·u is exact (Q10.32). It is shifted right by
15+17−24+13 = 21 bits to the coefficient LSB, **rounding to nearest**. This
matters. Truncating here would add half an LSB of bias to all 108
coefficients on every update. The loop can only cancel that bias by keeping
a residual error correlated with u. With the test signals used here, that
error is a floor about 20 dB above the receiver noise. The sum h + update is
saturated to the Q1.24 range.

## Timing: 5 clocks per sample, 17 clocks of delay

The canceller runs on the 130 MHz clock, and samples arrive at 26 MHz, one
every 5 clocks. Exact LMS needs h(n+1) before sample n+1 is filtered. The
whole loop therefore has to close within 5 clocks. All 108 complex products
and all 108 updates are computed in parallel. The loop is:

| clock | work                                                                   |
|-------|------------------------------------------------------------------------|
| c0    | `in_valid`: y_RF taken; conj(h)·u products registered in each branch   |
| c1    | per-branch sums of 27 products registered                              |
| c2    | four branch sums added, y_DC formed, truncated, saturated, registered  |
| c3    | coefficients updated; regressor shifted to u(n+1)                      |

The next sample may therefore arrive at c4, so samples must be at least
4 clocks apart. An assertion checks this. The cancelled sample then goes
through an alignment delay line, so `out_valid` comes exactly `LAT` = 17
clocks after `in_valid`: the published 130 ns delay. The decimator adds one
clock between its last input and `rx_valid`.

## The regressor and the repeating sequence

`basis_tapline` keeps the 27 basis words of u(n) in a shift register.
`taps[0]` holds transmit sample n+13 and `taps[26]` holds n−13. After each
sample, the prefetched word of n+14 is shifted in and the next read starts,
so one RAM read port is enough.

The received samples must line up with the stored sequence. A `sync` pulse
restarts the sequence. The register is then refilled with one read per clock
(27 reads plus a prefetch), and `ready` rises 28 clocks after the clock edge
that took `sync`. The first decimated sample after that is paired with
sequence index 0. The LMS pre- and post-cursor taps absorb a residual offset
of a few samples. Where in the stream to pulse `sync` is up to the system.
While `ready` is low, samples pass through uncancelled and nothing adapts.
`seq_len` (1..4096, more than 27) sets the sequence length at run time.
`wrap` pulses when the last word of the sequence is read.

## Modules

| module          | role                                                                 |
|-----------------|----------------------------------------------------------------------|
| `sic_pkg`       | formats, model size, sample/word types, saturation helper            |
| `fd_sic_top`    | top: decimator + basis RAM + canceller                               |
| `rx_decimator`  | 15-tap low-pass FIR at 130 MHz, keeps every 5th output               |
| `basis_mem`     | 4096 × 200-bit simple dual-port RAM, 1-clock read, host write port   |
| `basis_tapline` | regressor shift register, sequence address, sync/fill, wrap          |
| `sic_canceller` | canceller core: schedule, error, alignment delay, control            |
| `hp_branch`     | coefficients and FIR of one basis function (h_1, h_3, h_5, h_7)      |
| `lms_update`    | combinational LMS update of all coefficients                         |

Top-level ports of `fd_sic_top`:

* **Receiver:** `adc_valid`, `adc_samp` (130 MHz, Q1.15 I/Q).
* **Host:** `bm_wr_en/addr/data` loads the basis RAM. `seq_len` and `sync`
  align the sequence.
* **Control:** `adapt_en` freezes adaptation when low. It is sampled with
  each input sample. `coef_clear` zeroes all coefficients and wins over an
  update in the same clock.
* **Coefficient monitor:** `coef_rd_idx` (p·27 + k, p = 0..3 for orders
  1, 3, 5, 7) selects the coefficient shown on `coef_rd_data`. It can be used
  to watch the coefficients track a changing channel.
* **Outputs:** `rx_valid`/`rx_samp` (the decimated input, for observation),
  `out_valid`/`y_dc`/`out_sat` (cancelled signal), `ready`, `wrap`.

The radio front end, power amplifier, circulator, RF canceller and host
computer are outside the RTL.

Parameters (all default to the published values except `DEPTH`): `M1` = 13,
`M2` = 14, `MU_SH` = 13, `LAT` = 17 (at least 4), `DEPTH` = 4096. The word
lengths and the number of basis functions (4) are fixed in `sic_pkg`.

## Departures and own choices

* **Tap count.** Counting n+13 down to n−14 gives 28 taps, but the published
  implementation uses 27 taps and 108 coefficients. This design uses 27 taps
  and counts the current sample among the 14 post-cursor taps.
* **Receive filter.** Only "low-pass filter, decimate by 5" is specified.
  The default taps form a 15-tap Hamming-windowed sinc with cutoff at 13 MHz:
  c[k] = round(32768 · w[k] · 0.2·sinc(0.2(k−7)) / Σ), with w the Hamming
  window. The taps are a parameter (`COEFS`). In the published system this
  filter may sit in the transceiver's own FPGA rather than next to the
  canceller.
* **Memory depth.** 4096 words is this design's choice. The sequence length
  of the published system is unknown.
* **Latency.** The arithmetic needs 3 clocks. The rest of the 17 clocks is
  a plain delay line that keeps the published timing. Lower `LAT` to save it.
* **Rounding and overflow.** The output is truncated (floor). The
  coefficient update rounds to nearest. Output and coefficients saturate.
  The update uses the 16-bit truncated output as its error.
* **Control.** `sync`/`ready`, bypass before sync, `adapt_en`, `coef_clear`,
  the host write port and the coefficient monitor are this design's own
  interface.
* **Resources.** Computing everything in parallel takes 864 real
  multipliers (432 for filtering, 432 for the update). That is about the DSP
  budget of a mid-size FPGA. A time-multiplexed version over the 5 clocks
  would use fewer, but it is not provided.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_rx_decimator`: every output against a 64-bit model of the filter. Also
  checks the 1-in-5 output rate, idle clocks, saturation and DC gain.
* `tb_basis_mem`: full-memory write/read, read latency, hold, and
  read-before-write.
* `tb_basis_tapline`: every tap of every sample against the expected
  sequence index, across wraps. Also checks fill time, wrap count, and resync
  with another length.
* `tb_hp_branch`, `tb_lms_update`: exact sums and updates against integer
  models, including extreme values and coefficient saturation.
* `tb_sic_canceller`: a bit-exact model of the LMS recursion predicts every
  output, its saturation flag and its 17-clock latency, and every
  coefficient. Also checks bypass, fill time, freeze, clipping and clear. With
  white basis values and a sparse nonlinear channel, the residual falls by
  about 40 dB.
* `tb_fd_sic_top`: end-to-end at the default size. It loads the full
  4096-word sequence, streams ADC samples from reset (bypass before sync),
  adapts over more than one pass of the sequence (address wrap), then freezes,
  clips and clears. The model includes the decimating filter. The test counts
  every mechanism and fails if any never happened. It runs in a few seconds.
  The residual falls by about 58 dB, to the noise floor.
* `tb_fd_sic_workloads`: the two kinds of experiment the canceller serves,
  with synthetic signals on the full-size top.
  * **Level sweep.** Leakage at four levels 12 dB apart. The residual
    settles at the noise floor (about 8.5 dB re 1 LSB²) every time, so the
    cancellation falls from about 63 dB to 27 dB as the input weakens.
  * **Tracking.** The channel phase turns a quarter turn over 6000 samples.
    Cancellation stays above 20 dB while the channel moves (about 24 dB is
    reached). The residual then returns to the floor, and the monitored main
    coefficient turns by the same quarter turn.

Running a test with Verilator 5 from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fd_sic_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/sic_pkg.sv tb/tb_fd_sic_top.sv
./obj_dir/Vtb_fd_sic_top
```

Lint a module with
`verilator --lint-only -Wall -y rtl rtl/sic_pkg.sv rtl/<module>.sv`.
The Verilator warning SYNCASYNCNET comes from the assertions. They sample
the asynchronous reset synchronously in `disable iff`, and the warning is
harmless.

The tests check the RTL against its own fixed-point specification, with
synthetic signals. They do not reproduce RF measurements. How much
cancellation real hardware reaches depends on the quality of the off-line
basis functions and on the channel.
