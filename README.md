# Parallel digital-resampling waveform generator

An arbitrary waveform generator that plays stored samples "point by point" has
to change the DAC clock to change the playback rate. The images of the signal
then move with the clock (they sit at `f_s - f_o`), and no single
reconstruction filter can remove them at every rate. This design keeps the DAC
at one fixed rate `f_DAC`. It plays the waveform at a virtual, freely chosen
rate `f_s` and converts it to `f_DAC` with a variable-fractional-delay
(Farrow) interpolator. The images then always sit near `f_DAC - f_o`, where a
fixed low-pass filter at `f_DAC / 2` removes them. The output frequency is
still `f_o = f_s / N_length`, exactly as in direct playback.

A 2 GS/s DAC is faster than FPGA logic, so the resampler works on `K` output
samples per clock. The hard part is that resampling from a lower rate to a
higher one is irregular: some output samples move on to a new input sample
and some do not. A phase controller therefore works out, for every lane and
every clock, which input samples that lane needs and where it falls between
them. A bank of shift registers keeps those input samples at hand.

The structure follows *An Arbitrary Waveform Synthesis Structure with High
Sampling Rate and Low Spurious* (Zhao, Tian, Guo, You, Wu, Liu, 2022). Widths,
handshakes, the number of lanes and several details are this
implementation's own; they are listed under [Departures and
choices](#departures-and-choices).

## Signal flow

```
 clk_var domain                          |  clk domain (f_DAC / K)
                                         |
 awg_addr_gen --> awg_wave_lut --K smp-->| awg_async_fifo --K smp--> awg_resampler --K smp--> DAC
   (word address,   (waveform memory,    |  (dual clock,               |  awg_phase_ctrl
    wraps at length) host-loaded)        |   16*K-bit words)           |  awg_sample_regs
                                         |                             |  awg_coef_regs
                                         |                             |  awg_fir_bank (K x awg_farrow_path)
```

* **Waveform source** (`awg_addr_gen`, `awg_wave_lut`). It reads the stored
  waveform in order, `K` samples per word, and wraps at the programmed length.
  It writes words into the FIFO for as long as the FIFO has room. Its clock
  only has to be fast enough: the rate at which samples are consumed is set
  by `omega`, not by `clk_var`.
* **Sample FIFO** (`awg_async_fifo`). This is a dual-clock FIFO of 16 words of
  `16*K` bits, with Gray-coded pointers. Its read side is first-word
  fall-through.
* **Parallel resampler** (`awg_resampler`). It produces `K` DAC samples per
  clock, lane 0 first in time.

The default sizes are `K = 8` lanes (2 GS/s from a 250 MHz clock), `M = 11`
sub-filters of `2N+1 = 11` taps, 16-bit samples and a 16384-sample waveform
memory.

## Phase controller: which samples, and where between them

Let `omega = f_s / f_DAC < 1`. It is held as a 32-bit fraction. Output sample
`j` lies at input position `j * omega`:

* it belongs to input sample `J = floor(j * omega)`;
* it lies at the fraction `u = frac(j * omega)` of the way to `J + 1`.

The controller never multiplies by `j`. It keeps a phase `eta` of 33 bits: the
32-bit fraction plus one **sign bit** on top. Each clock it forms
`eta + omega, eta + 2*omega, ..., eta + K*omega`, one per lane. Because
`omega < 1`, the sign bit toggles exactly when a lane's phase passes a whole
input period. For each lane:

* `en[p] = sign(eta[p-1]) XOR sign(eta[p])`: the lane moved on to the next
  input sample.
* `base[p] = base[p-1] + en[p]`: the lane's input sample `J`, given as a
  position in the sample registers.
* `u[p]` = the top 16 bits of the fraction of `eta[p]`: the time interval.

Example: with `T_s` between `2 T_DAC` and `3 T_DAC` (`omega` between 1/3 and
1/2), outputs 0, 1 and 2 use input 0. Output 3 crosses 1.0, flips the sign
bit and moves to input 1.

The first output has phase 0. Its base is `N`, so it coincides with input
sample `N` and has a full window of `N` samples on each side.

`omega` may be changed while the generator is streaming. A new value applies
from the next clock. The phase carries on from where it was, so the change
is phase-continuous: the output stays on the waveform and only its playback
rate changes.

### Register update

The sample registers are `L` registers of `K` samples each, `Reg(0)` (oldest)
to `Reg(L-1)` (newest). Together they act as a window of `L*K` samples. Lane
`p` reads positions `base[p]-N .. base[p]+N`.

At the end of every clock the controller looks at the last lane's base. If
`base - N > K - 1`, no lane will need `Reg(0)` again, so:

* the registers shift down one register (`Reg(i) <= Reg(i+1)`);
* `Reg(L-1)` takes the next FIFO word;
* the carried base drops by `K`.

The carried base therefore never exceeds `N+K-1`. Within one clock it can
grow by up to `K`, so the window must reach position `2N+2K-1`. That gives
`L = ceil((2N+2K)/K)`, which is 4 for the defaults. The published formula,
`ceil((2N+K)/K) = 3`, counts only the span of one clock's outputs. It leaves
out the up to `K-1` samples of slack that the update rule allows, and with 3
registers the last lanes would read past the window. An assertion in
`awg_phase_ctrl` checks the carried-base bound.

### Start and stalls

* **Priming.** When `rs_run` rises, the controller first fills all `L`
  registers from the FIFO, one word per clock while the FIFO is not empty.
  Then it streams.
* **Stall.** If an update is due while the FIFO is empty, the whole clock
  stalls. No output is valid (`dac_valid` is low `M+2` clocks later), no
  state moves, and `ev_stall` pulses. The next clock repeats the same work.
  The sample stream therefore stays exact, but it has a gap. In a real system
  a gap is a glitch on the DAC, so the source must keep up: `clk_var * K`
  must be at least `f_DAC * omega`.

## Farrow filter bank

Each lane (`awg_farrow_path`) evaluates

```
y = sum_{m=0}^{M-1} u^m * H(m),     H(m) = sum_{t=0}^{2N} a(m,t) * x[J-N+t]
```

The `M` sub-filters run in parallel. They are combined in Horner form,
`((H(M-1)*u + H(M-2))*u + ...)*u + H(0)`, one multiply-add per pipeline
stage. All `K` lanes share one coefficient set. The full bank has
`K*(M*(2N+1) + M-1) = 1048` multipliers at the default sizes. Generic
synthesis of `awg_top` gives about 24,000 flip-flop bits, mostly in the
filter pipelines, plus 256 Kbit of waveform memory.

Fixed point (all widths are in `awg_pkg`):

| quantity | format |
|---|---|
| samples | 16-bit signed |
| coefficients `a(m,t)` | 24-bit signed, 20 fractional bits (range +-8) |
| `u` | 16-bit unsigned fraction |
| `H(m)`, Horner accumulator | 40-bit signed, with 8 fractional guard bits |
| output | rounded to nearest, saturated to 16 bits |

Each sub-filter sum and each Horner product is truncated (floored) to the
8 guard bits. Only the final rounding costs a full LSB. In simulation the
outputs stay within 1-2 LSB of the ideal waveform.

**Coefficients** are loaded through `coef_we / coef_waddr / coef_wdata`. The
address is `m*(2N+1) + t`, and tap `t` weights `x[J-N+t]`. A new value is
used from the next clock. After reset the store holds a sample-and-hold
response (`a(0,N) = 1.0`, all others 0). The paper designs its coefficients
with a minimax (second-order-cone) method that is not reproduced here. Any
Farrow design with at most 11 polynomial terms and 11 taps fits. For
example, the `NP`-point Lagrange interpolator (`NP` even, `NP <= 10`) uses
taps `t = N - NP/2 + 1 + a` for `a = 0..NP-1`. Its entry `a(m,t)` is the
coefficient of `u^m` in `prod_{b != a} (u - d_b) / (d_a - d_b)`, where
`d_a = a - NP/2 + 1`. The testbenches build the cubic and the 10-point
versions this way.

## Interface of `awg_top`

| port | dir | domain | meaning |
|---|---|---|---|
| `clk_var`, `rst_var_n` | in | var | source clock, asynchronous active-low reset |
| `wave_we`, `wave_waddr[13:0]`, `wave_wdata[15:0]` | in | var | write one waveform sample at a sample address |
| `wave_len_words[11:0]` | in | var | waveform length in `K`-sample words (length must be a multiple of `K`) |
| `src_run` | in | var | source on; low returns the address to 0 |
| `src_wrap`, `src_hold` | out | var | last word read; source held back by a full FIFO |
| `clk`, `rst_n` | in | fixed | `f_DAC / K` clock, asynchronous active-low reset |
| `rs_run` | in | fixed | resampler on (prime, then stream); low returns it to idle |
| `omega[31:0]` | in | fixed | `f_s / f_DAC * 2^32` |
| `coef_we`, `coef_waddr[6:0]`, `coef_wdata[23:0]` | in | fixed | coefficient write |
| `dac_data[K][15:0]`, `dac_valid` | out | fixed | `K` output samples, lane 0 earliest |
| `ev_shift`, `ev_stall`, `priming` | out | fixed | register update, stall, priming (status) |

Typical use:

1. Reset both domains.
2. Write the waveform and its length, and write the coefficients.
3. Set `omega`.
4. Raise `src_run` and `rs_run`.

The first samples appear `1 + L + (M+2)` clocks after `rs_run`, once the FIFO
has data. After that, `K` samples come every clock. To restart the stream
with a new ratio or waveform, reset both domains: nothing else flushes the
FIFO, and it keeps its old words.

## Departures and choices

* **Lanes.** `K = 8` is a choice; the paper leaves the number of lanes open.
  The waveform length must be a multiple of `K`, and `K` must be a power of
  two.
* **Register count.** `L` is one register more than the published formula
  (see [Register update](#register-update)). The published text also calls
  `Reg(L-1)` the register that is discarded. Its update equations and its
  figure discard `Reg(0)`, and this design follows those.
* **Waveform memory.** On the original board the samples are stored in DDR3.
  Here they are in on-chip memory (2048 words of 8 samples).
* **Clock domains.** The FIFO is dual-clock, to match the separate variable
  and fixed clock domains of the structure. The source clock only has to keep
  the FIFO fed.
* **Module boundary.** Host link (PCIe), DAC serial interface, clock
  generators, DAC and analog filter are outside this RTL. Their signals are
  `awg_top`'s ports.
* **Omitted mode.** There is no mode without resampling (DAC at the variable
  rate). The paper uses that mode only as a comparison.
* **Own choices.** Widths, pipelining, rounding, priming, stall handling and
  the coefficient reset value are this design's own.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F` and has a cycle watchdog. Reference values
come from `tb/awg_tb_ref_pkg.sv`, which evaluates the interpolation formula
in 64-bit integers under the fixed-point rules above.

| testbench | what it shows |
|---|---|
| `tb_awg_top` | Default sizes, end to end. A 64-sample sine is played at 983 MS/s, 1.228 GS/s and 1.474 GS/s into 2 GS/s. Every sample is bit-exact. Every sample is within 2 LSB of the ideal sine. The output frequency, measured from zero crossings, is 15.359375, 19.1875 and 23.03125 MHz. Latency after priming is `M+2`. FIFO-full hold, wrap, register update, stall, priming, coefficient write and ratio change all occur. |
| `tb_awg_sweep` | Default sizes. A 4096-sample 10-114.4 MHz sweep (made for 2 GS/s) is played at the same three rates with a 10-point Lagrange filter. Outputs are bit-exact and within 3 LSB of the ideal sweep. |
| `tb_awg_resampler` | Resampler with a FIFO model that goes empty at random. Outputs are bit-exact, including with random coefficients. Start-up latency is checked. One run changes `omega` every 37 clocks while streaming; the output stays within 2 LSB of the sine throughout. |
| `tb_awg_phase_ctrl` | Bases, `u`, shifts and stalls are checked against `J = floor(j*omega)` for seven control words, including ones close to 0 and to 1. |
| `tb_awg_farrow_path`, `tb_awg_fir_bank` | Random sequences, intervals and coefficients, including saturation. Latency is `M+2`. |
| `tb_awg_sample_regs`, `tb_awg_coef_regs`, `tb_awg_wave_lut`, `tb_awg_addr_gen`, `tb_awg_async_fifo` | Unit behaviour against simple models. For the FIFO, full and empty are both reached under unrelated clocks. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_awg_top \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/awg_pkg.sv tb/awg_tb_ref_pkg.sv tb/tb_awg_top.sv
./obj_dir/Vtb_awg_top
```

Every testbench runs in well under a minute.

The simulations only show that the arithmetic is exact and that the timing
holds. They say nothing about analog behaviour: the spectral purity of the
built generator also depends on the DAC, the clocks and the coefficient
design.
