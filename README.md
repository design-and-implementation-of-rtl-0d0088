# Dual-standard (WLAN + UMTS) polyphase channelizing receiver

This is a digital receiver back end that pulls one IEEE 802.11g (WLAN) channel and
one UMTS channel out of a single RF sample stream. The only analog part in front
of it is a low-noise amplifier. The RF band is sampled directly at 840 MS/s.
Bandpass sampling folds both the 2.4 GHz WLAN band and the 2.1 GHz UMTS band into
the first Nyquist zone, between 36 and 410 MHz, without overlap and spectrally
inverted. Everything after that is done in logic:

```
            +-- complex BPF, keep 1 in 7 --> FIFO --> 5-path channelizer, 6:1    --> WLAN  20    MS/s
 ADC 840 ---+    (120 MS/s)                          (24 MHz bins, 50 taps)
 MS/s       +-- complex BPF, keep 1 in 8 --> FIFO --> 21-path channelizer, 17/10 --> UMTS  61.76 MS/s
                 (105 MS/s)                          (5 MHz bins, 2520 taps)
```

The main idea is the polyphase channelizer. One prototype low-pass filter is
split into N polyphase paths, and a per-path complex phasor picks which bin is
brought down to base band. The resampling to the standard's chip or sample rate
is folded into the same filter, so no separate resampler or mixer is needed.
The filter runs as a *serial polyphase filter with a parallel MAC*: the N paths
are computed one per clock, and each path's T taps are multiplied in parallel.

## Rates and channel plan

| path | after BPF | bins N | bin spacing | taps per path T | prototype | resampling | output |
|------|-----------|--------|-------------|-----------------|-----------|------------|--------|
| WLAN | 120 MS/s  | 5      | 24 MHz      | 10              | 50        | 1/6        | 20 MS/s |
| UMTS | 105 MS/s  | 21     | 5 MHz       | 12              | 2520 (at 1050 MHz) | 10/17 | 61.76 MS/s |

The rates and bin counts satisfy f_s = N x bin spacing. The UMTS target is
61.44 MS/s. That would need a 875/512 down-conversion ratio, which is rounded to
17/10, so the output runs 0.5 % fast.

A channel is selected with `k` (bin, 0..N-1) and `s` (extra offset in quarters of
a bin, 0..3). The channel centre is (k + s/4) bin spacings. Write K4 = 4k + s,
taken modulo 4N. After the band-pass re-samplers the channels sit at:

| channel | centre | k, s |
|---------|--------|------|
| WLAN a  | -42 MHz = -1.75 bins | k=3, s=1 |
| WLAN b  | -12 MHz = -0.5 bins  | k=4, s=2 |
| WLAN c  | +48 MHz = 2 bins     | k=2, s=0 |
| UMTS, 12 channels | +37.5 ... -12.5 MHz in 5 MHz steps = 7.5 ... -2.5 bins | K4 = 30, 26, ..., 2, 82, 78, 74, that is k = 7, s = 2 down to k = 18, s = 2 |

Each channelizer extracts one channel at a time. To get all channels, replicate
the channelizer or time-share it at a higher clock.

## How the channelizer computes an output

Let the complex input be x[j] at rate f_s. Zero-pack it by L, filter it with the
prototype h[n] (N·L·T taps), and keep one sample in M. The channel is mixed to
base band at the input rate. Output m is then

```
y[m] = sum over n with (t_m - n) divisible by L of
          h[n] * x[j] * exp(-j*2*pi*K4*j/(4N)),     j = (t_m - n)/L,
t_m  = M*m + R_INIT + M - L   (output instant, in up-sampled ticks)
```

WLAN uses L=1, M=6, R_INIT=0. UMTS uses L=10, M=17, R_INIT=9.

Only one zero-packed tap in L is non-zero. Let i0 be the newest input and
r = t_m - L·i0 (0..L-1) the up-sampled phase. The input of age a = i0 - j then
meets coefficient h[r + L·a]. Split the age as a = q + N·t, where q (0..N-1) is
the path and t (0..T-1) is the tap inside the path:

* The coefficients of path q form the set c = r + L·q, with taps h[c + N·L·t].
  This gives N·L sets: 5 sets for WLAN and 210 sets, C0..C209, for UMTS.
* The mixer term splits into exp(j·2π·K4·(q - i0)/(4N)), one phasor per path,
  times j^(s·t). The second factor is a quarter turn per tap. It only swaps and
  negates the real and imaginary parts, so it costs no multiplier. This is why a
  channel may sit on a quarter of a bin.

So each output costs N cycles. In each cycle, one row of T samples and one
coefficient set go through T parallel multipliers, the quarter turns and an
adder tree. The sum is multiplied by one complex phasor and added into the
accumulator.

### States, serpentine loading, and why it runs at one input per clock

Each output is one *state*. A state first needs `floor((r_prev + M)/L)` new inputs:

* WLAN: always 6.
* UMTS: 1 or 2, in the repeating pattern 2,2,2,1,2,2,1,2,2,1. That is 357 inputs
  per 210 states, and the period is LCM(21, 10) = 210.

The data registers are never shifted as a whole. Input j is written into row
(A0 - L·j) mod N of the shift register bank, and only that row shifts. The row
step is therefore -L mod N. Within a state and from one state to the next this is
a constant step of -10 mod 21 for UMTS. With A0 = 16 the sequence is R16, R6 |
R17, R7 | R18, R8 | R19 | ... | R4, R15 | R5. For WLAN each of the six inputs of a
state goes one row further down mod 5, so the start row moves by one per state.
This is the serpentine loading of a 6:1 down-sampler in a 5-path filter.

The rows are read from the oldest path (q = N-1) to the newest (q = 0). That is
the same order in which the next state's inputs overwrite them. So while state m
is computed, state m+1's inputs are already accepted: input i of the next state
is allowed in only once row N-1-i has been read. A read and a write of one row in
the same clock see the old row. As a result the WLAN channelizer takes one input
every clock and delivers one output every 6 clocks, which is real time at a
120 MHz clock. The UMTS channelizer is compute bound at one output per 21 clocks.

Pipeline: decoder, then bank and coefficient read (combinational), then MAC
(register), then phasor multiply (register), then accumulator (register). An
output appears N+2 clocks after its state starts. A state starts in the clock
after its last input, or as soon as the previous state's reads are done.

### Multipliers or distributed arithmetic

The sub-filter of each path can be built two ways; both give identical
outputs. By default (`USE_DA = 0`) T multipliers work in parallel, which suits
the hard DSP multipliers of an FPGA. With `USE_DA = 1` (`WLAN_USE_DA` on the
top) the coefficient bank and the multipliers are replaced by `da_mac`, a
distributed-arithmetic sub-filter with no multipliers.

* For every coefficient set, `da_mac` stores tables of coefficient sums, one
  table per group of G = 5 taps. A table has 32 entries; for T = 10 there are
  two tables per set.
* Every bit plane of the 17-bit data is looked up in the same clock (bit
  parallel), so it still gives one result per clock. The sign plane is
  subtracted. The data carries one extra bit because it is quarter-turned
  before the look-up.
* A coefficient write rebuilds the 32 entries of its group from the stored
  coefficients, so the tables need no reset.

## Fixed-point formats

| signal | bits | format |
|--------|------|--------|
| channelizer input (I and Q) | 16 | sign, 7 integer, 8 fraction |
| prototype coefficient | 12 | sign, 11 fraction |
| phasor (cos, sin) | 16 | sign, 1 integer, 14 fraction; round(2^14·cos/sin(2π·i/4N)) |
| channel output (I and Q) | 30 | sign, 10 integer, 19 fraction |

The MAC output keeps full precision: 32 bits for WLAN, with 19 fraction bits.
The phasor product and the accumulator are also exact. At the end the
accumulator drops 14 bits by an arithmetic shift (rounding toward minus
infinity) and saturates to 30 bits. The UMTS path reuses the WLAN formats.

## The band-pass re-samplers

Each path starts with a complex FIR filter. It passes one standard's alias and
rejects that alias's mirror image, so its output is an image-free complex signal.
Such a signal can be down-sampled by a large factor by keeping one output in D:
the spectrum only moves and does not fold onto itself. D = 7 gives 120 MS/s for
WLAN and D = 8 gives 105 MS/s for UMTS. Only the kept outputs are computed. The
filter length (32 taps) and its 12-bit complex coefficients are loaded by
software; the structure is the simplest direct form.

## Interface of `radio_receiver_top`

* `adc_valid`, `adc_data[15:0]`: the real RF samples, one per strobe.
* Coefficient port: `coef_we`, `coef_target`, `coef_addr[11:0]`, `coef_re`,
  `coef_im`.
  * `coef_target` is a `radio_pkg::coef_target_e` value. It selects the WLAN or
    UMTS band-pass filter (complex taps 0..31) or the WLAN or UMTS prototype
    (real taps 0..49 or 0..2519).
  * Prototype taps are addressed by their index n in h[n]. The bank files tap n
    into set n mod (N·L), position n div (N·L).
  * Load every coefficient before use; the memories do not reset.
* `wlan_k[2:0]`, `wlan_s[1:0]`, `umts_k[4:0]`, `umts_s[1:0]`: channel selection.
  They are sampled at the start of each state, so change them only while the
  path is idle. Otherwise the switch takes effect at some output during the
  change.
* `wlan_valid`/`wlan_re`/`wlan_im` and `umts_valid`/`umts_re`/`umts_im`: one
  output sample per strobe.
* `*_overflow` (sticky) and `*_dropped` (saturating count): a 4-entry FIFO
  between each re-sampler and its channelizer drops samples that arrive while it
  is full.
* One clock `clk` and an asynchronous active-low reset `rst_n`.

All blocks run from one clock. The WLAN path keeps up with one ADC sample per
clock. The UMTS channelizer needs 21 clocks per output, which is about 12.4
clocks per 105 MS/s input, while one ADC sample per clock delivers a UMTS input
every 8 clocks. It therefore keeps up only at one ADC sample per two clocks or
slower. Real-time UMTS at 105 MS/s would need a processing clock of about
1.3 GHz, or several engines in parallel.

## Where this design departs from, or adds to, the described receiver

* **Complex channelizer input.** The channelizer takes complex 16+16-bit
  samples, because the re-sampled WLAN channels sit at negative frequencies.
  This gives 2T MAC multipliers plus 4 for the phasor: 24 for WLAN. The reported
  WLAN implementation has 14 DSP48 slices, which fits a real input.
* **Quarter-bin tuning** is done exactly, by the per-tap quarter turn described
  above. This is this design's construction for the `s` parameter.
* **UMTS coefficient-set order.** Registers that are not reloaded between two
  states move on by +17 sets, as specified. Within a state, successive registers
  differ by -20 sets (mod 210), not +22. This design follows the loading sequence
  and the 17/10 equation; the -20 step is what they imply.
* **State machine.** The 210-state control is kept as a phase counter (r, 0..9)
  and input counters, not as a 210-entry table. It produces the same loading
  sequence.
* **Own choices:** valid/ready handshakes; the FIFOs with drop counting;
  writable coefficient memories in place of fixed ROMs; the band-pass filter
  length and word lengths; truncation and saturation at the output; the WLAN
  start row (A0 = 4); the reset behaviour.
* **Not built:** the LNA and the 840 MS/s ADC, which are analog and
  mixed-signal; the ADC samples are the top's input. No prototype or band-pass
  coefficient values are built in, because none are specified; the testbenches
  generate them. No FPGA mapping or timing closure was done.

## Files

`rtl/`:

| file | block |
|------|-------|
| `radio_pkg.sv` | word lengths, `sample_t`, `coef_target_e`, saturation helpers |
| `radio_receiver_top.sv` | the receiver |
| `complex_bpf_resampler.sv` | complex band-pass filter + keep 1 in D |
| `sample_fifo.sv` | 4-entry FIFO with drop counter |
| `polyphase_channelizer.sv` | serial polyphase channelizer, WLAN defaults |
| `umts_channelizer.sv` | the same engine with N=21, T=12, L=10, M=17, R_INIT=9, A0=16 |
| `channelizer_decoder.sv` | state machine: input counts, load rows, row/set/phasor per cycle |
| `shift_register_bank.sv` | N rows x T complex delay lines |
| `coef_bank.sv` | N·L coefficient sets x T taps |
| `parallel_mac.sv` | T multipliers, quarter turns, adder tree |
| `da_mac.sv` | distributed-arithmetic alternative to `coef_bank` + `parallel_mac` |
| `phasor_mult.sv` | 4N-entry phasor table and complex multiplier |
| `path_accumulator.sv` | sum over the N paths, shift and saturate |

`tb/`: one self-checking testbench per block (`tb_<module>.sv`), plus
`chan_ref_pkg.sv`. That package holds the reference models. `chan_ref` evaluates
the y[m] equation above directly over the prototype taps. `bpf_ref` is the plain
FIR-and-decimate.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/radio_pkg.sv tb/chan_ref_pkg.sv tb/tb_radio_receiver_top.sv \
    --top-module tb_radio_receiver_top
./obj_dir/Vtb_radio_receiver_top
```

Swap in any other `tb_*` name. All testbenches run at the full sizes in well
under a second.

What they check:

* `tb_radio_receiver_top`: the whole receiver at its default parameters.
  * A random ADC stream goes through both paths, and every WLAN and UMTS output
    is compared bit for bit with the reference chain.
  * It covers UMTS back-pressure, a mode switch to the quarter-bin WLAN channel
    and another UMTS channel, and one- and two-input UMTS states.
  * At full ADC rate the WLAN path keeps up and the UMTS FIFO overflows, with
    the drops counted.
* `tb_polyphase_channelizer`: WLAN bit-exact outputs at one input per clock, with
  exactly 6 clocks between outputs and no input stall. It also checks retuning
  with input gaps. A tone test with a windowed-sinc prototype checks that the
  tuned bin carries over 100x the power of another bin.
* `tb_umts_channelizer`: bit-exact outputs; 714 inputs give exactly 420 outputs,
  21 clocks apart; retuning with input gaps.
* `tb_channelizer_decoder`: the UMTS loading sequence and -10 mod 21 rule, the
  inputs per state, and the row, set and phasor of every compute cycle. It also
  checks the +17-set step of registers that are not reloaded.
* `tb_channel_plan`: loads windowed-sinc prototypes and puts a tone at each of
  the 3 WLAN and 12 UMTS channel centres. The channel tuned to the tone must
  beat the channel one bin away by 20 dB (the measured margins are 72 dB for
  WLAN and 63.5 dB for UMTS), and its magnitude must be steady.
* `tb_da_mac` checks the distributed-arithmetic sub-filter. In
  `tb_polyphase_channelizer` a second, DA-built instance must match the
  multiplier one clock for clock.
* The unit testbenches compare each datapath block with an independent model.

To change a size, override the parameters of `polyphase_channelizer`: N, T, L,
M, R_INIT (phase before state 0) and A0 (first row). The reference model in
`chan_ref_pkg` takes the same numbers.
