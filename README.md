# ATSC 8-VSB receiver blocks for an FPGA

This RTL moves the compute-heavy parts of a software ATSC (8-VSB digital
television) receiver into FPGA logic. The receiver runs as a chain of
blocks. Two groups sit in hardware:

- the **frontend**, right after the radio's digital down-converter. It
  takes complex baseband at 6.25 MS/s and does matched filtering,
  resampling, carrier recovery, DC removal and gain control;
- the **backend** of the error-correction chain: the trellis (Viterbi)
  decoder, the byte deinterleaver, the Reed-Solomon decoder and, at the very
  end, the depad stage that leaves bare MPEG transport packets.

The stages between the groups stay in software: segment sync, field-sync
checking, equalisation and derandomisation. The blocks are therefore
independent stream processors. The top level, `atsc_rx_top`, holds all of
them, in three separate chains with their own ports:

```
 6.25 MS/s complex ──► RX filter ──► FPLL ──► DC blocker ──► AGC ──► 11.8385 MS/s real
                       └── atsc_rx_filter_fpll ──┘   └── dc_blocker_agc ──┘
                                   (sync, equaliser in software)
 soft symbols ──► trellis decoder ──► deinterleaver ──► RS(207,187) decoder ──► 187-byte packets
                                   (derandomiser in software)
 256-byte padded packets ──► depad ──► 188-byte MPEG-TS packets
```

The two merged blocks, `atsc_rx_filter_fpll` and `dc_blocker_agc`, exist
because each block costs a slot and a packetising stage in the FPGA's
block framework. Merging the filter with the FPLL needs no buffer between
them: the FPLL turns every complex sample into one real sample. In the same
way the AGC takes one sample per sample from the DC blocker.

## Stream conventions

Every block port is an AXI-Stream-style bundle, `tdata`/`tvalid`/`tready`
and, where packets matter, `tlast`. A word moves on a clock edge where both
`tvalid` and `tready` are high. There is one clock and a synchronous,
active-high reset.

| signal | format |
|---|---|
| complex sample | `csample_t` = `{q, i}`, two 16-bit signed values (`atsc_pkg`) |
| real sample | 16-bit signed |
| soft symbol (backend input) | 16-bit signed; the eight levels -7, -5, ..., +7 are scaled by `LVL` = 256 |
| bytes | 8 bits |

The reference receiver works in single-precision floating point. Here the
arithmetic is fixed point, and each block's header says where the binary
point sits.

The RX filter and the DC blocker each have a settings bus with `set_stb`,
`set_addr[7:0]` and `set_data[31:0]`:

- In the RX filter, a write at address 0 replaces the resampling step (see
  below), which sets the oversampling ratio.
- In the DC blocker, a write at address 0 sets log2 of the delay length.

Each write is answered one clock later by `rb_stb`. At the same time,
`rb_data` holds the register's new value, or 0 for an unknown address. In
the top level these buses are `fe_set_*`/`fe_rb_*` and
`dcb_set_*`/`dcb_rb_*`.

## Frontend

### RX filter: polyphase arbitrary resampler (`atsc_rx_filter`)

This is the hardest block of the frontend. It does two jobs: a
root-raised-cosine matched filter (roll-off 0.1152, at half the ATSC symbol
rate) and a change of sample rate by the irrational ratio
11.8385 / 6.25 ≈ 1.894.

- **Prototype filter.** The filter is designed at 16 × 6.25 MHz with
  16 × 19 = 304 taps. It is split into 16 *arms* of 19 taps: arm `p` holds
  `h[k*16 + p]`. Each arm is the filter for one of 16 fractional delays
  between two input samples. The taps are computed at elaboration by a
  constant function (`mk_taps`) and scaled so that each arm has a DC gain of
  1. They are stored with 18 bits, 15 of them fractional.
- **Phase accumulator.** An accumulator `acc` holds, in input samples with
  24 fraction bits, the position of the next output after the newest input.
  While `acc < 1`, the block:
  - computes an output with the arm given by the top 4 fraction bits of
    `acc`, `y = Σ_k x[n-k]·h[k*16+p]`;
  - adds `STEP = 6.25/11.8385` (8 857 304 / 2^24) to `acc`.

  When `acc` reaches 1, the block subtracts 1 and takes the next input. Each
  input therefore gives one or two outputs. A packet of 32 inputs gives 60
  or 61 outputs, 60.6 on average.
- **History across packets.** The input window holds the newest 19 samples
  and is never cleared between packets. Its 18 older samples are the
  filter's history, so a packet boundary causes no start-up transient. A
  software filter gets this from its scheduler; here it is just the window
  register.
- **Timing.** `MACS` = 4 taps are multiplied and accumulated per clock.
  An output then takes ceil(19/4) + 3 = 8 cycles, and each input takes 2
  more. `m_tlast` marks the last output produced
  from an input word that carried `s_tlast`, so output packets follow input
  packets.

Arms are chosen by nearest neighbour. The block does not interpolate
between two arms, so the timing resolution is 1/16 of an input sample.

### FPLL (`atsc_fpll`)

8-VSB carries a pilot tone 309 kHz above the lower edge of the 6 MHz
channel, which is −2.691 MHz from the channel centre. The FPLL locks a
numerically controlled oscillator (NCO) to the pilot and brings the pilot
down to DC:

1. A 16-stage CORDIC (`cordic.sv`, rotation mode) rotates each sample by
   −phase. The real part, with the CORDIC gain removed, is the output.
2. The rotated I and Q each pass through a single-pole low-pass filter with
   coefficient 2^-6 (a time constant of about 5 µs at 11.8385 MS/s). What
   remains is essentially the pilot.
3. A vectoring CORDIC takes the angle of that low-passed vector. This angle
   is the phase error, limited to ±π/2.
4. A second-order loop updates the NCO: `phase += freq + 0.01·err` and
   `freq += 2.5e-5·err`.

The NCO starts at the nominal pilot offset. At lock the pilot sits on the
positive real axis. The block takes one sample per clock and has one cycle
of latency. The testbench pulls in from frequency errors of 3 kHz and
20 kHz.

### DC blocker (`dc_blocker`)

The DC blocker is the short form of the linear-phase DC blocker: two
cascaded moving averages of length D = 128, subtracted from the input
delayed by D − 1:

```
m1[n] = Σ_{k<D} x[n-k]      m2[n] = Σ_{k<D} m1[n-k]      y[n] = x[n-D+1] − ⌊m2[n] / D²⌋
```

Both sums run at full precision, and only the final division is a shift, so
D must be a power of two. One circular buffer of inputs supplies both
`x[n-D]`, which leaves the first sum, and `x[n-D+1]`, the delayed term. A
second buffer holds `m1`. Until D samples have arrived, the history reads as
zero. The block takes one sample per clock and passes `tlast` through.

D is the largest length, and also the length after reset. Over the settings
bus, address 0 takes log2 of a shorter length. The value is clamped to
1..log2(D). A write empties both histories, so the new length starts from
zero as after reset.

### AGC (`agc`)

The gain control law is `y = x·g`, then `g += rate·(ref − |y|)`, with `g`
kept between 0 and `MAX_GAIN`. The defaults are those of the reference
receiver: rate 10⁻⁵, reference 4.0, initial gain 1, maximum gain 65536.
Samples are read with 8 fraction bits, so the reference is 1024, and the
gain has 24 fraction bits.

## Backend

### Trellis decoder (`atsc_viterbi`)

The 8-VSB trellis code works like this:

- **Coders.** Twelve identical coders take turns: symbol `j` belongs to
  coder `j mod 12`.
- **Bytes to symbols.** Each coder sends its byte as four dibits `(x2, x1)`,
  most significant first.
- **Coding.** `x2` is precoded: `z2 = x2 ^ previous z2` of the same coder.
  `x1` passes through as `z1` and also drives a 4-state coder with state
  `(s1, s0)`. That coder outputs `z0 = s0` and moves to state
  `(x1 ^ s0, s1)`.
- **Symbol level.** The transmitted level is `2·(4·z2 + 2·z1 + z0) − 7`.

The decoder keeps, for each of the 12 coders, 4 path metrics and 4
register-exchange survivors of 32 steps. Each survivor step stores the
decided `z2` and `x1`.

- **Branch metrics.** Each trellis branch covers two parallel transitions,
  `z2 = 0` and `z2 = 1`, eight levels apart. The nearer one is chosen, using
  an absolute-distance metric.
- **Add-compare-select.** For each state, the better of its two
  predecessors is kept. The metrics are then renormalised by their minimum.
- **Output.** Once a coder has made 31 steps, the oldest decision of its
  best survivor is released. `x2` is recovered as `z2 ^ previous released
  z2`.

Bytes come out in transmission order, the first one 12·31 + 36 symbols
after the start. The decoder takes one symbol per clock.

Not modelled: the broadcast format's segment-to-segment rotation of the
coder assignment, and the segment sync symbols. The input must be a plain
stream of data symbols dealt round-robin, which is what the testbenches
produce.

### Deinterleaver (`atsc_deinterleaver`)

This is a convolutional byte deinterleaver with B = 52 branches and M = 4.
Branch `i` delays by `(51 − i)·4` bytes of that branch. Every byte leaves
exactly 4·52·51 = 10 608 bytes after it entered, in its original order. The
52 branch FIFOs share one 5 304-byte RAM, each with its own read/write
pointer. The `sync` input forces the byte it comes with onto branch 0, which
aligns the commutator at a field start.

**Framing caveat.** 10 608 bytes is 51 Reed-Solomon packets plus 51 bytes.
The RS decoder counts 207-byte packets from reset, so the deinterleaved
stream must start on a packet boundary. The end-to-end testbench sends
156 zero bytes ahead of the first packet for this reason. With `sync` at
field starts, the field length of 312 packets keeps this alignment in a
real stream.

### Reed-Solomon decoder (`atsc_rs_decoder`)

The code is RS(207,187) over GF(256): field polynomial
x⁸+x⁴+x³+x²+1, generator roots α⁰…α¹⁹. It corrects up to 10 bytes per
packet. The first received byte is the coefficient of x²⁰⁶. A packet takes
four phases:

1. **Receive** (207 cycles). Bytes are stored and the 20 syndromes are
   updated by Horner's rule.
2. **Berlekamp–Massey**, inversion-free (20 cycles). This gives the error
   locator Λ, scaled by a constant. One more cycle forms the evaluator
   Ω = S·Λ mod x²⁰ and loads the Chien registers.
3. **Chien search** (207 cycles). This counts the roots of Λ. If the count
   differs from Λ's degree, the packet is uncorrectable.
4. **Output** (187 cycles). The Chien evaluation runs again. At every root
   the byte is corrected by the Forney value Ω(X⁻¹) / (odd part of
   Λ at X⁻¹). This is the b = 0 form of Forney's formula, and the unknown
   scale of Λ cancels.

`err_count` reports the number of corrections, or 15 for an uncorrectable
packet. Such a packet passes through unchanged. The GF helpers are in
`atsc_pkg`: multiply, α^e, and inverse as a^254.

The input is held off while a packet is being decoded and sent, about 620
cycles per packet.

### Depad (`atsc_depad`)

Each packet arrives padded to 256 bytes. The depad forwards the first 188
bytes, with `tlast` on the 188th, and drops the rest.

## Throughput against the targets

The targets assume the reference receiver's rates and a 214 MHz clock.

| block | needed | this RTL at 214 MHz |
|---|---|---|
| RX filter (and RX filter + FPLL) | 11.8385 MS/s out | ≈ 23.6 MS/s (9.06 clocks/output measured) |
| FPLL, DC blocker, AGC | 11.8385 MS/s | 214 MS/s |
| trellis decoder | 2.96 MS/s | 214 Msymbols/s = 53 MB/s |
| deinterleaver | 2.96 MS/s | 214 MB/s |
| RS decoder | 2.96 MS/s | ≈ 64 MB/s |
| depad | 2.96 MS/s | 157 MB/s |

With `MACS` = 1, the RX filter takes 22 cycles per output and reaches only
about 9.3 MS/s, so it needs at least 2 lanes. Its testbench counts clocks
with no back-pressure and fails above 18 clocks per output.

## Departures from the reference receiver

- Fixed point everywhere instead of floating point.
- RX filter:
  - 16 arms, nearest-arm selection, no interpolation between arms;
  - each arm normalised to unit DC gain;
  - settings register map: address 0 is the resampling step.
- FPLL: the loop constants, the CORDIC phase detector and the ±π/2 error
  limit are this design's choices.
- Trellis decoder: no coder-rotation pattern, no segment sync symbols. The
  traceback depth of 32 is chosen here.
- Deinterleaver, RS decoder and depad: framing is by byte counters and a
  `sync` input, not by per-segment metadata.
- The DC blocker's settings register holds log2 of the length, so only
  powers of two can be set.
- Readback timing: one clock after the write.
- The AGC gain is not allowed to go below 0.

## Simulating

Every block has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb_atsc_rx_top` runs all three chains of the top level at their default
parameters. It counts every mechanism and fails if one never happens:

- 60- and 61-output packets;
- settings writes with readback, for the RX filter and the DC blocker;
- input stalls;
- trellis corrections;
- RS corrections and RS failures;
- dropped pad bytes.

It takes about 20 s.

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_atsc_rx_top -Irtl -y rtl -y tb +libext+.sv \
  rtl/atsc_pkg.sv tb/tb_atsc_rx_top.sv -o sim
./obj_dir/sim
```

Replace the top module and testbench file to run another block's test.

The testbenches drive inputs on the falling edge and sample on the falling
edge plus 1 ns. All reference models are written inside the testbenches:

- a floating-point resampler and AGC;
- direct-sum DC blocker sums;
- behavioural convolutional interleaver, trellis encoder and systematic RS
  encoder.

The models share no code with the RTL.

## Files

| file | contents |
|---|---|
| `rtl/atsc_pkg.sv` | sample types, ATSC symbol rate, GF(256) and saturation helpers |
| `rtl/atsc_rx_top.sv` | top level: the three chains |
| `rtl/atsc_rx_filter.sv`, `rtl/atsc_fpll.sv`, `rtl/cordic.sv`, `rtl/atsc_rx_filter_fpll.sv` | frontend, first half |
| `rtl/dc_blocker.sv`, `rtl/agc.sv`, `rtl/dc_blocker_agc.sv` | frontend, second half |
| `rtl/atsc_viterbi.sv`, `rtl/atsc_deinterleaver.sv`, `rtl/atsc_rs_decoder.sv` | backend |
| `rtl/atsc_depad.sv` | depad |
| `tb/tb_*.sv` | one testbench per module, and `tb_atsc_rx_top` end to end |
