# Four-receiver software-defined radio baseband with an Alamouti space-time decoder

This RTL is the digital baseband of a research receiver for transmit-diversity
and MIMO experiments. Four identical receivers each bandpass-sample a 70 MHz IF
at 65 MHz and digitally down-convert it to 16-bit complex baseband samples. The
logic here takes those samples, runs a carrier-frequency-offset loop per
receiver that steers the down converter's NCO, and decodes two-transmitter
Alamouti space-time blocks gathered from one, two or four receivers.

The design follows a published description of such a system. That description
gives the data formats, the carrier-offset algorithm as a flow chart and the
Alamouti combining and detection equations. It does not give widths, bus
protocols or timing. Those are the choices described below.

## Signal flow

```
 per receiver n (x4)
 DDC words ──► iq_buffer ──► buffer A ──► DSP read port (I, Q or {I,Q})
 (I, then Q)        │    └─► data_valid (DSP interrupt)
                    │
                    ├──► carrier_sync ──► NCO tuning word ──► (to the DDC's NCO)
                    │
                    └──► buffer B ──► iq_out (acquisition card)
                                  └──► st_decoder (all receivers)
                                        alamouti_pair_buffer → alamouti_combiner → ml_detector ──► s0_hat, s1_hat
                                        csi_regs (channel estimates from the DSPs) ─┘ and ─┘
```

`sasrats_top` wires four receiver slices and one `st_decoder`. The whole design
runs on one clock, the 65 MHz sample clock. Every port is synchronous to it.

## Sample capture (`iq_buffer`)

The down converter outputs one complex sample as two consecutive 16-bit words
on a single bus, I first. `iq_buffer` holds the I word. When the Q word comes,
it loads the pair into two 32-bit buffers in the same clock:

- **Buffer A** is read by the receiver's DSP. `rd_addr` = 0 returns I
  sign-extended to 32 bits, 1 returns Q, and 2 returns `{I, Q}`.
- **Buffer B** is a continuously driven parallel `{I, Q}` output (`iq_out`). It
  feeds the decoder and an external acquisition card.

`data_valid` is high for the one cycle after the load. It serves as the DSP
interrupt and as the sample strobe for the rest of the design. A Q word that
has no I word before it is ignored.

## Carrier frequency offset loop (`carrier_sync`, `cordic_vectoring`)

While the transmitter sends its carrier-sync preamble, the receiver has to
remove the frequency offset between the transmit carrier and its own local
oscillator. That offset shows up as a steady rotation of the baseband samples.
The loop measures the rotation from sample to sample and retunes the NCO:

1. The first sample in the preamble window (`enable` high) is converted to a
   phase θᵢ and stored.
2. Each later sample gives θᵢ₊₁. The step θ_f = θᵢ₊₁ − θᵢ is taken modulo 2π
   and read as a signed angle in [−π, π).
3. The NCO tuning word changes by θ_f × `loop_gain`. A positive step means the
   NCO is below the carrier, so the word goes up. A negative step lowers it.
   `nco_update` pulses once and `theta_f` holds the step.
4. θᵢ₊₁ becomes θᵢ.

Angles are **binary angles**: 16 bits, where 2¹⁶ is one full turn. This makes
the modulo-2π difference a plain wrap-around subtraction. The published flow
chart uses a sign test on Q to handle the wrap at 0. The subtraction gives the
same answer there, and it also gives the right answer when the phase crosses π,
where that sign test does not.

The phase comes from an iterative **vectoring CORDIC**. First it pre-rotates
by π when I < 0. Then it runs 12 shift-add micro-rotations, one per clock, that
drive Q to zero while summing the arctangents of the rotations applied. The
arctangent table is round(atan(2⁻ᵏ)/2π · 2¹⁶). The datapath has 4 fraction bits
so that short vectors stay accurate. The angle is accurate to about 8 LSB
(0.04°). The magnitude, scaled by the CORDIC gain of 1.6468, is available but
the loop does not use it.

**Timing.** A conversion takes 13 clocks. Conversions can run back to back, so
the loop accepts one sample every 13 clocks. That matches 5 Mbaud at 65 MHz,
the highest rate the system was run at, with one sample per symbol. At the
4 Mbaud design rate there are 16.25 clocks per sample. A sample that arrives
while the CORDIC is busy is dropped and counted in `dropped`. Lowering
`enable` restarts the loop at step 1. `nco_load` presets the word from
`nco_init`.

In the original system this loop is software on each receiver's DSP. It is
built as logic here. The NCO word is an output, where the DSP would have
written the down converter's NCO. The original system could alternatively
apply the correction through the sample-clock synthesizer. This design
produces only the NCO word.

## Alamouti decoding (`st_decoder`)

### The code

Two transmit antennas send symbols s₀ and s₁ at time t, then −s₁* and s₀* at
t+T. Receiver n sees the channels hₐ = h[2n] (from transmitter 0) and
h_b = h[2n+1] (from transmitter 1). Both are taken as constant over the two
periods. The receiver gets

    r0 = r(t)   = hₐ s₀ + h_b s₁ + noise
    r1 = r(t+T) = −hₐ s₁* + h_b s₀* + noise

### Gathering a block (`alamouti_pair_buffer`)

Each receiver has a phase bit. Its first sample after a block boundary is r0,
and its second is r1. When every receiver in `rx_enable` holds both, the block
is copied to the outputs and `pair_valid` pulses. This happens one clock edge
after the last sample is stored. Samples that arrive during that hand-over
cycle start the next block.

`block_sync` marks a block boundary. It clears partial blocks, and a sample
arriving in the same cycle becomes r0 of the new block. A receiver that
delivers a third sample before the block is handed over has that sample
dropped, and `overrun` pulses. The receivers may deliver their samples at
different cycles within a symbol period.

### Combining (`alamouti_combiner`)

    s0~ = Σₙ conj(hₐ) r0 + h_b conj(r1)
    s1~ = Σₙ conj(h_b) r0 − hₐ conj(r1)

This gives s~ = (Σ|h|²) · s + noise. The sum runs over the enabled receivers.
Products are kept at full precision, so the outputs are 37 bits for four
receivers. The result is registered: one cycle of latency, one block per clock.

### Detection (`ml_detector`)

**Scaling convention (the key to reading the detector).** Channel estimates
have the same format and scale as the samples: 16-bit I and Q. An estimate is
a received training sample divided by a unit-magnitude training symbol. With
that convention, s~ lies near E·exp(j2πk/M), where E = Σ|h|² over the channels
in use, with no further normalisation.

The detector computes E. It scales a Q1.14 unit-circle table by E to get the
M constellation points, with point k at angle 2πk/M. It computes the squared
Euclidean distance from s0~ and from s1~ to every point, and picks the nearest.
On a tie the lower index wins. `psk_mode` selects 2-, 4- or 8-PSK. The outputs
`s0_hat` and `s1_hat` are symbol indices 0..M−1, with no bit mapping. The
detector has two stages (distances, then minimum), so its latency is 2 cycles.

### Channel estimates (`csi_regs`)

The DSPs write complex estimates (`csi_wr_addr` = channel index 2n or 2n+1)
into a shadow bank. `csi_commit` copies the whole bank to the active set, so a
block never sees half-updated estimates. A write in the commit cycle is
included in the commit. `csi_updated` acknowledges the commit.

### Settings per block

The enable mask, the PSK mode and the estimates used for a block are captured
when the block enters the combiner. They stay with it into the detector, so
changing any of them right after a block does not affect that block.

**End-to-end latency.** The last sample of a block is stored at one edge.
Counting from that edge: `pair_valid` follows at +1, the combiner output
(`soft_valid`) at +2, and `sym_valid` with the decisions at +4.

## Configuration

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_RX` (top, decoder, pair buffer, combiner, detector) | 4 | receivers; the channel registers hold 2·NUM_RX estimates |
| `CORDIC_ITER` (top) / `ITER` (carrier loop, CORDIC) | 12 | micro-rotations; a conversion takes ITER+1 clocks |
| `IQ_W`, `H_W` (package) | 16 | sample and estimate component width |
| `ANGLE_W` (package) | 16 | binary angle width |
| `NCO_W` (package) | 32 | NCO tuning word width |

At run time, `rx_enable` selects 2×1 (`0001`), 2×2 (`0011`) or 2×4 (`1111`)
decoding, or any other subset. `psk_mode` selects 0 = 2-PSK, 1 = 4-PSK or
2 = 8-PSK.

## What is outside this RTL

These parts connect through the top's ports:

- the analog front end
- the ADCs
- the down converters with their NCOs
- the sample-clock synthesizers
- the DSPs

The DSPs recover symbol timing and estimate the channels. This RTL specifies
neither algorithm. The DSPs' results arrive as `block_sync` and on the
channel-estimate write bus. Only the two-transmitter Alamouti code is decoded.
Codes for more transmitters, and Viterbi-type decoders, are not part of this
design.

## Choices that go beyond the published description

- **Clocking:** a single clock domain. Signals from the receivers' own clock
  domains are assumed to be synchronised before they reach these ports.
- **Reset:** asynchronous, active low; it clears all state.
- **CORDIC iterations:** 12, chosen so that the loop keeps up with 5 Mbaud at
  65 MHz. The published rates are 4 Mbaud nominal and up to 5 Mbaud.
- **Loop gain:** a programmable integer multiplier. The description only says
  "scaled".
- **Block boundary:** the meaning of `block_sync`, the receiver mask, the
  overrun rule, the estimate write bus with commit, the PSK orders offered and
  the tie rule are all design choices.
- **DSP read port:** the address map of the read port.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_iq_buffer` | pairing of I and Q; `data_valid` timing; all three read addresses; a lone Q word is ignored |
| `tb_cordic_vectoring` | angle against atan2 (±8 LSB); magnitude; 13-clock latency; back-to-back operation |
| `tb_carrier_sync` | phase steps of both signs, near ±π and small; NCO step = θ_f × gain in the right direction; no drops at 13 and at 16–17 clocks per sample; drops when samples come too fast |
| `tb_alamouti_pair_buffer` | random per-receiver arrival; masks; block sync; overrun |
| `tb_csi_regs` | shadow and active banks against a model; commit |
| `tb_alamouti_combiner` | bit-exact against a 64-bit reference with full-scale inputs; noise-free s~ = E·s |
| `tb_ml_detector` | 2/4/8-PSK against a 128-bit nearest-point search; latency |
| `tb_st_decoder` | 2-receiver decoder: soft outputs bit-exact; decisions; commits; 2×1 mode; latency 4 |
| `tb_sasrats_top` | end to end at default parameters, at both symbol rates (below) |

`tb_sasrats_top` drives DDC word streams into all four receivers. At 16 clocks
per symbol (4 Mbaud) it runs a carrier preamble with a different offset per
receiver, programs the channel estimates, and then decodes 97 Alamouti blocks.
These cover 2×1, 2×2 and 2×4 with every PSK order, plus one forced overrun
followed by a block sync. At 13 clocks per symbol (5 Mbaud) it runs a second
preamble and 30 more 2×4 blocks. Each mechanism is counted, and the test fails
if one never occurs. Simple concurrent assertions also check the protocol
rules inside the modules. They are active when Verilator runs with `--assert`.

Run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert --top-module tb_sasrats_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/sasrats_pkg.sv tb/tb_sasrats_top.sv
./obj_dir/Vtb_sasrats_top
```

For a lint check of any module, use
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/sasrats_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are about unused signals: the package constants in
modules that do not need them, the CORDIC magnitude in the carrier loop, and
the guard bits of the CORDIC magnitude. Verilator also notes that the
assertions sample the asynchronous reset synchronously (`disable iff`). This
affects simulation only.
