# Size-adaptive MC-CDMA receiver core

An MC-CDMA receiver spends most of its power in the FFT and in the per-sub-carrier
combiner. When the channel allows fewer sub-carriers, the same hardware can be shrunk.
This design does that at run time. One pipelined radix-4 FFT works as a 256-, 64- or
16-point transform: the input simply enters the pipeline at a later stage, and the
stages it skips have their clocks stopped. The combiner after it (despreading, pilot-based
MMSE equalisation and chip accumulation) follows the same size selects. It switches off its
second control FSM and three quarters of its coefficient memory when only 64 sub-carriers
are used.

Two cores are provided, side by side in `mccdma_top`:

* **Receiver** (`mccdma_receiver`): a 256/64-point FFT, an ordering stage and the
  combiner. It turns time-domain OFDM symbols into received bits for 256 or 64
  sub-carriers, and has a spreading code of length 64.
* **Stand-alone FFT** (`rfft256`): the 256/64/16-point FFT/IFFT on its own, with its own
  ports.

Both come in two gating variants, picked by parameter:

* **Variant 1** gates everything an unused stage owns, including its RAMs.
* **Variant 2** gates only the registers and FSMs. The RAMs keep their clock.

The two variants give bit-identical results; only their power would differ.

## Size selects

| S256 | S64 | FFT size | receiver sub-carriers |
|------|-----|----------|-----------------------|
| 1    | x   | 256      | 256                   |
| 0    | 1   | 64       | 64                    |
| 0    | 0   | 16       | (64; the receiver has no S64) |

* The receiver has only S256.
* The stand-alone FFT also has S64, which gives the 16-point mode.
* The stand-alone core also has `inverse`, which selects the IFFT.
* Any change of a select restarts the core. A one-cycle `restart` pulse clears every
  counter, and samples in flight are dropped. For the receiver, the next symbol is then
  taken as a pilot.

## The FFT pipeline (`rfft256`, `r4_stage`)

```
in ──► stage 1 ──► MUX I ──► stage 2 ──► MUX II ──► stage 3 ──► stage 4 ──► out
 │     (NT=64)      ▲ S256    (NT=16)      ▲ S64|S256  (NT=4)     (NT=1, no multiplier)
 └──────────────────┴───────────────────────┘
```

Each stage is a radix-4 single-path delay commutator (`r4_commutator`), a radix-4
butterfly (`r4_butterfly`) and, except in the last stage, a complex multiplier by a
twiddle factor (`cmult`, `twiddle_rom`). MUX I feeds stage 2 with the raw input instead of
stage 1's output. MUX II does the same for stage 3. The stage-t transform length is
4·NT with NT = 4^(4−t), so entering at stage 2 gives a 64-point FFT and entering at
stage 3 gives a 16-point FFT. The unused front stages have their enable (the "gated
clock") low.

### How one stage works

This is the least obvious part of the design. A decimation-in-frequency radix-4
butterfly needs the four samples x[n], x[n+NT], x[n+2NT] and x[n+3NT] at the same time.
The data arrive one per clock, so the commutator must store three quarters of each
4·NT block.

* **First FIFO chain.** Three FIFOs of NT words each are chained on the input. Together
  with the input itself they give four taps, delayed by 0, NT, 2NT and 3NT samples. The
  3NT tap is output O1.
* **Second FIFO chain.** Three more FIFOs form outputs O2–O4. Each is fed from the
  previous output, and a multiplexer (C1, C2, C3) in front of each output picks either
  the direct tap or its FIFO.
* **Quarter 3.** The selects are 1 in the last input quarter of every block. The four
  outputs then hold all four butterfly operands.
* **Quarters 0–2.** In the next three quarters the selects are 0, and the second chain
  replays the same operands, rotated by one position per quarter.

So all four operands are present in every clock cycle. The butterfly therefore needs to
compute only one of its four outputs per clock: in quarter q it produces output
s = (q+1) mod 4. `r4_butterfly` applies the rotation and the powers of −j,
(−j)^(s·i), to the operands. It sums them and divides by 4. The product is then
multiplied by W₂₅₆^(s·n·4^(t−1)), where n is the index inside the quarter.

Each FIFO is a RAM used as a circular delay line (`delay_fifo`). Its address is the low
bits of the stage counter, so all six FIFOs of a stage share one address.

`r4_stage_fsm` holds a counter of 2 + log₂NT bits that advances on every valid input.
From it the FSM derives:

* C1–C3, the commutator selects;
* C4–C5, the butterfly output index s;
* C6, the FIFO advance;
* C7, output valid, held low until the first block is complete;
* the FIFO address;
* the twiddle address.

`ffsm` groups the four stage FSMs. It also decodes S256/S64 into the MUX I/II selects and
into the two clock enables `gck1_en` (stage 1) and `gck2_en` (stage 2).

### Gating variants

* `GATE_FIFO = 1` (variant 1): a gated stage's FIFO RAMs see no writes.
* `GATE_FIFO = 0` (variant 2): the RAMs keep writing at a frozen address while the
  registers and the FSM stand still.

Gating is written as clock enables. A synthesis flow maps these to integrated
clock-gating cells.

### Timing, order and scaling

* **Throughput.** One sample in and one sample out per valid clock. `din_valid` can be
  dropped at any time, and the pipeline just waits.
* **Latency.** Stage t delays by 3·NT samples plus 2 cycles; the last stage adds
  1 cycle. The first output of a 256-point block follows its last input by 7 cycles:
  255 samples + 7 cycles after its first input. For 64 points it is 63 + 5, for
  16 points 15 + 3. Samples must keep coming to flush the final block.
* **Order.** The output is in base-4 digit-reversed order.
* **Scaling.** The output is DFT/N: every butterfly divides by 4 with an arithmetic
  shift. Data are 16-bit two's complement.
* **Twiddles.** The twiddles are Q2.14 (cos, −sin)·16384, rounded, in
  `rtl/twiddle256.hex`. Entry k is W₂₅₆^k = e^(−j2πk/256).
* **Products.** Products are rounded down by an arithmetic shift of 14 and then
  saturated.
* **Inverse.** With `inverse` = 1 the real and imaginary parts are swapped at the input
  and again at the output. Swapping turns the forward transform into the inverse one,
  so the result is the IDFT, 1/N included, in the same digit-reversed order.

## Ordering stage (`ord_block`, `rx_fft`)

The combiner in 256 mode needs natural order, so `rx_fft` adds an ordering block after
the FFT. `rx_fft` is the FFT without the 16-point mode and without MUX II.

* **Ping-pong RAMs.** The ordering block uses two 256-word RAMs. The RAM being written
  takes each word at address `Mcount`, the digit reversal of the counter, which is only
  wiring. The other RAM is read at the plain counter.
* **Swapping.** The roles swap after every 256 words.
* **Latency.** 256 samples + 1 cycle.
* **64 mode.** The input multiplexer holds the RAM data at 0, the ordering FSM stops, and
  the output multiplexer passes the FFT output straight through. The combiner accepts the
  64 outputs in digit-reversed order (see below).

## Combiner (`combiner`)

```
y ─► reg ─► despreader ─► MAC module ─────────────► FO (sign), acc
               ▲ chip        │ xd_r, xd_i, Hsq   ▲ eq_r, eq_i
            64-bit ROM       ▼                   │
                        division module ─► partitioned memory (64 + 192 words)
   combiner_ctrl: FSM256 / FSM64 ─► 23-bit control word (MUX23 by S256)
```

### Frame

A frame is one pilot symbol and 31 data symbols, each of N = 256 or 64 sub-carriers. The
transmitted data are BPSK.

* **256 mode.** A symbol carries four bits. Bit g is spread over sub-carriers
  64g … 64g+63 with chip c(k mod 64).
* **64 mode.** A symbol carries one bit.

### Despreader

XOR gates against the chip from the 64-bit code ROM (`CHIP_CODE` parameter, 1 = chip −1).
This is the one's complement, i.e. multiplication by −1 minus one LSB.

### Channel estimation (pilot symbol)

The pilot is all +1, spread like data. For each sub-carrier the despread pilot value
X(k) ≈ H(k) flows through two paths:

* **MAC path.** The MAC module's two multipliers form |X|² (`Hsq`).
* **Division path.** The division module delays X by a two-word FIFO so that it meets
  `Hsq + λ`, which is held in register R. It then writes the MMSE coefficient
  A(k) = X*(k)/(|X(k)|² + λ) to coefficient word k.

λ (`lambda`) is an input because it depends on SNR and user count.

The pilot is despread with the same chip ROM as the data, so the chip product becomes
part of A(k). Which user is received is therefore set by the code the pilot symbol was
spread with.

### Data symbols

For each sub-carrier the coefficient is read back, and the MAC module accumulates
Re{A·X} = a_r·x_r − a_i·x_i over 64 sub-carriers. The subtraction is an XOR
(one's complement, controlled by S13) of the second product, so one adder serves both
phases. The sign of the sum is the bit `fo`, with 0 meaning +1. `acc` gives the sum
itself.

### Control

`combiner_fsm` (instantiated as FSM256 and FSM64) produces a 23-bit word:

* S11–S14, the MAC muxes, XOR and accumulator clear;
* enF and enR, the division FIFO and register;
* cs, the RAM write strobe;
* ra and wa, 8-bit RAM read and write addresses.

It also produces the chip index, the accumulator enable and the bit strobe.

* **Phase lengths.** Estimation lasts N cycles and demodulation 31·N: 256/7936 or
  64/1984.
* **Selection.** `combiner_ctrl` selects the active FSM with S256 and stops the other.
* **Chip order in 64 mode.** The chip index follows the same digit-reversed order as the
  unordered FFT output, so each sub-carrier still meets its own chip.

### Pipeline

| step | what happens |
|------|--------------|
| 0 | input register, coefficient read address issued |
| 1 | despread, MAC input muxes S11/S12 |
| 2 | MAC input registers, XOR S13, division FIFO enF |
| 3 | product registers, sum / Hsq, accumulator clear S14, enR |
| 4 | accumulator, coefficient write (cs, wa), `fo_valid` |

`fo_valid` rises 5 cycles after the last sample of a 64-chip group.

### Coefficient memory (`eq_memory`)

256 words of {m_r, m_i} with one write port and one synchronous read port. The memory is
split into a 64-word and a 192-word part. In variant 1 the 192-word part is gated
(`mem_upper_en` low) whenever S256 = 0.

### Number formats

All words are 16 bits.

* **MAC products:** (a·b) >>> 8, saturated (`MULT_SHIFT`).
* **Division:** (num << 8)/(Hsq + λ), truncated and saturated (`DIV_SHIFT`).
* **Sums:** saturating.

With the testbench signal level (time-domain peak about ±256·N before the FFT's 1/N),
these formats give correct decisions at λ = 16. Other levels may need different shifts.

## Receiver stream format (`mccdma_receiver`)

* **Input.** One complex 16-bit sample per `din_valid` cycle, after guard-interval
  removal. Symbols of N samples follow each other, and the first symbol after reset or a
  size change is a pilot.
* **Output.** `fo`/`fo_valid`: four bits per symbol in 256 mode and one in 64 mode. Bits
  appear about one symbol later in 64 mode and two symbols later in 256 mode, because of
  the FFT and ordering buffers. The input must continue for that long to flush the last
  bits out.
* **Status outputs.**
  * `fo_soft`, the accumulated sum;
  * `pilot`, high while a pilot is being processed;
  * `restart`;
  * the gating indications `fft_gck1_en` and `mem_upper_en`.

## Files

| file | content |
|------|---------|
| `rtl/mccdma_pkg.sv` | word and complex types, control-word structs, digit reversal, saturation |
| `rtl/mccdma_top.sv` | receiver and stand-alone FFT side by side |
| `rtl/mccdma_receiver.sv` | FFT with ordering stage, then combiner |
| `rtl/rfft256.sv`, `ffsm.sv`, `r4_stage.sv`, `r4_stage_fsm.sv` | reconfigurable FFT and its control |
| `rtl/r4_commutator.sv`, `delay_fifo.sv`, `r4_butterfly.sv`, `cmult.sv`, `twiddle_rom.sv`, `twiddle256.hex` | stage datapath |
| `rtl/rx_fft.sv`, `ord_block.sv` | receiver FFT and ordering stage |
| `rtl/combiner.sv`, `despreader.sv`, `mac_unit.sv`, `division_module.sv`, `divider.sv`, `eq_memory.sv`, `combiner_fsm.sv`, `combiner_ctrl.sv` | combiner |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_fft_workload.sv` | 4000 random samples per FFT size through both variants |
| `tb/tb_multiuser.sv` | 32 users at 40 dB SNR through the receiver |
| `tb/fft_ref_pkg.sv` | bit-true radix-4 DIF model, DFT, digit reversal |
| `tb/mccdma_tx_pkg.sv` | behavioural transmitter: spreading, IFFT, two-path channel |

## Simulating

Run from the directory that holds `rtl/` and `tb/`. The twiddle ROM loads
`rtl/twiddle256.hex` by that relative path. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mccdma_pkg.sv tb/fft_ref_pkg.sv tb/mccdma_tx_pkg.sv tb/tb_mccdma_top.sv \
  --top-module tb_mccdma_top -o sim && ./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

### What the testbenches check

* **FFT.** `tb_rfft256` and `tb_fft_workload` compare every output bit for bit with a
  fixed-point radix-4 model, and with a floating-point DFT/N (inverse DFT for the IFFT
  mode) within 12 LSB. They also
  check latency and that the two variants give the same output.
* **Receiver.** `tb_mccdma_receiver` compares every received bit with the transmitted one
  over a two-path channel in both modes and both variants.
* **Multi-user.** `tb_multiuser` superimposes 32 Walsh-coded users at 40 dB SNR over a
  two-path channel and requires every bit of the received user to be right, in both
  modes.
* **Top level.** `tb_mccdma_top` runs the top at its default parameters: receiver-I and
  RFFT-I. It covers:
  * a full 256-sub-carrier frame;
  * a second pilot over a new channel;
  * a full 64-sub-carrier frame;
  * a return to 256;
  * 256-, 64- and 16-point blocks and a 64-point IFFT through the stand-alone FFT at
    the same time.

  It checks the phase lengths (256/7936 and 64/1984 cycles). It also counts restarts,
  stage-1 and stage-2 gating, memory gating, pilot re-estimation, both bypasses and the
  inverse mode, and each must occur.

This full-size run is the largest configuration simulated. It is also the largest the
design has, since all parameters are at their defaults.

## Choices made here, and departures

* **Select lines.** MUX I is driven by S256 and MUX II by S64, as the block diagram
  labels them. One passage instead ties MUX I to S64. MUX II keeps stage 2 in the path
  whenever S256 or S64 is set.
* **Inverse select.** How the IFFT is selected is this design's own choice: an input that
  swaps real and imaginary parts.
* **Control lines.** Each stage FSM has seven control lines, but their meaning is this
  design's. The FIFO and twiddle addresses are extra buses.
* **Fixed-point choices.** The scaling (1/4 per stage), the twiddle format, the MAC and
  divider shifts, and the one's-complement negations are choices.
* **Chip code.** The code is a placeholder. Set `CHIP_CODE` to the real spreading
  sequence.
* **Pipeline and reset.** The combiner's pipeline steps, the input register before the
  despreader and the asynchronous active-low reset are this design's own.
* **Frame alignment.** Frame alignment is minimal: the first symbol after reset or a size
  change is the pilot. There is no frame or symbol synchronisation.
* **Ordering-stage input multiplexer.** It feeds both ordering RAMs. The block diagram
  draws it into one.
* **Not included.** The receiver front end is not part of the core: RF, ADC, guard
  removal, the channel-quality logic that would drive S256/S64, and the Viterbi decoder
  after FO. Nor is the transmitter, which exists only as a testbench model.
