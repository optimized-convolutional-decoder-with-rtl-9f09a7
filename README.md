# Rate-1/3 convolutional codec with a Viterbi decoder

A radio link such as MIMO-OFDM delivers bits with errors in them: random
single errors from noise, and bursts when a fade or interference hits
several adjacent bits. This design guards a data stream against both. On the
transmit side each data bit is expanded into three coded bits by a
convolutional encoder, and the coded bits of a frame are shuffled by an
interleaver. On the receive side the shuffle is undone, which scatters any
burst into isolated errors, and a Viterbi decoder finds the data sequence
whose code is closest to what was received.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with parameters for
the code, the frame length and the interleaver shape. It covers the coding
chain only. The MIMO-OFDM modulator, the channel and the demodulator are not
included. The coded symbols leave the design on `tx_*` and come back on
`rx_*`, so a modem, or a testbench channel model, goes between them.

```
            transmit side                                   receive side
data_in -> conv_encoder -> block_interleaver -> tx_*  ~~  rx_* -> block_interleaver -> viterbi_decoder -> sout
           (rate 1/3,      (4 x 15, row in,     (modem,       (15 x 4: inverse)      BMU -> PMU -> TBU   out_enable
            zero tail)      column out)          channel)
```

## The code

The encoder is a four-stage shift register, M3 M2 M1 M0. A new data bit
`S_in` enters M3 and the older bits move towards M0. For every data bit three
coded bits come out, each the XOR of the input and some of the stages:

| coded bit | taps                    | generator word {S_in,M3,M2,M1,M0} |
|-----------|-------------------------|-----------------------------------|
| S2        | S_in ^ M3 ^ M2 ^ M1 ^ M0 | `11111` |
| S1        | S_in ^ M3 ^ M1 ^ M0      | `11011` |
| S0        | S_in ^ M2 ^ M0           | `10101` |

A symbol is `{S2,S1,S0}`, with S2 in the MSB. The generators are stored in
`viterbi_pkg` as `CODE_GEN`. Bit 4 of a generator word is the input and bit
i is stage Mi.

Since all four stages feed the outputs, the code has 2^4 = 16 states and a
constraint length of 5. In octal the generators are 37, 33 and 25, and the
free distance is 12. Any two valid coded frames therefore differ in at least
12 bits, and a maximum-likelihood decoder corrects every pattern of up to 5
bit errors in a frame. Some descriptions of this encoder count 8 states for
it. That figure does not match the equations above. This RTL follows the
equations, so the decoder has 16 states.

**Framing and the zero tail.** Data is coded in frames of `DATA_BITS` = 16
bits. After the last data bit the encoder feeds four zero bits of its own,
with `in_ready` low. Those zeros empty the register, so every frame starts
and ends in state 0. A frame is therefore L = 20 symbols, or 60 coded bits.
The decoder relies on the known end state: it traces back from state 0
without searching for the best final state.

## Interleaver and de-interleaver

`block_interleaver` stores a whole frame of 60 coded bits, in arrival order,
as a 4 x 15 matrix. It writes the matrix row by row and reads it column by
column. Output bit p is input bit `(p mod 4)*15 + p div 4`. Bits that are
neighbours on the channel were 15 bits, or 5 symbols, apart before
interleaving. The same module with rows and columns swapped (15 x 4) is the
exact inverse, and the receive side uses it that way. A burst of up to 4
adjacent channel bits therefore reaches the decoder as isolated errors.

Each instance has a single buffer. It fills for L cycles (`in_ready` high)
and then drains for L cycles (`out_valid` high, one symbol per `out_ready`).
It adds L cycles of latency, and a frame occupies it for 2L cycles. The 4 x 15
shape is this design's choice. Any ROWS x COLS = N x L works, and an
elaboration-time assertion checks that product.

## Viterbi decoder

The decoder takes one received symbol per clock and keeps, for each of the
16 states, the best path that ends there. Its three units match the three
steps of the algorithm.

**Branch metric unit (`viterbi_bmu`).** For a received 3-bit symbol it
computes the Hamming distance to each of the 8 possible code words. That
gives 8 metrics of 0 to 3. A trellis branch uses the metric of the code word
it would have produced, so the unit does not depend on the generators.
Decisions are hard: each received bit is 0 or 1.

**Path metric unit (`viterbi_pmu`, 16 x `viterbi_acs`).** State s is
`{M3,M2,M1,M0}`. Two states lead into state ns: `{ns[2:0],0}` and
`{ns[2:0],1}`. Both branches carry input bit ns[3], the newest bit. Their
expected code words are computed from the generators at elaboration time and
wired as constants. Each add-compare-select unit adds the two predecessor
metrics to their branch metrics, keeps the smaller sum, and reports one
decision bit, which is the bit that dropped out of the register on the
winning branch. On a tie the 0 predecessor is kept. All 16 units work in the
same clock cycle.

The path metric registers are cleared between frames. State 0 is loaded with
0 and every other state with 2^(PMW-1). That start value is larger than any
real path metric in a frame, so paths that do not begin in state 0 lose.
PMW = clog2(N*L+1)+1, which is 7 bits at the defaults. A metric can never
exceed 2^(PMW-1) + N*L, so no normalisation or saturation is needed. Longer
frames widen PMW automatically.

**Trace-back unit (`viterbi_tbu`).** The 16 decision bits of every step are
written into a survivor memory of L words. After the L-th word the unit walks
back one step per clock from state 0. At step t it reads the decision bit d
of the current state s. The data bit of that step is s[3], and the previous
state is `{s[2:0], d}`. The L recovered bits are held in a register. The
first `DATA_BITS` of them are then sent in their original order on `sout`,
one per clock, with `out_enable` high. The four tail bits are dropped.

**Error detection.** When trace-back starts, the decoder captures the final
path metric of state 0 and outputs it as `err_count`, with
`err_detected = (err_count != 0)`. That metric is the number of received bits
that disagree with the code of the decoded data. For a frame with at most 5
errors it is exactly the number of bits that were corrected. For a frame
beyond the code's power it is almost always non-zero, so the frame is flagged, but
the decoded data may be wrong. Both outputs hold from the frame's first
output bit until the next frame's trace-back starts.

**Decoder timing, per frame:**

| phase | cycles | `rx_ready` | `out_enable` |
|-------|--------|------------|--------------|
| receive symbols | L = 20 (one per `rx_valid`) | 1 | 0 |
| trace back | L = 20 | 0 | 0 |
| send data | DATA_BITS = 16 | 0 | 1 |

The first data bit appears L+1 = 21 cycles after the cycle that accepted the
last symbol. Without input gaps, one 16-bit frame takes 56 decoder cycles.
The path metrics stay cleared while `rx_ready` is low, so the next frame
starts cleanly.

## Interfaces

`conv_codec_top` (defaults N = 3, M = 4, DATA_BITS = 16, ROWS = 4, COLS = 15):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `reset` | in | 1 | clock; synchronous, active-high reset |
| `data_in`, `data_valid`, `data_ready` | in/in/out | 1 | data bits to send (valid/ready); `data_ready` is low during the tail and while the interleaver drains |
| `tx_sym`, `tx_valid`, `tx_last`, `tx_ready` | out/out/out/in | N,1,1,1 | interleaved coded symbols towards the modulator |
| `rx_sym`, `rx_valid`, `rx_ready` | in/in/out | N,1,1 | received coded symbols from the demodulator |
| `sout`, `out_enable` | out | 1 | decoded data bits, in order, one per clock while `out_enable` is high |
| `err_detected`, `err_count` | out | 1, clog2(N*L+1) = 6 | the decoded frame had errors / how many coded bits were wrong; valid while `out_enable` is high |

Every module has a header comment that gives its interface and timing.
All handshakes are valid/ready, and a transfer happens on a clock edge where
both are high. The one exception is the decoder output, which has no
back-pressure.

## Files

| file | contents |
|------|----------|
| `rtl/viterbi_pkg.sv` | code constants: N, M, generators, frame length, interleaver shape |
| `rtl/conv_encoder.sv` | shift-register encoder with zero-tail insertion |
| `rtl/block_interleaver.sv` | frame buffer with row-in / column-out permutation |
| `rtl/viterbi_bmu.sv` | Hamming-distance branch metrics |
| `rtl/viterbi_acs.sv` | one add-compare-select unit |
| `rtl/viterbi_pmu.sv` | 2^M ACS units and the path metric registers |
| `rtl/viterbi_tbu.sv` | survivor memory, trace-back, serial output |
| `rtl/viterbi_decoder.sv` | BMU + PMU + TBU |
| `rtl/conv_codec_top.sv` | encoder, interleaver, de-interleaver and decoder |
| `tb/tb_*.sv` | one self-checking testbench per module |

The code is generic. `conv_encoder`, `viterbi_pmu` and `viterbi_decoder` take
`N`, `M` and `GEN` as parameters, so a different code only needs a new
generator array. For example, the classic rate-1/2 code with 4 states and
generators 111 / 101 is `N=2, M=2, GEN={3'b111,3'b101}`. The testbenches use
that code as a second, hand-checkable case.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog. With plain
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/viterbi_pkg.sv tb/tb_conv_codec_top.sv --top-module tb_conv_codec_top
./obj_dir/Vtb_conv_codec_top
```

Replace the testbench name to run another one. The testbenches use a 10 ns
clock.

| testbench | what it shows |
|-----------|---------------|
| `tb_conv_encoder` | every symbol against a reference built from the three equations, under random input gaps and stalls; the tail flushes the register; one symbol per clock; the rate-1/2 instance against all 8 rows of its state table |
| `tb_block_interleaver` | interleaver output against the permutation formula; the de-interleaver restores every frame; latency of L cycles |
| `tb_viterbi_bmu` | all 64 symbol / code word pairs |
| `tb_viterbi_acs` | random metrics and forced ties |
| `tb_viterbi_pmu` | all 16 metrics and decisions, step by step, against a reference trellis |
| `tb_viterbi_tbu` | random decision words that contain one known path; data order, latency L+1, output length |
| `tb_viterbi_decoder` | textbook rate-1/2 example: received `11 01 01 10 01` (one error) plus tail `01 11` decodes to `1 1 0 1 1`; rate-1/3 frames with 0 to 5 random errors all decode exactly, with the right error count; latency and output length |
| `tb_conv_codec_top` | full-size link with a channel model that stalls and flips bits: transmitted symbols against a reference encoder + interleaver; 48 frames with no error, one error, a 4-bit burst or 5 scattered errors, all decoded exactly with the right error count; every burst reaches the decoder as errors in four different symbols; it also counts tail steps, interleaved frames and stalls |

The end-to-end testbench runs the top at its default parameters. Building it
takes a few seconds, and the simulation itself well under one.

## Where this design makes its own choices

The shift register and the three output equations define the coding. The
rest was chosen for this implementation:

* **16 states, not 8.** See *The code* above.
* **Frame size and tail.** The 16-bit frames and the automatic zero tail
  are this design's choice. A zero-terminated trellis lets the decoder trace
  back from state 0, with no trace-back depth to tune.
* **Interleaver.** A 4 x 15 single-buffered block interleaver. Any
  permutation that spreads bursts would fit the link.
* **Decoder organisation.** Hard decisions, per-code-word branch metrics,
  fully parallel ACS (one per state), whole-frame trace-back, no metric
  normalisation, and ties resolved towards the 0 predecessor.
* **Interfaces.** Valid/ready handshakes and a synchronous, active-high
  reset. The names `reset`, `sout` and `out_enable` are kept from the
  decoder's original simulation.
* **Not included.** The MIMO-OFDM modem and channel (bring your own on the
  `tx_*` / `rx_*` ports), soft-decision inputs, punctured rates, and
  continuous (unframed) decoding with a sliding trace-back window.

Limits to keep in mind: the decoder does not accept a new frame until it
has sent out the previous one, and the interleaver does not accept one until
it has drained the previous one. Sustained throughput is therefore about 16
data bits per 56 clock cycles. Double-buffering the survivor memory and the
interleaver would remove most of that gap.
