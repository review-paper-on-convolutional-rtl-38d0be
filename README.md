# Convolutional encoders at code rates 1/2, 1/3 and 2/3

A convolutional encoder is a forward-error-correction front end. It adds
redundancy to a bit stream so that a receiver, typically a Viterbi decoder,
can correct bit errors caused by channel noise. Every clock the encoder takes
k new data bits and emits an n-bit code word, giving a code rate of k/n. Each
code bit is the modulo-2 sum (XOR) of a chosen set of bits held in a short
shift register. So every word depends on the present input and on a few past
ones, and that memory is what the decoder uses.

This RTL has three such encoders, sized for OFDM/802.11-style baseband use:

| encoder        | bits in / clock | register    | bits out / clock | module         |
|----------------|-----------------|-------------|------------------|----------------|
| rate 1/2       | 1               | m2..m0 (3)  | 2                | `conv_enc_r12` |
| rate 1/3       | 1               | m2..m0 (3)  | 3                | `conv_enc_r13` |
| rate 2/3       | 2               | m7..m0 (8)  | 3                | `conv_enc_r23` |

All three are instances of one generalized (n, k, m) encoder,
`conv_encoder`. `conv_enc_top` places them side by side.

## The generalized encoder

`conv_encoder` holds an `M`-bit register `m`. It has these parameters:

| parameter | meaning |
|-----------|---------|
| `K` | input bits per clock |
| `M` | register stages |
| `N` | output bits |
| `DIR` | which end of the register the new bits enter |
| `G` | one `M`-bit generator mask per output |

On each rising edge, `K` new bits enter the register and the oldest `K`
bits are dropped. The output works like this:

- Output `code[j]` is `^(G[j] & m)`: the XOR of the stages that mask `G[j]`
  selects.
- The highest generator, `G[N-1]`, gives the first code bit (`code1`).
- A word therefore reads `{code1, code2, ...}` from MSB to LSB. This is also
  how the words are written as numbers below (for example 111 = 7).

`DIR` is needed because the encoders number their stages in opposite
directions:

- `SHIFT_UP` is used for rates 1/2 and 1/3. The new bit enters `m0`, and on
  each clock `m0 -> m1 -> m2`. So `m0` is the newest bit and `m2` the oldest.
- `SHIFT_DOWN` is used for rate 2/3. The new pair enters `m7` (`ci[1]`) and
  `m6` (`ci[0]`), and on each clock the pairs move two stages down:
  `m7,m6 -> m5,m4 -> m3,m2 -> m1,m0`. So `m1,m0` is the oldest pair.

The constants shared by the encoders are in `conv_enc_pkg`:

- the generator masks of the three encoders;
- their register sizes;
- the `shift_dir_e` type.

The module's defaults are the rate 1/2 encoder. Any k/n code with
1 <= K < M and N > K can be built by changing the parameters.

## The three encoders

Each adder is an XOR over the listed register stages:

| rate | output | taps            | mask (m[M-1]..m0) |
|------|--------|-----------------|-------------------|
| 1/2  | code1  | m0 ^ m1 ^ m2    | 111               |
| 1/2  | code2  | m0 ^ m1         | 011               |
| 1/3  | code1  | m0 ^ m1 ^ m2    | 111               |
| 1/3  | code2  | m0 ^ m1         | 011               |
| 1/3  | code3  | m0 ^ m2         | 101               |
| 2/3  | co1    | m2 ^ m3 ^ m5    | 0010_1100         |
| 2/3  | co2    | m1 ^ m4         | 0001_0010         |
| 2/3  | co3    | m0 ^ m6 ^ m7    | 1100_0001         |

For rates 1/2 and 1/3 these are the usual constraint-length-3 generators 7
and 3 (octal), plus 5 at rate 1/3.

The rate 2/3 code is less usual. Its register holds the last four input
pairs. `co3` mixes the newest pair (m7, m6) with the oldest bit (m0). `co1`
and `co2` use only past pairs. So only one of the three output bits reacts
to the pair that has just arrived.

Each module keeps its own port names:

- `conv_enc_r12`: `clk`, `reset`, `data_in`, `code1`, `code2`.
- `conv_enc_r13`: the same ports, plus `code3`.
- `conv_enc_r23`: `clock`, `reset`, `ci[1:0]`, `co1`, `co2`, `co3`.

### Reference behaviour

These sequences all start from a cleared register. The testbenches check
each of them.

- **Rate 1/2:** input 0 gives 00. Then input 1 gives 11 (3).
- **Rate 1/3:** input 0 gives 000. Then input 1 gives 111 (7).
- **Rate 1/3 sequence:** inputs 1, 0, 1, 1 leave the register `m[2:0]` at
  1, 2, 5, 3. The words are 111, 110, 010, 001.
- **Rate 2/3:** pair 00 gives 000. Then pair 10 sets only `m7` and gives 001
  (1).

## Timing and reset

- **One word per clock, no stalls:** each encoder accepts a new input on
  every rising edge and produces a new word for every input. There is no
  enable, valid or ready signal.
- **Latency:** the code bits are pure XOR logic after the register. The word
  for an input appears just after the edge that samples that input, and holds
  for one clock period. If a downstream stage samples on the next edge, it
  sees that word there: one clock of latency.
- **No input-to-output path:** a changing input does not reach the outputs before
  the edge. The outputs come only from flip-flops through XOR gates.
- **Reset:** `reset` is asynchronous and active high. It clears every register
  stage to 0, so all code words are 0 while it is held. Coding restarts from
  the all-zero state on the first edge after it is released. Hold the inputs
  at 0 during reset if a clean restart matters: the register loads whatever
  is on the input at the first edge after release.

## The top level

`conv_enc_top` runs the three encoders on one `clk` and one `reset`. Each
encoder has its own input and its own packed word output:

| encoder | input | output |
|---------|-------|--------|
| rate 1/2 | `r12_data_in` | `r12_code = {code1, code2}` |
| rate 1/3 | `r13_data_in` | `r13_code = {code1, code2, code3}` |
| rate 2/3 | `r23_ci[1:0]` | `r23_code = {co1, co2, co3}` |

There is no rate-select multiplexer. Picking the rate is left to the
surrounding logic, for example by choosing which output to forward.

After synthesis the whole top is 14 flip-flops and a handful of XOR gates.

## Where this design makes its own choices

The encoder equations, register sizes and port names are fixed. The
following points were decisions, and a user should know them:

- **Reset style.** An asynchronous clear was chosen, as in the gate-level
  view of the encoders. A synchronous reset would also match the behavioural
  description. To switch, change the one `always_ff` in `conv_encoder`.
- **Reset polarity.** Reset is taken as active high, although one reference
  waveform shows the reset line high during normal operation.
- **Rate 2/3 pair movement.** Only the entry point of the pair (into m7, m6)
  and the taps are fixed. The two-stage shift toward m0 is this design's
  reading. A different ordering of the older pairs would give a different
  code with the same taps.
- **Rate 2/3 register enable.** One implementation view drives the enable of
  the rate 2/3 register from a multiplexer with a constant input, and shows
  both a clear and a preset pin. Their purpose is unknown, so neither is
  reproduced: the register is always enabled and resets to zero.
- **Word order.** `code1` is the MSB. Which of the two rate 1/2 generators is
  called `code1` follows the naming (`code1` = 111). Swapping the two would
  not change the code, only the order of the bits in the word.
- **Shared clock and reset.** The three encoders share one clock and one
  reset in the top. This is a choice of the top level only.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and a watchdog ends a hung run as a
failure. Every reference model is written from the XOR equations over a
history of the applied inputs, not from the design's register.

| testbench | what it checks |
|-----------|----------------|
| `tb_conv_encoder` | Three configurations at once: the default; K=2, M=8, N=3 with `SHIFT_DOWN`; and K=3, M=9, N=4 with arbitrary masks. Covers a walking 1 and 400 random clocks. |
| `tb_conv_enc_r12`, `tb_conv_enc_r13`, `tb_conv_enc_r23` | The reference sequences above, 400 random clocks, and the printed register values of the rate 1/3 sequence (read hierarchically). |
| `tb_conv_enc_top` | All three encoders with independent random streams for about 3,200 clocks. Eight asynchronous resets interrupt the streams. It counts the words from each encoder, the resets, and whether every code bit was seen at 1. A count of zero fails the test. The top has no parameters, so this is a full-size run. |

Every testbench also checks, before each edge, that the word has not yet
moved, and, after the edge, that the new word is right. Each testbench
checks an asynchronous reset between clock edges.

Each testbench was also run against a deliberately broken copy of its
module, and reported failures:

- adders missing the top register stage;
- a wrong generator;
- swapped outputs;
- a reversed shift direction;
- swapped top-level wiring.

To run one, for example the top:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/conv_enc_pkg.sv tb/tb_conv_enc_top.sv --top-module tb_conv_enc_top
    ./obj_dir/Vtb_conv_enc_top

The package must be given first, and `-Irtl` lets verilator find the other
modules by file name. `verilator --lint-only -Wall -Irtl rtl/conv_enc_pkg.sv
rtl/conv_enc_top.sv` lints the design without warnings. If you lint a single
encoder on its own, verilator warns about the package constants that
encoder does not use.

## What is not covered

- The code rates are fixed by the instantiated encoders. There is no runtime
  rate switching and no puncturing.
- No decoder is included.
- The design has been checked in simulation only, not on an FPGA.
