# Rate-1/2 convolutional encoder and hard-decision Viterbi decoder

A link that flips bits now and then can be made reliable by sending two code
bits for every data bit and letting the receiver pick the data sequence whose
code is closest to what arrived. This design does that in SystemVerilog. A
three-tap convolutional encoder turns each message bit into a two-bit symbol.
A Viterbi decoder finds the most likely message from the received symbols.
It runs at one symbol per clock and corrects isolated bit errors.

The architecture follows the encoder/decoder described in *"Verilog based
efficient convolution encoder and viterbi decoder"*. That paper gives the
encoder taps, the decoder stages and a few sizes. It does not describe the
control of the decoder, so the blocking, handshakes and latency here are
choices of this design. They are listed in "Where this departs from the
source" below.

```
 input_data ─► conv_encoder ─► encoded ──(XOR chan_err)──► viterbi_decoder ─► out
                                                            │
      branch_metric_unit ─► path_metric_unit ◄─► path_metric_store
                                   │ decisions
                            survivor_memory (2 x TL words) ─► traceback_unit
```

## The code

The encoder keeps the two previous input bits, D1 (newest) and D2. For input
`u` it sends

```
y1 = u ^ D1 ^ D2        (generator 111, octal 7)
y0 = u ^ D2             (generator 101, octal 5)
```

It sends y1 first, as the MSB of the symbol `{y1, y0}`. The message 1011
encodes as `11 10 00 01`.

The decoder works on the trellis of this code. There are 2^(K-1) = 4 states,
and a state is `{D1, D2}`. One convention is used throughout the RTL and the
testbenches (`viterbi_pkg`):

* The next state is `{u, D1}`: the new bit enters at the MSB and D2 falls out.
* State `ns` therefore has two predecessors, `{ns[0], 0}` and `{ns[0], 1}`.
  The bit that tells them apart is the one that fell out. That bit is what the
  add-compare-select stores as its *decision* for `ns`.
* So a traceback step is `prev = {state[K-3:0], decision}`. The decoded bit of
  that trellis step is the newest state bit, `state[K-2]`.

The constraint length `K` and the generators `G1` and `G0` are parameters of
every block. `K` = 5 and `K` = 9 are tested as well as the default `K` = 3.

## Decoder datapath

Each accepted symbol takes one clock through these blocks:

1. **branch_metric_unit** (combinational). Computes the Hamming distance of the
   received symbol to each of 00, 01, 10 and 11. The values are 0..2.
2. **path_metric_unit** (combinational add-compare-select). For every state it:
   * adds each predecessor's path metric to the branch metric of the symbol that
     branch would have sent;
   * keeps the smaller sum, and gives a tie to the predecessor whose dropped bit
     is 0;
   * outputs one decision bit per state.

   It then subtracts the smallest new metric from all of them. After that the
   best state always has metric 0, and the metrics fit in `PMW` = 4 bits.
   `best_state` is the lowest-numbered state with metric 0.
3. **path_metric_store**. One `PMW`-bit register per state. After reset, and
   after the last symbol of a message, it loads 0 for state 0 and 8 (binary
   1000) for the other states. The encoder starts in state 0, so paths that
   begin elsewhere lose.
4. **survivor_memory**. Holds 2·TL = 64 words, each 2^(K-1) bits wide: one
   decision bit per state per received symbol. It has one write port (written
   on the clock edge) and one read port whose read is combinational. That lets
   the traceback follow one trellis step per clock without a read-latency
   bubble.
5. **traceback_unit**. Follows the decisions backwards from the best state and
   emits the decoded bits in their original order.

### Metric range

Any state can be reached from any other in K-1 steps. Each step adds at most 2.
So once the start-up offset has washed out, the metrics spread over at most
2·(K-1). Before normalisation a sum is at most that spread plus the start-up
offset plus 2, and one guard bit holds that.

* `PMW` = 4 is enough for K ≤ 5.
* K = 9 needs `PMW` = 5.

`viterbi_decoder` checks this with an assertion at elaboration, so set `PMW`
together with `K`.

## Trellis blocks and traceback

This is the part that determines throughput and latency.

The symbol stream is cut into **blocks of TL = 32 symbols** (the trellis
length). A block also ends early at the symbol flagged `last`. The survivor
memory is two halves of TL words:

* the add-compare-select writes block *n* into one half;
* meanwhile the traceback reads block *n-1* from the other half;
* the halves swap at every block boundary.

At the end of a block the decoder hands the traceback four things: the half,
the block length, the best state after the block's last symbol, and whether the
block ends a message. The traceback then works like this:

* It reads the word of the last symbol and takes the decision bit of the
  current state.
* It records the decoded bit (the state's newest bit).
* It steps to the predecessor state. One step takes one clock, from the newest
  word down to word 0.
* The bits come out newest first. They are collected in a TL-bit register and
  then shifted out oldest first on `out_bit`/`out_valid`. `out_last` marks the
  final bit of a message.

A full block takes TL clocks to arrive, TL clocks to trace and TL clocks to
shift out. With back-to-back full blocks these three phases overlap exactly, so
the decoder never stalls:

* the traceback of block *n* ends on the same clock edge that hands over
  block *n+1*;
* it loads its result into the output register on the same edge that the
  previous block's last bit leaves.

**Latency.** Let edge E be the clock edge that accepts the last symbol of a
block of LEN symbols. The block's first decoded bit is valid from edge E+LEN
on, so it is first sampled at edge E+LEN+1. It comes later only if the output
is still shifting out the previous block. The bits of a block then follow on
consecutive clocks.

**When the input stalls.** `in_ready` drops only for a symbol that would end a
block while the traceback is still busy with the previous block. That happens
only when messages shorter than the traceback time follow each other closely.

**Limits of tracing each block on its own.** Path metrics carry over from one
block to the next. The traceback of a block, however, starts from that block's
best end state and sees no later symbols. Errors in the last few symbols before
a block boundary are therefore corrected less reliably than errors inside a
block. Likewise, at a message end the decoder picks the best final state,
because the encoder is not flushed with tail bits. A sliding-window traceback
with look-ahead would remove this, but it needs a traceback that runs faster
than one step per clock or a second read port.

## Interfaces

All blocks use one clock, `clk`, and a synchronous, active-high `reset`.

| module | in | out |
|---|---|---|
| `top_encoder_decoder` | `input_data/valid/last`, `chan_err[1:0]` | `input_ready`, `encoded[1:0]/encoded_valid/encoded_ready`, `out/out_valid/out_last` |
| `conv_encoder` | `in_bit/in_valid/in_last`, `sym_ready` | `in_ready`, `sym[1:0]/sym_valid/sym_last` |
| `viterbi_decoder` | `in_sym[1:0]/in_valid/in_last` | `in_ready`, `out_bit/out_valid/out_last` (no backpressure) |

* **Encoder timing.** The encoder's output is a register stage, so a symbol
  appears one clock after its bit is accepted. After a `last` bit the encoder
  clears its state, so the next message starts from state 0.
* **`chan_err` in the top.** This input stands in for the noisy channel. It is
  XORed onto the symbol on its way into the decoder, so a 1 flips that code
  bit. It acts on the symbol shown on `encoded` in the cycle where
  `encoded_valid && encoded_ready`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `K` | 3 | constraint length (states = 2^(K-1)) |
| `G1`, `G0` | 3'b111, 3'b101 | generators for y1 and y0. Bit K-1 taps the current input; bit 0 taps the oldest stored bit |
| `TL` | 32 | trellis length: the block size and half the survivor memory depth |
| `PMW` | 4 | path metric width |
| `PM_INIT` | 2^(PMW-1) | starting metric of states other than 0 (in `path_metric_store`) |

The default configuration has:

* 4 states;
* a 64 × 4 survivor memory;
* 129 flip-flop bits in generic synthesis, plus the 256-bit memory.

The tested configurations are:

| K | generators (octal) | `PMW` | survivor memory |
|---|---|---|---|
| 3 | 7/5 | 4 | 64 × 4 |
| 5 | 23/35 | 4 | 64 × 16 |
| 9 | 561/753 | 5 | 64 × 256 |

## Where this departs from the source

* **Constraint length.** The source is not consistent about it. Its encoder
  drawing and its worked examples (1011 → 11 10 00 01, a four-state trellis)
  are K = 3. Its memory-sizing paragraph assumes K = 5 (a 64 × 16 memory). Its
  simulation section mentions K = 9. The defaults here follow the K = 3
  encoder; the other two are parameter settings. The generators for K = 5 and
  K = 9 are standard codes chosen here, not taken from the source.
* **From the source:**
  * the encoder taps;
  * the hard-decision Hamming branch metrics;
  * 4-bit path metrics, with starting values 0 and 1000;
  * one decision bit per state;
  * a survivor memory twice the trellis length of 32, with one write port and
    one asynchronously read port;
  * traceback from the end of the survivor path;
  * the module breakdown and the top name `top_encoder_decoder` with `clk`,
    `reset`, `input_data` and `out`.
* **Added by this design:**
  * the valid/ready/last handshakes;
  * the block-wise ping-pong traceback and output reordering;
  * min-subtraction normalisation;
  * tie-breaking;
  * re-initialisation at message ends;
  * the `chan_err` error-injection input and the `encoded_*` observation ports.
* **Not built:**
  * The analog front end (quantisation of the received signal).
  * Frame/symbol synchronisation. The decoder assumes aligned two-bit
    hard-decision symbols.
  * The AWGN channel itself. `chan_err` replaces it.
  * Soft-decision decoding.
* The survivor memory is a plain array. A synthesis tool may map it to RAM or
  to flip-flops; no vendor RAM macro is instantiated.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models in
`tb/vit_ref_pkg.sv` are a bit-serial encoder and a software Viterbi decoder
that follows the same blocking and tie rules on integer metrics.

| testbench | what it checks |
|---|---|
| `tb_conv_encoder` | The 1011 example; random messages with gaps and output stalls; one-clock latency. |
| `tb_branch_metric_unit` | All 16 distances, exhaustively. |
| `tb_path_metric_unit` | The first step of the worked trellis; 2000 random metric sets against an independent per-state model. |
| `tb_path_metric_store` | Start values, load, hold, and init over load. |
| `tb_survivor_memory` | Random writes; the asynchronous read, including a read of the word being written. |
| `tb_traceback_unit` | A behavioural memory seeded with known survivor paths; bit order, `out_last`, latency (first bit valid LEN clocks after the start), no stall on back-to-back full blocks, stalls on short ones. |
| `tb_viterbi_decoder` | 11 10 10 01 (one error) and 11 10 00 01 → 1011; a 12-block stream at full rate with one error per block, recovered exactly; heavy random errors against the reference model; stalls. |
| `tb_viterbi_k5`, `tb_viterbi_k9` | The same checks at K = 5 and K = 9. |
| `tb_top_encoder_decoder` | The whole chain at the default sizes. It counts and requires: corrected channel errors, full and message-end blocks, use of both memory halves, metric normalisation and input stalls. |

To simulate with Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_top_encoder_decoder \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/viterbi_pkg.sv tb/vit_ref_pkg.sv \
    tb/tb_top_encoder_decoder.sv
./obj_dir/Vtb_top_encoder_decoder
```

Replace the top module and testbench file to run another testbench. Each one
finishes in well under a second.
