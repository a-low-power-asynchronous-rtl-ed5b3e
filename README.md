# Low-power Viterbi decoder with a pruned hybrid register-exchange survivor memory and an LEDR output link

This is a hard-decision Viterbi decoder for the constraint-length-3, rate-1/2
convolutional code. It is built to switch as little as possible. Two ideas do
the work:

* **Pruned hybrid register exchange (MTHREM).** The survivor memory keeps
  decoded bits in registers, as plain register exchange does. It copies them
  only every second trellis step, and it stores only two paths instead of
  four. A path is stored only if it could still be the transmitted one: the
  best path, and a path whose metric is no larger than the code's
  error-correcting capability t = 2.
* **Level-encoded dual-rail (LEDR) hand-off.** Decoded bits leave over a
  two-wire, two-phase link. Every bit changes exactly one wire, and there is
  no return-to-zero spacer.

The system also has the matching encoder and a channel that injects errors.
A divider turns the 5 MHz global clock into two 2.5 MHz local phases, and the
units take turns on them.

This is an implementation of a published design. Where the publication says
how something works, the RTL follows it. Where it is silent, the choices are
this implementation's and are listed below.

## The code

```
            +-----+      +-----+
  u ---+--->| FF1 |--+-->| FF0 |--+
       |    +-----+  |   +-----+  |
       |             |            |
  Out0 = u ^ FF1 ^ FF0
  Out1 = u ^ FF0
```

* A symbol is packed as `{Out1, Out0}`.
* A state is packed as `{FF0, FF1}`: the last two input bits, oldest first.
  S1 means "the last input was 1 and the one before was 0".
* With this packing the transitions are:

| from | input 0 -> to / symbol | input 1 -> to / symbol |
|------|------------------------|------------------------|
| S0   | S0 / 00                | S1 / 11                |
| S1   | S2 / 01                | S3 / 10                |
| S2   | S0 / 11                | S1 / 00                |
| S3   | S2 / 10                | S3 / 01                |

* The free distance is 5 (path S0-S1-S2-S0), so t = 2 errors can be corrected.
* The encoder (`conv_encoder`) works in blocks of `BLOCK_LEN` = 12 bits. It
  starts every block from S0, and so does the decoder. For the best result,
  end a block with two 0 bits so it also ends in S0. The example block
  `011010111100` does this.

## Decoder data path

`viterbi_decoder` has four units:

1. **`branch_metric_unit`.** For the received symbol it gives the Hamming
   distance (0..2) to each of the four possible symbols.
2. **`path_metric_unit`.** Four `acs_unit`s and the state metric memory.
   * It stores a 4-bit metric and a *live* bit for each state.
   * Each `acs_unit` adds the branch metric to each of its two predecessors'
     metrics and keeps the smaller sum. Sums saturate at 15.
   * A dead predecessor never beats a live one. On a tie, the predecessor
     whose dropped bit is 0 wins.
   * The unit keeps the decision bits of the last two steps, which the
     survivor memory needs.
   * Its `prune` input clears the live bits of the paths the survivor memory
     drops. This is how pruning also takes those paths out of the trellis.
3. **`mthrem_survivor`.** The survivor memory, described in the next section.
4. **`output_unit`.** It holds the decoded block on `pout` and shifts it out,
   first decoded bit first.

## The survivor memory (MTHREM)

This is the part that differs most from a textbook decoder.

**Two-step (hybrid) update.** After every second trellis step, the memory
first traces back two steps through the stored decision bits. This finds the
ancestor of each state it will keep. It then writes that state's register as:

    register(new state) = register(ancestor) followed by the state's own two bits

The last two input bits on any path into a state are the state's own bits.
So the bits appended are simply the state number, with no lookup. Between
updates the registers do not change.

**Only two registers.** The encoder has 2^m = 4 states, so plain register
exchange would need four registers. Here there are 2^m / 2 = 2 slots:

* Slot 0 always takes the best live path. Ties go to the lower state number.
  The best path is kept even when its metric exceeds t, so decoding always
  goes on.
* Slot 1 takes the best path's *sibling*: the state that differs from it
  only in the newest bit. The sibling is kept only if its path is live and its
  metric is at most `THR` = 2.
* Every other path is dropped. It loses its register, and its live bit is
  cleared in the metric memory.

Because only stored paths stay live, the ancestor found by the traceback is
always one of the two slots. An assertion checks this.

**Worked example.** Encode `011010111100` and send it without errors. The two
slots hold these values:

| after step | slot 0 (best) | slot 1 (sibling) |
|-----------:|---------------|------------------|
| 2          | 01            | 00               |
| 4          | 0110          | 0111             |
| 6          | 011010        | 011011           |
| 8          | 01101011      | 01101010         |
| 10         | 0110101111    | 0110101110       |
| 12         | 011010111100  | 011010111101     |

Slot 0 after the last update is the decoded block, first bit in the MSB.
These are also the pairs printed for the published example, and
`tb_mthrem_survivor` checks all six.

**What pruning costs.** With only two stored paths, the decoder can drop the
transmitted path before the errors are resolved. Tried on the example block:

* All 24 single-bit error patterns are corrected.
* 242 of the 300 patterns with one or two bit errors are corrected. An
  unpruned decoder corrects 291, and all 300 if it reads the result at S0.
* Two errors in one symbol near the middle of the block are among the
  failures.
* The error cases used in the tests are all corrected: one bit error, two
  separate bit errors, and single-bit errors in two consecutive symbols.
* The pruning does lose the block when both bits of one symbol are flipped
  (symbol 4 or 5 of the example). It also does when consecutive symbols
  have their Out0 and then their Out1 bit flipped. An unpruned decoder
  corrects both.

The pruning rule is in one `always_comb` block of `mthrem_survivor`. It is
the place to change if you want a different trade-off.

## Local clocks and timing

`e_clock_gen` divides the global clock by two into `s_async1` and `s_async2`.
These are complementary 2.5 MHz phases. Here they are used as clock enables
(`en1`, `en2`) on the one global clock, which keeps the design synchronous
and synthesizable.

| phase      | work                                                                                      |
|------------|-------------------------------------------------------------------------------------------|
| 1 (`en1`)  | encoder takes a bit; survivor memory update (after even steps); output unit offers a bit  |
| 2 (`en2`)  | branch metrics and ACS step on the received symbol                                        |

In global cycles, one block runs like this:

* Bit *k* is encoded on phase 1 of local period *k*.
* Its symbol is decoded on phase 2 of the same period.
* The update after step 12 happens on phase 1 of period 13.
* On the next cycle, `block_done` is high and the result is loaded into
  `pout`. The metric memory and the survivor slots restart in that same cycle.
  A symbol of the next block may arrive then too.
* `pout` therefore holds the block 13 local periods (26 global cycles) after
  its first bit went in.
* The bits then go out one per local period. The first reaches `sout` three
  global cycles after `pout` changes.

Blocks can follow each other back to back: 12 serial bits take 12 local
periods.

## LEDR link

`ledr_tx` drives two rails. V carries the bit, and R is chosen so that
V xor R gives the token's phase:

| phase | data 0 (V,R) | data 1 (V,R) |
|-------|--------------|--------------|
| 0     | (0,0)        | (1,1)        |
| 1     | (0,1)        | (1,0)        |

Phases alternate from token to token, so each new token changes exactly one
rail.

* `ledr_rx` sees a new token when V xor R differs from the phase it last
  acknowledged. It takes V as the bit and sets `ack` to the new phase.
* The sender waits until `ack` equals its own phase.
* After reset the rails are (0,0), so the first token uses phase 1.
* `hold` on the receiver (`sink_hold` on the top) makes it refuse tokens.
  The decoder's output unit then stalls. If the hold lasts longer than a
  block, the next block overwrites unsent bits and `overflow` pulses.

## Top level: `async_viterbi_top`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | global clock (5 MHz intended), asynchronous active-low reset |
| `inp`, `in_valid` | in | data bit, taken on local phase 1 when `in_valid` |
| `ctrl[1:0]` | in | channel error mask, XORed onto the symbol `{Out1, Out0}` while the decoder reads it (the phase-2 cycle after the bit was taken) |
| `sink_hold` | in | receiver busy |
| `s_async1`, `s_async2` | out | local phases |
| `enc`, `rx` | out | sent and received symbols |
| `pm[4]`, `count` | out | path metrics m0..m3 and trellis step count |
| `pout[11:0]`, `pout_valid`, `block_done` | out | decoded block (first bit in MSB) |
| `ledr_v`, `ledr_r`, `ledr_ack` | out | LEDR link wires |
| `sout`, `sout_valid` | out | serial decoded data at the receiver |
| `sm_update`, `drop_thresh`, `drop_cap`, `stall`, `overflow` | out | event flags: survivor update, path dropped above threshold, path within threshold dropped for lack of a register, serial stall, output overflow |

Parameters on the top and on the decoder:

* `BLOCK_LEN` = 12. It must be even, and at least 4.
* `W` = 4, the metric width.
* `THR` = 2, the threshold.

The package `vit_pkg` holds these defaults, the symbol and state types, and
the trellis functions.

## Choices made here, and what is not included

These are this implementation's own choices:

* Block framing with a restart from S0.
* Local phases used as clock enables.
* Saturating 4-bit metrics and the tie rules.
* Always keeping the best path.
* Serial order: first decoded bit first.
* The ready/stall/overflow behaviour of the output.
* The level-type LEDR acknowledge, and the receiver sampled on the clock.
* The `in_valid` and `sink_hold` inputs.

Not included:

* The four-phase dual-rail (spacer) encoding, which LEDR replaces.
* Plain and hybrid register exchange with four registers, which are
  baselines.
* Any power measurement. The low-power claim is about switching activity
  and cannot be checked by simulating the RTL.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_vit_ref_pkg` holds the reference models. The encoder model is a
  transition table. The decoder model keeps each path's full input history,
  so it needs no traceback.
* `tb_async_viterbi_top` runs the whole system at its default parameters. It
  sends the example block clean, with one error, with two separate errors and
  with two consecutive errors, then 40 random blocks with random errors.
* It compares every `pout` and every `sout` bit with the models and checks
  the 26-cycle latency.
* It checks that every LEDR token changes one rail, then forces a stall and
  an overflow. It counts each of these events and fails if one never happens.
* `tb_error_scenarios` replays the published error experiments at 5 MHz. It
  sends the example block from reset and switches `ctrl` at fixed times:
  * 01 from 2100 to 2500 ns;
  * 01 from 1700 to 2100 ns;
  * 01 from 2100 to 2400 ns.

  Each of these windows hits one symbol with one flipped bit, and every block
  comes back intact. It also tries two heavier versions: both bits of the
  symbol at 1700 ns, and 01 then 10 on the two symbols from 2100 ns. With two
  survivor registers neither is corrected. The test checks those runs only
  against the reference decoder and prints the outcome.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vit_pkg.sv tb/tb_vit_ref_pkg.sv tb/tb_async_viterbi_top.sv \
    --top-module tb_async_viterbi_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another. For the unit testbenches, add
the block's file from `rtl/` if `-y rtl` does not find it. Each test runs in
well under a second.
