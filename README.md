# Watermarked multi-mode counter

A finite state machine can carry a proof of authorship in its state graph. A
few extra states are added to the graph. Only one secret sequence of inputs,
the *signature*, can walk through all of them. For every other purpose the
machine behaves exactly as before. The owner of the design can reset a
suspect part, apply the signature and watch it pass through states that no
honest re-implementation of the same function would have. Removing those
states changes the machine's behaviour, so an attacker cannot simply strip
them out.

This RTL applies that idea (a "property implant" watermark) to a small
synchronous counter. The counter counts in binary, Gray code or BCD, up or
down. The default build hides an 18-bit signature in six extra states. Builds
with a 6-, 9-, 12- or 15-bit signature come from one parameter.

## The counter being protected

Every clock, the counter takes a 3-bit control word `{counter_type[1:0], direction}`:

| counter_type | mode | up sequence (direction = 1) |
|---|---|---|
| 00 | binary | 0, 1, 2, ..., F, 0 |
| 01 | Gray code | 0, 1, 3, 2, 6, 7, 5, 4, C, D, F, E, A, B, 9, 8, 0 |
| 10 | BCD | 0, 1, ..., 9, 0 (codes A..F go to 0 in either direction) |
| 11 | none | every state goes to 0 |

`direction = 0` walks the same sequence backwards. The unwatermarked machine
has 16 states, S0..S15, and the state code *is* the count. The counter also
has a synchronous `reset` to S0 and a count `enable`.

The machine also has a one-bit output. It is 1 for a *terminal-count*
transition: going up into the last code of the sequence (binary F, Gray 8,
BCD 9), or going down from S1 into S0. A wrap-around step (F to 0 up, 0 to F
down) gives 0, and so does any step of mode 11. `counter_next_state`
computes this function from the count arithmetic. Its testbench holds the
complete 16 x 8 state table and checks every entry against it.

## How the signature is hidden

The signature is a sequence of control words y1..yn. The 18-bit signature is

    y1..y6 = 001, 011, 101, 010, 000, 100
             bin up, Gray up, BCD up, Gray down, bin down, BCD down

It is a mix of modes and directions that normal use of a counter hardly ever
produces. The shorter signatures are its first 2..5 words.

Let s'_i be the state the *original* counter reaches from S0 after y1..yi.
For the 18-bit signature these are S1, S3, S4, S5, S4 and S3. The
watermarked graph is the original graph plus n new states r1..rn, built in
three steps:

1. **r_i is a copy of s'_i.** It stands for the same count, and every one of
   its 8 outgoing edges has the same target and output as the matching edge
   of s'_i.
2. **The signature edges are redirected.** The edge S0 --y1--> s'_1 now goes
   to r1. The copied edge r_i --y(i+1)--> s'_(i+1) now goes to r(i+1).
3. **Every other edge of a watermark state leads back into the original
   graph**, to exactly where the original state would have gone.

So each r_i has exactly one incoming edge, from r(i-1) (or from S0 for r1),
under signature word y_i. A walk through r1..rn therefore exists only when
y1..yn is applied from S0. The s'_i need not be different: here r3 and r5
both stand for count 4. Only n states are added. The older approach to this
kind of watermark duplicates the whole 16-state graph first and would need
38 states for this signature; this graph has 22.

`wm_next_state` implements the graph. It does not store the s'_i as
constants typed in by hand. It runs the signature through a chain of
`counter_next_state` copies with constant inputs, which synthesis folds
away. A different signature therefore needs a change to `wm_key()` in
`mm_counter_pkg` and nothing else.

### State encoding

| state | code |
|---|---|
| S0..S15 | 00h..0Fh (the count) |
| r1..r6 | 10h..15h |

The state register is 5 bits wide. Codes above rn cannot be reached. If one
were ever loaded, it would behave like S0 but without the signature edge.

## What changes and what does not

**The count never changes.** For any input sequence, the count that the
watermarked counter stands for equals the unwatermarked counter's count, clock
by clock. The output is also the same, with one exception (see below).
The `count` port shows this value.

**The raw state does change.** The most visible case comes from step 2. The
edge S0 --001--> is the ordinary "binary count up from zero", and it always
lands in r1 (code 10h) instead of S1. Counting binary up from reset therefore
shows the state codes 00, 10, 02, 03, ... on `counter_state`. r1 behaves
exactly like S1, so the count is 0, 1, 2, 3 as expected. Anyone who reads the
raw state register sees the watermark states in use. This is what makes them
hard to remove: deleting r1 breaks ordinary counting.

**The end of the signature is signalled.** Leaving rn always gives output 1,
whatever the control word. `counter_output` is therefore high for the one
cycle after the clock edge that follows rn. This is the only point where the
watermarked counter's output differs from the original's. It tells the owner
that the whole signature was recognised.

## Reading the watermark

Hold `enable` high, pulse `reset`, then apply one control word per clock:

| clock edge | control word applied before it | counter_state after it | count | counter_output |
|---|---|---|---|---|
| reset | - | 00 | 0 | 0 |
| 1 | 001 | 10 (r1) | 1 | 0 |
| 2 | 011 | 11 (r2) | 3 | 0 |
| 3 | 101 | 12 (r3) | 4 | 0 |
| 4 | 010 | 13 (r4) | 5 | 0 |
| 5 | 000 | 14 (r5) | 4 | 0 |
| 6 | 100 | 15 (r6) | 3 | 0 |
| 7 | any, e.g. 100 | 02 | 2 | **1** |

If any word is wrong, the state leaves the watermark states at that edge.
Reaching rn again takes the whole signature, applied from S0.

## Signature length

`KEY_STEPS` (1..6, default 6) sets the number of signature words and so the
number of watermark states. The 6-, 9-, 12-, 15- and 18-bit signatures are
`KEY_STEPS` = 2, 3, 4, 5 and 6. A longer signature is harder to hit by
accident. Of all 4096 sequences of four control words applied after reset,
110 reach the last watermark state of the 6-bit build, 10 that of the 9-bit
build and 1 that of the 12-bit build. The 6- and 9-bit counts include
sequences that return to S0 and then apply the signature. The 12-bit build is
a good compromise between signature strength and extra logic. The default is
the full 18 bits.

## Modules

| file | contents |
|---|---|
| `rtl/mm_counter_pkg.sv` | control-word struct and mode enum, state widths, signature words `wm_key()` |
| `rtl/counter_next_state.sv` | combinational next state and output of the original 16-state counter |
| `rtl/wm_next_state.sv` | combinational watermarked graph: state to count value, watermark edges, end signal |
| `rtl/wm_counter.sv` | top: state and output registers, reset, enable |

Ports of the top `wm_counter`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `reset` | in | 1 | synchronous reset to S0, active high; wins over `enable` |
| `enable` | in | 1 | count enable; when low, the state and `counter_output` hold |
| `direction` | in | 1 | 1 up, 0 down |
| `counter_type` | in | 2 | 00 binary, 01 Gray, 10 BCD, 11 back to S0 |
| `counter_state` | out | 5 | raw state code |
| `count` | out | 4 | count value of the state |
| `counter_output` | out | 1 | registered transition output |
| `wm_state` | out | 1 | the present state is one of r1..rn |

There is one transition per enabled clock edge. `count` and `wm_state` are
decoded combinationally from the state register. `counter_output` is a
register that loads the output of the transition just taken. It is therefore
high during the cycle that *follows* a terminal-count transition or the
departure from rn. An assertion in `wm_counter` checks that rn is always left
on the next enabled edge.

## Design choices not fixed by the method

- The output is registered, and it holds while `enable` is low. The method
  gives outputs per transition (a Mealy table) but says nothing about when
  they reach the pin. A register matches "the output is 1 on the clock edge
  after rn is reached".
- `reset` has priority over `enable`.
- The outputs `count` and `wm_state` are extras. `count` makes the hidden
  states readable as counts. `wm_state` is meant for tests and for the owner.
  Leave both unconnected for a part that should not advertise its watermark;
  `counter_state` alone then shows what the method describes.
- Six watermark states for the 18-bit signature, one per word, with codes
  10h..15h.
- Codes above rn behave like S0, as described under "State encoding".

## Testbenches

All testbenches check themselves. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb/tb_counter_next_state.sv` | all 128 entries of the counter's state table, written out in full |
| `tb/tb_wm_next_state.sv` | builds 1..6: all 32 codes x 8 words against a reference model; exactly one incoming edge per r_i; count preserved on every edge |
| `tb/tb_wm_counter.sv` | default build end to end: the detection walk above with its 1-cycle output latency, all six counting modes from reset, an interrupted signature, enable low, mode 11, then 20000 random clocks. Each clock is checked against the reference graph and against the unwatermarked counter. It counts how often each mechanism happened and fails if one never did |
| `tb/tb_wm_key_sizes.sv` | the 6..18-bit builds side by side: detection for each size; all 4096 four-word sequences, each of which must reach rn exactly when it contains the signature starting from count 0; random traffic |

`tb/wm_ref_pkg.sv` holds the reference models. They are written independently
of the RTL: the Gray sequence is an explicit list, and the watermark graph is
built by walking the signature.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/mm_counter_pkg.sv tb/wm_ref_pkg.sv tb/tb_wm_counter.sv \
        --top-module tb_wm_counter
    ./obj_dir/Vtb_wm_counter

Replace `tb_wm_counter` with the name of another testbench to run that one.
All of them finish in well under a second.
