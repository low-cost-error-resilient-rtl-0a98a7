# Single-event-upset resilient control circuits

A single event upset (SEU) flips one stored bit. In a datapath the wrong value
is eventually flushed out. In a control path (a state machine, a counter, an
index generator) the register feeds itself, so a flipped bit stays in the loop
and the controller runs wrong states or counts from then on. This RTL hardens
three kinds of control register against any single flipped bit. It uses only
ordinary flip-flops and gates: no special latches, and no triplication with
majority voting.

| Circuit | Protection | What a single upset does |
|---|---|---|
| `fsm_h2` | state codes at Hamming distance 2 (binary + parity, 4 FFs for 8 states) | detected at once; machine goes to idle S0, never to a wrong state |
| `fsm_h3` | state codes at Hamming distance 3 (6 FFs for 8 states) | absorbed; the sequence completes as if nothing happened |
| `dmr_ring_counter` | two one-hot rings, parity check, copy from clone | corrected on the next edge, no lost count |
| `dmr_gray_counter` | two Gray counters, each with a parity tracker, copy from clone | corrected on the next edge, no lost count |
| `dmr_index_counter` | ring counter (2 LSBs) + Gray counter (6 MSBs) | 8-bit index never skips or repeats |
| `serializer` | 256:1 multiplexer driven by `dmr_index_counter` | serial stream stays bit-exact |

`seu_resilient_top` puts the two state machines and the serializer side by
side. They share only `clk` and `rst_n`. All reset is asynchronous and active
low.

## State machines: distance between codes

Both machines run the same example sequence. S0 is idle. `start` moves to S1.
Each `step` moves S1..S6 on by one, and S7 back to S0. `done` is high in S7
and `busy` is high outside S0. The sequence is only a vehicle for the state
coding: change `seu_pkg::fsm_next` to get your own control function. The
protection does not depend on it.

**H-2** (`fsm_h2`). The code is the 3-bit state number followed by an
even-parity bit (S5 = `101`+`0` = `1010`). One flip always produces odd
parity, and no state uses an odd-parity code. Such a value reads as S0 on the
outputs and raises `seu_detected`. The next edge loads S0. The machine never
shows a wrong state, but it abandons the sequence it was running. This costs
one flip-flop more than binary coding.

**H-3** (`fsm_h3`). The codes are

    S0 000000  S1 000111  S2 011001  S3 011110
    S4 101010  S5 101101  S6 110011  S7 110100

Every pair of codes differs in at least 3 bits. So the six values one flip
away from a code are closer to that code than to any other. Each state owns 7
of the 64 values. The decoder (`seu_pkg::h3_decode`) maps all 7 to the same
state. The next-state logic works from the decoded state and writes back a
clean code. After an upset the outputs do not change, the register is clean
again one clock later, and `seu_corrected` marks that cycle. The remaining 8
values need two or more flips. They raise `seu_illegal` and send the machine
to S0. That is this design's choice, because the scheme itself only covers
single upsets.

H-2 is the cheap choice (detect and abandon). H-3 is the one to use when the
sequence must complete.

## Index counter: DMR with correction instead of reset

The target is a fast 8-bit index, such as the bit select of a 256:1 serializer
at a few GHz. A binary adder's carry chain limits that rate. The counter is
split into a fast low part and a slow high part. Each part is duplicated (dual
modular redundancy, DMR). Two copies alone cannot vote. Instead, each copy
carries a property that tells whether that copy is the broken one. The broken
copy is reloaded from the good one on the same clock edge. No reset, no lost
cycle.

**Ring section** (`dmr_ring_counter`, N = 4 flip-flops for 2 bits). A one-hot
ring rotates every clock, with a delay that does not grow with its length. A
legal ring holds exactly one `1`, so it has odd parity. One flip leaves zero
or two `1`s, which is even parity. An XOR tree over each ring is therefore a
complete single-upset check. Each ring register is fed through a 2:1
multiplexer: its own rotated value when its check passes, its clone's rotated
value when it fails. The output is taken from the ring that passes. The loop
gains one XOR tree and one multiplexer.

**Gray section** (`dmr_gray_counter`, W = 6). A Gray code changes one bit per
increment, so its parity alternates 0, 1, 0, 1... Each counter (GC1, GC2) has
a tracker flip-flop (P1, P2) that toggles on every increment. The tracker
always holds the parity the counter should have. If a counter bit flips, or
the tracker flips, the two disagree. That counter and its tracker are then
reloaded from the other pair, and incremented in the same step if `en` is
high.

**Composition** (`dmr_index_counter`). The Gray counter is enabled while the
ring is at its last position. It therefore advances once per ring revolution,
at a quarter of the clock rate, and only one of its bits changes each time.
The Gray counter uses the same clock as the ring, with an enable rather than
a divided clock. Its inputs stay stable for four clocks between increments, so
its incrementer may be timed as a four-cycle path. Its check-and-reload
multiplexer still works within one clock.
The output `index = {gray2bin(gray), ring position}` counts 0..255 and steps
by one every clock. `err` gives the per-copy error flags
`{gc2, gc1, ring b, ring a}`.

Limits. Two upsets in both copies of one section in the same cycle are
outside what DMR can fix; each copy then keeps its own value. Only the
counters are protected. The serializer's word register and output flip-flop
are datapath, and an upset there corrupts only the current frame.

## Serializer

`serializer` takes `pdata` (256 bits) on the edge where the index wraps from
255 to 0. `load` is high in the cycle before that edge. It then outputs the
word least significant bit first on `sout`, one bit per clock. `sout` is
registered: bit k appears in the cycle after `index == k`. The first word is
taken 256 clocks after reset. The word register, the bit order and the load
timing are this design's own choices.

## Fault-injection ports

Every protected register has a `seu_flip*` input of the register's width.
A set bit inverts that register bit as it is loaded. The effect equals an
upset just after the clock edge. The testbenches use these inputs to inject
faults. In silicon, tie them to zero and synthesis removes the XORs.

## Files

- `rtl/seu_pkg.sv` holds the `state_e` type, the H-2/H-3 encode and decode
  functions, the sequencing function, and Gray/parity/one-hot helpers.
- `rtl/fsm_h2.sv`, `rtl/fsm_h3.sv` are the two state machines.
- `rtl/dmr_ring_counter.sv`, `rtl/dmr_gray_counter.sv` and
  `rtl/dmr_index_counter.sv` make up the index counter.
- `rtl/serializer.sv` is the serializer.
- `rtl/seu_resilient_top.sv` is the top level.
- `tb/tb_<module>.sv` is one self-checking testbench per module. Besides
  those, `tb/tb_seu_pkg.sv` tests the package and
  `tb/tb_fsm_fault_campaign.sv` compares the two state codings.

Parameters and their defaults: `dmr_ring_counter.N = 4`, `dmr_gray_counter.W
= 6`, `dmr_index_counter.RING_N = 4, GC_W = 6` (8-bit index),
`serializer.DATA_W = 256`. `DATA_W` must equal `RING_N * 2**GC_W`. The
serializer derives `GC_W` from `DATA_W` and `RING_N`.

## Verification

Each testbench compares the block with a reference model written
independently in the testbench. Each ends with a `TB_RESULT checks=N
failures=M` line and has a watchdog.

- `tb_fsm_h3` injects every single-bit upset in every state, then about 5000
  random upsets under random traffic. The decoded state must equal the
  fault-free run in every cycle.
- `tb_fsm_h2` runs the same campaign. Every upset must be flagged in the next
  cycle and lead to S0, and no state other than the expected one or S0 may
  ever appear.
- `tb_fsm_fault_campaign` runs the full sequence on both machines once per
  fault: every single-bit and every two-bit fault, at every step. It sorts
  the runs into completed, abandoned (went to S0 early) and false positive (a
  wrong legal state appeared):

      faults | H-2 runs completed abandoned false+ | H-3 runs completed abandoned false+
      1-bit  |     32        4        28        0  |     48       48         0        0
      2-bit  |     48        0         6       42  |    120        3        33       84

  Under single faults H-3 always completes and H-2 never shows a wrong state.
  The 4 "completed" H-2 runs are faults on the edge back to idle, where S0 is
  entered anyway. Two-bit faults defeat both codings, as expected for codes of
  distance 2 and 3. That row is reported, not checked.
- `tb_dmr_ring_counter` and `tb_dmr_gray_counter` inject exhaustive and random
  upsets into each copy, including the parity trackers. They check that the
  output never deviates and that both copies agree again one clock later.
- `tb_dmr_index_counter` runs 60,000 cycles with upsets in all six register
  groups. It checks a +1 step every clock and that the Gray section runs at
  exactly a quarter rate with one bit change per step.
- `tb_serializer` reassembles 40 random frames from `sout` with its own bit
  counter while the index counter is upset. It checks each frame and the
  256-clock load period.
- `tb_seu_resilient_top` runs the whole design at its default size with all
  three paths under upsets together. It counts each mechanism (H-2 detection
  and abandoned sequences, H-3 correction, completed sequences, corrections in
  ring a, ring b, GC1 and GC2, loads and index wraps) and fails if any never
  occurs.

Each module testbench was also run against a copy of its module with one
deliberate defect, such as no reload from the clone or adjacent H-3 codes
rejected, and reported failures.

To run one with Verilator:

    verilator --binary --timing -Irtl -y rtl rtl/seu_pkg.sv tb/tb_seu_resilient_top.sv \
        --top-module tb_seu_resilient_top -o sim && ./obj_dir/sim

All modules lint cleanly except for unused-signal warnings: `fsm_h2` does not
use the `exact` field of its decode result, and `serializer` does not use the
index counter's `gray`/`ring` outputs.

## What is not here, and where this departs from the scheme it implements

- Binary and one-hot state machines, TMR voting and lockstep are only
  comparison points for these circuits and are not built. The same holds for
  an asynchronous chain of 2-bit DMR ring counters, an alternative to the
  synchronous ring + Gray split.
- The state sequence, the reset values, the `seu_*` status flags, the binary
  form of `index` and everything about the serializer beyond "256:1
  multiplexer indexed by the 8-bit counter" are this design's own choices.
- Area, power and the 3 GHz clock target are properties of a silicon
  implementation and are not shown by this RTL. Simulation checks behaviour
  only.
