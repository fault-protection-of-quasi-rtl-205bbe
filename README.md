# DIRC-protected QDI pipeline link

Quasi-delay-insensitive (QDI) links carry data as 1-of-n words. Each word is a
bundle of n rails, and exactly one high rail is the value. An all-low bundle is
the "null" spacer between values in a 4-phase handshake. Such links need no
clock and tolerate any gate delay, but a single transient glitch is dangerous.
One rail that rises when it should not is taken as a valid value, and the
handshake then goes on with the wrong data.

This RTL protects such a link with a **delay-insensitive redundant check
(DIRC)** code. The N data words of a link are split into G groups of CN words.
Each group gets one extra 1-of-n **check word**, the sum of its data words
modulo n. Every pipeline stage of the link then recomputes each word of a
group from the other words. It keeps a rail only when the received copy and
the recomputed copy agree. A fault confined to one word of a group is
filtered out at the next stage, however many rails of that word it touches.

The default configuration has 1-of-4 words, CN = 2, G = 64 groups (N = 128
data channels) and 4 stages. The 1-of-2 (dual-rail) variant is the same RTL
with `RAILS = 2`.

## The code

Value v of a 1-of-n word is carried by rail v, so for 1-of-4, `0001` = 0,
`0010` = 1, `0100` = 2 and `1000` = 3. For one group:

```
code word = (A_0, A_1, ..., A_CN-1, C)      C = (A_0 + A_1 + ... + A_CN-1) mod n
```

For 1-of-2 with CN = 2, C is the XOR of the two bits. For 1-of-4,
`A_0 = 0010` (1) and `A_1 = 1000` (3) give `C = 0001` (0). The code is
systematic: data words travel unchanged, and a receiver that ignores C sees
the plain data.

The code rate is `(log2 n * CN) / (n * (CN + 1))`. With CN = 2 it is 1/3 for
both 1-of-2 and 1-of-4.

## How a stage corrects (`dirc_group`)

For CN = 2, each group of a stage contains three 1-of-n adders, three error
filters and three completion detectors:

```
C'   = A_0 + A_1          (check recomputed from the data)
A_0' = C - A_1            (data word 0 recomputed from the check and word 1)
A_1' = C - A_0
X''  = C(X, X', en)       per rail, for X in {A_0, A_1, C}   (error filter)
d_X  = OR of the rails of X''                                (completion)
```

* **1-of-n adder** (`onehot_adder`). One 2-input C-element per rail pair
  (a_i, b_j) drives output rail (i + j) mod n through an OR. That is 4
  C-elements for n = 2 and 16 for n = 4. Because the gates are C-elements, the
  sum keeps its value until both operands are null, so the adder keeps the
  4-phase protocol.
* **Subtraction** uses the same adder. Negating a 1-of-n value modulo n only
  renames rails (value v moves to rail (n - v) mod n), so `C - A_1` is an adder
  fed with the rails of A_1 reordered. For 1-of-2 the reordering is the
  identity. For CN > 2, each recomputed word uses a chain of CN - 1 adders.
* **Error filter** (`error_filter`). For each rail, a 3-input C-element takes
  the received rail, the recomputed rail and the enable `en`. `en` is the
  acknowledge of the next stage. A spurious rail on the received copy has no
  partner on the recomputed copy, and the reverse also holds, so it never
  reaches the output. A dropped rail only delays the output. The filter is
  also the stage's storage. It takes a word only while `en` is high and
  returns to null only while `en` is low. This makes the stage a
  weak-condition half buffer.
* **Why one faulty word is harmless.** Each recomputed copy depends on every
  word of the group except its own. A fault on word X corrupts X itself and
  the copies of the other words. Word X's filter still sees a clean
  recomputed copy. Every other word's filter still sees a clean received
  copy. No filter gets the same wrong rail on both inputs.

## Handshake and acknowledge (`ack_generator`, `dirc_stage`)

`iack` is high when a stage is empty and ready, and low when it holds a word.
A stage's filters use the `iack` of the next stage as their enable. The last
stage uses `oack` from the receiver, with the same polarity. The sequence is
the usual return-to-zero handshake:

1. The sender presents a code word while `iack` is high.
2. The stage's filters fill, and `iack` falls.
3. The sender returns its wires to null.
4. The filters empty once the next stage has lowered its ack, and `iack`
   rises again.

The ACK generator takes the completion bits of each group in neighbouring
pairs through 2-input C-elements: `ack_k = C(d_k, d_k+1)`, closed into a ring.
For one group of three words these are ack0, ack1 and ack2. A single
glitching completion bit cannot move any of them on its own.

All pair outputs then go into one **inverting C-element** that gives `iack`.
This departs from the reference design, which combines the pairs with a NAND.
A NAND raises `iack` as soon as *one* pair of words is null, while a third
word may still hold the old value. A fault that slows one word's return to
null then lets the next token reach a filter that is still full. In
simulation this produced a word carrying two values, and also a deadlock.
The inverting C-element falls exactly like the NAND (all pairs complete), but
rises only when all pairs are null. Without faults both give the same
handshake.

## Top level (`dirc_link`)

```
 a ──► dirc_sender ──(A, C)──► stage 0 ──► stage 1 ──► stage 2 ──► stage 3 ──► o_a, o_c
        (C = ΣA)        ▲ ⊕fault   ▲ ⊕fault   ▲ ⊕fault   ▲ ⊕fault
 iack ◄──────────────── iack0 ◄── iack1 ◄──── iack2 ◄──── iack3 ◄────────────── oack
```

* `dirc_sender` is the check generator. Data words pass through unchanged,
  and each group's check word is formed by 1-of-n adders. It has no handshake
  logic of its own; the source uses stage 0's `iack`.
* `dirc_pipeline` chains `STAGES` `dirc_stage` instances. `fault_a` and
  `fault_c` are XOR masks on the wires into each stage. They exist to inject
  transient faults in tests and must be tied to zero in use.
* The last stage acts as the receiver's error corrector. It delivers
  corrected data words and a regenerated check word.

Ports of `dirc_link` (all packed arrays; `[group][word][rail]`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | C-element sampling clock; asynchronous active-low reset to null |
| `a` | in | G·CN·n | data words from the source |
| `iack` | out | 1 | high: link ready for the next word; low: word taken, return `a` to null |
| `o_a`, `o_c` | out | G·CN·n, G·n | corrected data and check words |
| `oack` | in | 1 | receiver ready (high); lower it after taking a complete word, raise it once `o_a`/`o_c` are null |
| `fault_a`, `fault_c` | in | STAGES·G·CN·n, STAGES·G·n | fault injection, 0 in use |

Parameters (`dirc_pkg` holds the defaults): `RAILS` = 4, `CN` = 2,
`GROUPS` = 64 and `STAGES` = 4.

## The clock: how the asynchronous gates are realised

Every C-element (`c_element`) is a state holder that samples its inputs on
`clk`. It sets when all inputs are high, clears when all are low, and holds
otherwise. This lets the link be simulated with a cycle-based simulator and
mapped to ordinary flip-flops, with no combinational loops. Each C-element
level costs one clock. The circuit is QDI, so its function does not depend on
those delays; only the latencies below are specific to this realisation.

A native asynchronous implementation would replace `c_element` with a real
C-element cell and drop `clk`. Only `c_element` uses the clock; the other
modules just pass it down.

Latencies with the receiver ready and no faults:

* **Stage:** 2 clocks from a complete code word at its input to its output
  (adder level, then filter).
* **`iack`:** falls 2 clocks after the stage's last word is complete, and
  rises 2 clocks after its last word is null.
* **Link:** 1 + 2·STAGES clocks from `a` to `o_a` (9 clocks at the default).
  The sender's check word comes 1 clock after the data.

## Fault model and limits

* **Corrected:** any transient change on one word of a group on the link into
  a stage. Rails can rise, drop, or both, on one rail or several, on a data
  word or on the check word, at any phase of the handshake. At most one word
  per group may be faulty during one handshake.
* **Not corrected:** two faulty words of the same group within one handshake.
  Besides two simultaneous faults, this includes a second fault on another
  word before the group has returned to null. The adder C-elements keep the
  effect of the first fault until then. One check word cannot resolve two
  faulty words. The stage's assertions (every output word one-hot or null)
  flag the resulting two-valued word in simulation.
* Faults on the acknowledge wires are not modelled. The reset state is all
  null with `iack` high.

## Where this RTL departs from, or fills in, the reference design

* The final gate of the ACK generator is an inverting C-element instead of a
  NAND (see above).
* The C-elements are clocked state holders (see above).
* The reference design does not say which inputs each adder takes. The choice
  here follows from C = A_0 + A_1: the data copies are `C - other word`, and
  subtraction is done by renaming rails.
* The enable of the error filters is the next stage's acknowledge. The
  reference filter has an acknowledge as its third input. That it is the
  *next* stage's acknowledge follows from how the reference pipeline routes
  the acknowledges.
* The pairing of completion bits in the ACK generator is taken as a ring.
* The reference design feeds the check word's completion detector from the
  unfiltered recomputed check copy in one description and from the filtered
  check word in another. Here it uses the filtered check word, like the data
  words.
* `CN > 2` and any number of groups and stages are supported by generalising
  the drawn CN = 2 structure.
* Not built: the asynchronous NoC routers that the link is meant to connect
  (not described), and the unprotected baseline pipeline used only for
  comparison. The FPGA area, delay and power figures of the reference are
  properties of its implementation and are not reproduced here.

## Files

| file | content |
|---|---|
| `rtl/dirc_pkg.sv` | default sizes |
| `rtl/c_element.sv` | Muller C-element (clocked state holder) |
| `rtl/onehot_adder.sv` | 1-of-n modulo-n adder |
| `rtl/error_filter.sv` | C-element error filter |
| `rtl/completion_detector.sv` | OR completion detector |
| `rtl/ack_generator.sv` | pairwise C-elements and combining C-element |
| `rtl/dirc_group.sv` | error corrector of one group |
| `rtl/dirc_stage.sv` | one pipeline stage (G groups + ACK generator) |
| `rtl/dirc_sender.sv` | check generator |
| `rtl/dirc_pipeline.sv` | chain of stages with fault-injection points |
| `rtl/dirc_link.sv` | top: sender + pipeline |

Each `tb/tb_<module>.sv` is a self-checking testbench that ends with a line
`TB_RESULT checks=N failures=M`:

* **`tb_dirc_link` (default size, 1-of-4).** Runs 1500 random tokens through
  a 4-phase source and a sink with random stalls. The injector applies over
  15,000 faults of every kind on the links into all stages. The test checks
  every data and check word, the 9-clock latency and the reset state, and
  requires each fault kind, sink stalls and source waits to occur.
* **`tb_dirc_link_rail2`.** The same test with 1-of-2 words.
* **`tb_dirc_pipeline` and `tb_dirc_stage`.** The same kind of test one level
  down, with 4-phase handshakes and faults at the inputs.
* **`tb_dirc_group`, `tb_onehot_adder`, `tb_error_filter`,
  `tb_completion_detector`, `tb_ack_generator`, `tb_dirc_sender` and
  `tb_c_element`.** Exhaustive tests, or random tests checked against
  reference models.

To simulate with Verilator 5, compile the package first and let Verilator find
the other modules through `-I`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dirc_pkg.sv tb/tb_dirc_link.sv --top-module tb_dirc_link
./obj_dir/Vtb_dirc_link
```

The full-size link test runs in about a second.
