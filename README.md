# Inversion coding for low-power network-on-chip links

On-chip network links are long parallel wires. In deep-submicron processes the capacitance
*between* neighbouring wires dominates the capacitance of each wire to ground. So the energy a
link spends on a flit depends mostly on how adjacent lines switch *relative to each other*, not
on how many lines switch. This RTL encodes each body flit at the sending network interface and
decodes it at the receiving one. The flit is sent either as it is or with a chosen set of its
lines inverted, whichever makes the link's coupling activity lowest against the flit the link
carried last. A few tag lines record the choice so that the receiver can undo it. The coding is
end to end: routers and link wires in between are not changed.

Three encoders are provided. Each offers a larger set of inversions than the one before:

| scheme | choices                        | link lines (default) | decision block |
|--------|--------------------------------|----------------------|----------------|
| I      | none, odd                      | 32 = 31 payload + 1 tag  | `majority_voter` |
| II     | none, odd, full                | 33 = 31 payload + 2 tags | `module_a`       |
| III    | none, odd, even, full          | 33 = 31 payload + 2 tags | `module_c`       |

"Odd inversion" inverts every odd-indexed line, "even inversion" every even-indexed line, and
"full inversion" every line.

## Transition types and what an inversion does to them

Look at two adjacent lines between the previous flit (t-1) and the current one (t):

| type | what happens                                  | coupling cost |
|------|-----------------------------------------------|---------------|
| I    | exactly one of the two lines switches         | 1 |
| II   | both switch, in opposite directions (01↔10)   | 2 |
| III  | both switch, in the same direction (00↔11)    | 0 |
| IV   | neither switches                              | 0 |

The link cost of a flit is the sum over all adjacent pairs. The decision rules are built on two
facts about inversion.

**Odd or even inversion flips exactly one line of every pair.** This moves every pair's cost by
exactly ±1:

* Type I where the inverted line was the one switching → Type IV (−1)
* Type I where the other line switches, lines equal before → Type III (−1)
* Type I where the other line switches, lines unequal before → Type II (+1)
* Type II → Type I (−1); Type III → Type I (+1); Type IV → Type I (+1)

Let `Ty` (odd) or `Te` (even) be the number of pairs that gain. With `NP` pairs, the cost changes
by `NP − 2·Ty`. Odd inversion therefore pays off exactly when more than half of the pairs gain.
Scheme I makes this majority vote.

**Full inversion flips both lines of every pair.** Type I stays Type I. Type II and Type III
become Type IV. Type IV becomes Type III if the two lines hold equal values (00/11). It becomes
Type II if they hold different values (01/10). Those stable-and-different pairs are called
`T4**`. Full inversion changes the cost by `2·(T4** − T2)`.

Each detector module (`ty_detect`, `te_detect`, `t2_detect`, `t4ss_detect`) is a few gates that
classify one pair. One instance of each sits on every adjacent pair of link lines, the tag lines
included.

## Decision rules

Write `G = 2(T2 − T4**)`, the saving of full inversion, and `NP` for the number of pairs
compared (31 in scheme I, 32 in schemes II and III at the default width).

* **Scheme I**: odd if `2·Ty > NP`; otherwise none. With an odd `NP` there is never a tie.
* **Scheme II**:
  * odd if `G < 2Ty − NP` and `2Ty > NP`
  * full if `G > 2Ty − NP` and `T2 > T4**`
  * otherwise none
* **Scheme III**:
  * full if `G > 2Ty − NP`, `T2 > T4**` and `G > 2Te − NP`
  * odd if `G < 2Ty − NP`, `2Ty > NP` and `Te < Ty`
  * even if `G < 2Te − NP`, `2Te > NP` and `Te ≥ Ty`
  * otherwise none

All inequalities are strict as written. Where two candidates would give exactly the same cost,
the rules can leave a flit uninverted even though an inversion would have saved as much. For
example, in scheme II, `G == 2Ty − NP` with `2Ty > NP` gives neither odd nor full. A flit is
never sent with a higher coupling cost than it would have uninverted, and the testbenches check
this for every flit. In scheme III, a tie between odd and even goes to even.

The rules consider only coupling activity. Self switching (lines toggling against ground) is not
part of the decision, but it falls as well in practice (see the numbers below).

## Tag lines and decoding

The tag lines sit above the payload. They are 0 in the candidate flit, so the inversion that is
applied also sets them:

* line `W-1` is odd (W is even), so any odd or full inversion sets it;
* line `W` (schemes II/III) is even, so even or full inversion sets it.

The decoder (`decoder`) XORs every odd payload line with tag `W-1` and every even payload line
with tag `W`. Scheme I has no even tag (`TAGS=1`), so its even lines pass straight through. The
decoder needs no flit type and no state.

Scheme II has the same two tags as scheme III. With a single tag line, odd and full inversion
would both set it, and the receiver could not tell which one to undo.

## Head flits

Head flits carry routing information that every router must read, so they are never encoded.
They go out with all tags at 0, and the decoder leaves them unchanged. Body and tail flits are
encoded. The previous-flit register is updated by head flits too, because the first body flit of
a packet follows the head on the wire.

## Encoder structure and timing

Each `encoder_sN` has the same outer shape:

```
 in_data (W-1) ─┬─► {tags=0, payload} = x ──► pair detectors ─► ones counters ─► decision
                │                               ▲                                  │
                │                               │ prev                             ▼
                └──────────────────────────► XOR stage (odd / even masks) ─► link register ─► link
                                                ▲                                  │
                                                └────────── previous flit ◄────────┘
```

* The link output register is the previous-flit register. The comparison is always against what
  the wires hold now.
* One flit per clock. A flit presented with `in_valid` at a rising edge appears on `link` with
  `link_valid` one clock later. `link_type` carries the flit type.
* With `in_valid` low the link lines hold their value, so an idle link does not toggle.
* Reset (`rst_n`, active low, asynchronous) clears the link to all zeros.
* The decision logic is purely combinational between the register and the XOR stage. At 32 lines
  that is a 2-level pair classifier, a 32-input population count and a comparison of 7-bit signed
  values.

`ones_counter` is a plain sum that synthesis turns into an adder tree. `majority_voter` is a
counter plus a compare against `NP/2`. `module_a` and `module_c` do the comparisons above in
signed arithmetic wide enough for `±2·NP`.

## Top level

`noc_codec_top` puts both network-interface sides of all three schemes next to each other:

* **Sending side**: the three encoders are fed the same flit stream (`in_valid`, `in_type`,
  `in_data`). Their links go out on `link1` (32 lines), `link2` and `link3` (33 lines), plus
  `link_valid` and `link_type`.
* **Receiving side**: `rx_link1..3` come back in and are decoded combinationally to
  `rx_data1..3`.

The network between the two sides (routers and wires) is outside the top; the encoding does not
need any change to it. An assertion checks that the three encoders' sidebands agree.

All modules take `W` (link line count of scheme I, default 32, must be even).

## Files

* `rtl/noc_codec_pkg.sv`: flit type enum (`FLIT_HEAD`, `FLIT_BODY`, `FLIT_TAIL`)
* `rtl/ty_detect.sv`, `te_detect.sv`, `t2_detect.sv`, `t4ss_detect.sv`: per-pair classifiers
* `rtl/ones_counter.sv`, `majority_voter.sv`, `module_a.sv`, `module_c.sv`: counting and decisions
* `rtl/encoder_s1.sv`, `encoder_s2.sv`, `encoder_s3.sv`: the three encoders
* `rtl/decoder.sv`: the decoder
* `rtl/noc_codec_top.sv`: the top
* `tb/tb_ref_pkg.sv`: reference model. It classifies transitions from the type definitions and
  chooses by comparing candidate costs, not by reusing the RTL's equations.
* `tb/tb_<module>.sv`: one self-checking testbench per module

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own; a watchdog ends it
if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/noc_codec_pkg.sv tb/tb_ref_pkg.sv tb/tb_noc_codec_top.sv \
    --top-module tb_noc_codec_top -o sim
./obj_dir/sim
```

Replace the last file and `--top-module` to run another testbench.

* The detector testbenches are exhaustive (all 16 transitions of a pair).
* `tb_module_a` applies every count combination for 32 pairs.
* `tb_module_c` is exhaustive for 8 pairs and random for 32.
* The encoder testbenches send 400 packets with idle gaps. They check every link word against
  the reference encoder, the decoded payload, uninverted head flits, the one-cycle latency and
  held idle links. They also check that every choice of the scheme occurs.
* `tb_noc_codec_top` runs at the default width with no parameter overrides. It sends about 1,600
  flits through a 3-stage network model to the decoders and checks delivery and end-to-end
  latency.

On that stream (seed 1) it reports:

| link                 | self transitions | coupling cost |
|----------------------|------------------|---------------|
| raw 31-bit flits     | 23315 | 34624 |
| scheme I (32 lines)  | 21857 | 27291 |
| scheme II (33 lines) | 16387 | 22380 |
| scheme III (33 lines)| 13974 | 19070 |

The stimulus is deliberately rich in patterns that inversion helps. It is not representative
traffic, so the ratios are not a power estimate, but they do show the expected ordering I > II > III.

## Interpretations and departures

These points are this design's choices, not something fixed by the underlying scheme:

* **Width.** No flit width is fixed; `W = 32` is a common NoC choice. Every module is
  parameterised.
* **`T4**`.** Read as "stable pair holding 01 or 10". This is the only reading under which full
  inversion pays off exactly when `T2 > T4**`.
* **Number of pairs.** The `w − 1` in the rules is taken as the number of adjacent pairs
  compared. For schemes II and III this is 32, because the two tag lines are included.
* **Scheme II tags.** Scheme II gets a second (even) tag line, as scheme III has. One tag cannot
  tell odd from full inversion apart.
* **Scheme III rules.** The odd rule's threshold is on `Ty` (`2Ty > NP`). The even rule is the
  mirror image of the odd rule.
* **Full inversion in scheme III** is signalled as odd and even inversion together.
* **Decoder.** Its XOR form is this design's own; no decoder circuit is given.
* **Registers.** The one-cycle registered timing, the reset to zero, and updating the
  previous-flit register on head flits are this design's choices.
* **Not reproduced.** The routers, the wires, and an absolute power figure (which depends on a
  technology and tool flow) are outside this RTL.
