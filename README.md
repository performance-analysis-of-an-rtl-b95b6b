# Gray-coded, coupling-aware flit coding for network-on-chip links

On a network-on-chip (NoC) a large share of the power goes into the wires between
routers. Much of that is coupling power. It is spent when two neighbouring wires switch
in opposite directions, or when one switches while its neighbour stays put. This RTL
reduces that activity without touching the routers or the links. All the work is done in
the network interfaces (NIs) at the two ends of a route:

* The transmitting NI converts each body flit to Gray code. It then decides, flit by
  flit, whether to invert some of the wires before sending. One extra wire, the
  *inversion bit*, tells the receiver that an inversion happened.
* The receiving NI undoes the inversion and converts back from Gray to binary.

With wormhole switching every link on the route carries the same flit sequence. A saving
made at the source therefore holds on every hop. Header flits are sent uncoded so that
the routers can read them.

Three coding schemes are provided. They differ in which inversions the encoder may
choose:

| scheme | inversions offered                                   | encoder | decoder |
|--------|------------------------------------------------------|---------|---------|
| I      | none, odd wires                                      | `scheme1_encoder` | `scheme1_decoder` |
| II     | none, odd wires, all wires                           | `scheme2_encoder` | `scheme23_decoder` |
| III    | none, odd wires, even wires, all wires (see below)   | `scheme3_encoder` | `scheme23_decoder` |

## Link word

A link is `W` wires wide. The default is `W = 8`: 7 body-flit bits and 1 inversion bit.

```
 bit  W-1        W-2 ............ 0
     [ inv ]    [   body flit (Gray)  ]
```

The transmitter appends a `0` above the body flit and converts the whole `W`-bit word to
Gray code. The top bit stays `0`. It is then inverted or not along with the other bits,
so it carries the inversion information. `W` must be even. This makes bit `W-1` an
*odd* position, which means:

* odd and full inversion set the inversion bit to 1;
* even inversion and no inversion leave it at 0.

## Transition classes and the cost being minimised

Consider each pair of adjacent wires `(k, k+1)` and compare the value it held last with
the value it is about to carry. Four classes follow:

| class    | what happens                          | cost used here |
|----------|---------------------------------------|----------------|
| Type I   | exactly one wire switches             | 1 |
| Type II  | both switch, in opposite directions   | 2 |
| Type III | both switch, in the same direction    | 0 |
| Type IV  | neither switches                      | 0 |

The cost of a flit is the sum over its `W-1` pairs. Every adjacent pair has one
odd-position wire and one even-position wire. That gives each inversion a simple
per-pair effect:

* **Odd inversion** toggles one wire of every pair. A pair that was Type II becomes
  Type I (saves 1). A Type I pair becomes Type III or IV (saves 1), or becomes Type II
  (costs 1 more). A Type III or IV pair becomes Type I (costs 1 more). The detector
  flag **TY** marks the pairs that gain. The saving is therefore `2*Ty - (W-1)`, which is
  positive exactly when most pairs are TY (`Ty > (W-1)/2`, a majority vote).
* **Even inversion** is the mirror case. Its flag is **Te** and its saving is
  `2*Te - (W-1)`.
* **Full inversion** toggles both wires of a pair. It swaps Type II with **T4\*\***, a
  pair that does not switch and whose two wires differ. It leaves every other pair's
  cost unchanged. The saving is `2*(T2 - T4**)`.

`pair_type_detector` computes the four flags for one pair. `pair_type_array` places one
detector on each pair. `ones_count` counts each flag vector into `clog2(W)` bits.
`majority_voter` applies the TY vote.

## Telling the inversions apart at the receiver

This is the subtle part of the design. Schemes II and III choose among three or four
inversions but have only one inversion bit. The receiver recovers the missing
information by running the same TY majority vote on the word it received, compared with
the word received before it:

| inversion bit | vote | inversion undone |
|---------------|------|------------------|
| 0 | 0 | none |
| 1 | 0 | odd  |
| 1 | 1 | full |
| 0 | 1 | even (scheme III only) |

The table works for odd inversion and for no inversion with no further condition:

* Odd inversion turns every TY pair into a non-TY pair and the reverse. An encoder that
  odd-inverted because most pairs were TY therefore produces a word whose vote is 0.
* No inversion is only chosen when the vote was already 0.

Full and even inversion do not behave this way. Their vote on the received word depends
on the data. Written in the transmitter's counts, the vote after full inversion is 1
exactly when `2*(T4** + Te - T2) > W-1`, and the vote after even inversion is 1 exactly
when that condition is false. For each flit, then, only **one** of full and even
inversion can be recognised by the receiver. The decision blocks only offer that one:

* `module_a` (scheme II) allows full inversion only when the condition holds. This is
  why the scheme II encoder also counts Te.
* `module_c` (scheme III) offers full inversion when the condition holds and even
  inversion otherwise.

Among the inversions allowed, the encoder takes the one with the largest positive saving.
Odd inversion wins a tie, and no inversion is used when nothing saves anything. One
consequence is worth knowing: the fourth option is always the weaker of full and even
inversion. The condition above is equivalent to "even inversion would save more than
full inversion". The decoding rule is not a heuristic. The decoder testbenches check the
round trip for every previous link word and every new flit at `W = 8`.

## Network interfaces and timing

`ni_encoder` (transmitter) works as follows:

1. `bin2gray` converts `{0, data_i}` to Gray code.
2. The scheme's encoder compares the result with the last link word and applies the
   chosen inversion.
3. The result is registered onto `link_o`. This link register is also the reference for
   the next flit.

A header flit (`head_i`) skips steps 1 and 2 and goes out as `{0, data_i}`. It still
becomes the reference for the next flit. When `valid_i` is low the link holds its value.

`ni_decoder` (receiver) keeps the previous valid link word as its reference. It decodes
with the scheme's decoder, converts through `gray2bin` and registers the result.

Both interfaces have one clock of latency, so a flit crosses a directly connected channel
in two clocks. `rst_n` is an active-low synchronous reset. It clears both reference words
to 0, so the two ends start in step. Both interfaces report the inversion on `mode_o`
using the code of `gray_enc_pkg::inv_mode_e`: `00` none, `01` even, `10` odd, `11` full.

`gray_noc_top` places three channels side by side, one per scheme (index 0, 1, 2 =
scheme I, II, III). Each channel is an `ni_encoder` and an `ni_decoder` with the same
`SCHEME`. The network between them is not part of the design. `link_o` leaves the top
and `link_i` enters it. Tie them together, or pass them through any number of pipeline
stages that keep the order of valid words.

## Module hierarchy

```
gray_noc_top
└── ni_encoder / ni_decoder  (x3, SCHEME = 1, 2, 3)
    ├── bin2gray / gray2bin
    ├── scheme1_encoder            pair_type_array, majority_voter, inv_apply
    ├── scheme2_encoder            pair_type_array, 4x ones_count, module_a, inv_apply
    ├── scheme3_encoder            pair_type_array, 4x ones_count, module_c, inv_apply
    ├── scheme1_decoder            inv_apply
    └── scheme23_decoder           pair_type_array, majority_voter, inv_apply
pair_type_array → pair_type_detector (one per adjacent wire pair)
gray_enc_pkg: inv_mode_e, LINK_W
```

## What follows the original description and what does not

These parts follow the published design:

* Gray coding with a `0` appended before coding.
* Odd, even and full inversion with one inversion bit.
* The detector types TY, Te, T2 and T4\*\*.
* Ones counters of `log2 w` bits and a majority voter for `Ty > (w-1)/2`.
* Full inversion when `T2 > T4**`.
* The 2-bit decision code of scheme III.
* A decoder built from TY blocks, a majority voter and the inversion bit, shared by
  schemes II and III.
* Header flits left uncoded.
* The 8-bit link width.

These are choices of this implementation:

* **Cost weights and decision rule.** The weights (Type I = 1, Type II = 2), the
  largest-saving rule and the tie-break are this implementation's.
* **Decodability restriction.** The restriction described above is added to both
  decision blocks. The scheme II encoder needs a Te counter for it, which the original
  scheme II datapath does not have.
* **Decoder reference word.** The decoder compares against the previous *received*
  (still encoded) word. The original drawing labels that register "previous decoded".
  The received word is what the encoder compared against, so it is the one that makes
  decoding exact.
* **Interface details.** The valid/head sideband, the register stages, the one-clock
  latencies, the active-low synchronous reset and the zero reset value are all this
  implementation's.
* **Even `W`.** The requirement that `W` be even is this implementation's. It is checked
  at elaboration.
* **Inversion bit under even inversion.** One statement of the scheme III description
  has the inversion bit set for even inversion too. Here the inversion bit is simply
  bit `W-1` of the inverted word, so it stays 0 under even inversion. With one bit and
  one vote, three inversions that all set the bit could not be told apart.

The original work reports power and area figures from a 0.18 µm standard-cell flow. They
are not reproduced here.

## Results from the testbenches

The encoder testbenches try every previous link word (256) against every new Gray word
(128) at `W = 8`. Summed over all 32768 cases, the coupling cost falls from 172032 when
uncoded to:

* 132608 with scheme I (−23 %);
* 129321 with scheme II (−25 %);
* 126034 with scheme III (−27 %).

No coded word ever costs more than the uncoded one.

The end-to-end test sends packet traffic that is half random and half counting data. On
that traffic the per-channel cost of the coded link is about 20 % below plain Gray and
about 24 % below plain binary.

## Simulating

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. Most of them share the reference model
`tb/tb_ref_pkg.sv`. That model works from the cost definition directly, not from the
detector flags. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/gray_enc_pkg.sv tb/tb_ref_pkg.sv tb/tb_gray_noc_top.sv \
    --top-module tb_gray_noc_top -o sim
./obj_dir/sim
```

`tb_gray_noc_top` runs the top at its default parameters. It sends 12000 flits per
channel and checks the following for each channel:

* data, header flags and order;
* the two-clock latency;
* that the receiver detects the inversion the transmitter applied;
* the cost bound.

It also requires each mechanism to occur at least once: header bypass, idle link, and
every inversion the scheme can choose. The other testbenches cover one module each,
exhaustively where the input space allows.

`tb_gray_noc_top_widths` runs the same three channels at `W = 4` and `W = 16`. It uses
its helper `tb_top_width_run` and checks without a reference encoder: round trip,
latency, inversion agreement, the cost bound, and that each scheme uses exactly the
inversions it offers.

Two assertions run in simulation (`--assert`):

* `ni_encoder` checks that the chosen inversion is one its scheme offers.
* A scheme II `ni_decoder` flags a received word that decodes as even inversion. Such a
  word means the two ends have lost step.

To change the link width, set `W` on `gray_noc_top` (or on the interfaces) to any even
value of 4 or more. The exhaustive reference model in `tb/tb_ref_pkg.sv` is written for
`W = 8`.
