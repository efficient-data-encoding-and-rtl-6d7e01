# Coupling-aware flit coding for Network-on-Chip links

On the long wires of an on-chip network most link energy goes into two kinds of switching:
*self switching*, where a line charges or discharges against ground, and *coupling switching*,
where two neighbouring lines change relative to each other and charge the capacitance between
them. Adjacent lines that switch in opposite directions cost the most. This RTL encodes each body
flit at the source network interface. For each new word the encoder decides whether sending it
as is, or with some of its lines inverted, lowers the coupling activity against the word already
on the link. It adds one or two control lines that tell the decoder at the destination interface
what was done. The routers in between forward the encoded words unchanged (end-to-end coding),
so the saving applies to every hop of the path.

Three schemes are provided. Each one adds options to the one before:

| scheme | actions | link lines | data bits (default) |
|---|---|---|---|
| I   | none, odd inversion                    | data + 1 flag      | 17 on 18 lines |
| II  | none, odd inversion, full inversion    | data + 1 flag      | 17 on 18 lines |
| III | none, odd, even or full inversion      | data + 2 control   | 16 on 18 lines |

"Odd inversion" inverts lines 1, 3, 5, ..., "even inversion" lines 0, 2, 4, ..., and "full
inversion" every line.

## Transition types of a pair of adjacent lines

Everything is decided pair by pair. A link of N lines has N-1 pairs (line i, line i+1). A
pair's change from the current link value `y` to the next value `x` is one of four types:

| type | what happens | example | coupling cost |
|---|---|---|---|
| I   | one line switches, the other holds          | 00→01        | medium |
| II  | both switch, in opposite directions          | 01→10        | highest |
| III | both switch, in the same direction           | 00→11        | none (self switching only) |
| IV  | neither switches                             | 01→01        | none |

Every pair holds one odd-indexed line and one even-indexed line. Inverting one of them changes
the pair's type in a fixed way, and the pair detectors flag the pairs that an inversion would
improve:

* **Ty** (`ty_cell`) flags a pair that odd inversion improves. These are a Type II pair, which
  becomes Type I. Two Type I cases also count: the odd line switching alone, which becomes
  Type IV, and the even line switching alone from an equal pair (00 or 11), which becomes
  Type III. Odd inversion makes every other pair worse: the even line switching alone from an
  unequal pair becomes Type II, and Types III and IV become Type I.
* **Te** (`te_cell`) is the same for even inversion, with the roles of the two lines swapped.
* **T2** (`t2_cell`) flags Type II. Full inversion turns it into Type IV.
* **T4\*\*** (`t4ss_cell`) flags a Type IV pair whose lines differ (01→01, 10→10). Full
  inversion turns it into Type II, so it counts against full inversion.

Which bit of the pair is the odd line alternates along the link. The cells take a parameter
`ODD_BIT` for this, and the encoders set it per pair.

A useful fact behind the decoders: for every pair, odd inversion swaps "flagged by Ty" and
"not flagged by Ty". So if an odd-inverted word is compared again with the previous word, its
Ty count is exactly `(N-1) - Ty` of the original.

## Decision rules

Let P = N-1 be the number of pairs (17 at the defaults, odd, so no comparison ties), and let
Ty, Te, T2, T4 be the counts of flagged pairs (`ones_counter`).

* **Scheme I** (`majority_voter`): odd inversion when Ty > P/2.
* **Scheme II** (`module_a`):
  * odd inversion when 2(T2 − T4) < 2Ty − P and Ty > P/2;
  * full inversion when 2(T2 − T4) > 2Ty − P, T2 > T4, and the decodability guard below holds.
* **Scheme III** (`module_c`), checked in this order:
  * even inversion when Te > P/2, Te > Ty and 2(T2 − T4) < 2Te − P;
  * full inversion when 2(T2 − T4) > 2Ty − P and T2 > T4;
  * odd inversion when 2(T2 − T4) < 2Ty − P, Ty > P/2 and Te < Ty.

  The output is the 2-bit code {odd, even}: `10` odd, `01` even, `11` full, `00` none
  (`coupling_pkg::inv_action_e`).

The quantity 2Ty − P estimates what odd inversion saves: the pairs it improves minus the pairs
it spoils. 2(T2 − T4) estimates the same for full inversion.

## How the decoders know what was done

This is the subtle part of the design.

**Control lines.** The encoder builds the word with its control lines at 0 and then applies the
chosen inversion to the whole word, control lines included. In schemes I and II the flag is the
top line, N-1, which is odd. Odd inversion and full inversion both set it to 1. In scheme III
the two control lines are N-2 (even) and N-1 (odd), so they carry the action code directly.
This is why scheme I and II need an odd `DATA_W`, and scheme III an even one.

**Scheme I** inverts the odd lines back when the flag is 1.

**Scheme III** reads `{line N-1, line N-2}` and undoes that action. No history is needed.

**Scheme II** has a single flag for two different inversions. The decoder keeps the previous
received word R and counts Ty between R and the received word. If the flag is set, it reads no
majority as odd inversion and a majority as full inversion. An odd-inverted word always shows
no majority, because its Ty count is `P − Ty(original)` and the encoder chose odd inversion
only when Ty(original) > P/2. A fully inverted word does not always show a majority. For
example, if every pair is Type II, the fully inverted word has no Ty pairs at all, and it would
be decoded as odd-inverted. The scheme II encoder therefore has a fourth row of `ty_cell`s that
evaluates Ty between the link word and the fully inverted candidate. It allows full inversion
only when that count is a majority, i.e. only when the decoder will read it correctly. When the
guard refuses, the word is sent uninverted. In random traffic this guard refuses a good share
of the full inversions the plain rule would choose (see the numbers below). This is the main
reason scheme II saves less here than scheme III.

Encoder and decoder must see the same sequence of words. The encoder's link register and the
decoder's R register both reset to 0 and update only on valid words. All flits of a stream must
go from one encoder to one decoder in order, which wormhole switching provides within a packet.

## Blocks

| module | role |
|---|---|
| `coupling_pkg` | action code enum and line masks |
| `ty_cell`, `te_cell`, `t2_cell`, `t4ss_cell` | pair detectors (combinational) |
| `ones_counter` | counts flagged pairs |
| `majority_voter` | strict majority of its inputs |
| `module_a` | scheme II decision |
| `module_c` | scheme III decision |
| `scheme{1,2,3}_encoder` | detector rows, counters, decision, inversion, link register |
| `scheme{1,2,3}_decoder` | undo the inversion, output register |
| `link_pipe` | the path through `HOPS` routers, one register per hop, holding between flits |
| `coupling3_classifier` | the transition type of three adjacent lines (see below) |
| `noc_coding_top` | the three channels side by side, plus the three-line classifier |

`coupling3_classifier` extends the type definitions to three lines:

* Type I: exactly one line switches.
* Type II: some line rises while another falls.
* Type III: all three lines switch in the same direction.
* Type IV: nothing switches.

Two lines switching the same way while the third holds fits none of these, and sets no output.
The classifier is a separate monitor and is not used by the encoders.

## Interface and timing

All blocks use one clock and a synchronous, active-low reset `rst_n`.

* **Encoder:** `valid_i`/`data_i` in, `valid_o`/`link_o` out. `link_o` is the register that
  also serves as "the word now on the link". A flit appears on it one clock after `valid_i`.
  Without `valid_i` the link holds its value, so idle cycles cause no transitions.
* **Decoder:** `valid_i`/`link_i` in, registered `valid_o`/`data_o` one clock later.
* **`noc_coding_top`:** link words after 1 clock, decoded flits after `HOPS + 2` clocks
  (4 at the default `HOPS = 2`). Scheme III takes `data_i[15:0]`.

Everything between the registers is combinational. The critical path of scheme III is four
detector rows, a 17-input adder, comparisons and an XOR.

## Where this design departs from its source description, or fills gaps

* **Scheme II full-inversion guard.** This is an addition; without it scheme II is not always
  decodable (see above).
* **Scheme III decoder.** It reads the two control lines. The source describes it as identical
  to the scheme II decoder, which uses a Ty majority and only the top line. That cannot tell
  even from odd inversion in general.
* **Scheme III priority.** The source's conditions for even and full inversion can both hold.
  Even inversion is given priority, because its condition already states that it saves more
  than full inversion. When Te = Ty and both are a majority, none of the printed conditions
  holds and the word goes uninverted.
* **Sub-type split for mirrored pairs.** The split of Type I and Type IV into the sub-types
  that the detectors use is given for one orientation of the pair. It is mirrored here for
  pairs whose lower line is odd.
* **Own choices.** The valid qualifier, the reset values, the one-clock registers and `HOPS`
  are this design's choices.
* **Not built.** Routers, network interfaces and processing elements are outside this RTL.
  Only the in-order, unchanged forwarding of the path is modelled (`link_pipe`). Head flits
  are not treated specially: every valid flit is coded.
* **Baselines not included.** Bus-invert coding and Gray coding, the usual baselines for
  these schemes, are not part of this RTL.
* **Not an optimal coder.** The decision rules are the source's counting heuristics. They do
  not compute the optimal action for an exact capacitance model.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a `TB_RESULT checks=...
failures=...` line. The reference models (`tb/tb_ref_pkg.sv`) do not reuse the RTL equations.
They classify each pair's transition before and after the candidate inversion, and derive the
flags and actions from those types.

* The pair cells, the three-line classifier and `module_a`/`module_c` are checked
  exhaustively. The decision blocks are checked over all count combinations for 17 pairs.
* The codec testbenches run 4000 cycles of random and adversarial flits with idle gaps. They
  check every link word and every decoded flit, and they require each action to occur.
* `tb_noc_coding_top` runs the top at its default parameters for 6000 cycles. It checks all
  three channels end to end. It counts every mechanism: each action of each scheme, refused
  full inversions, idle cycles, and the four three-line types.

Typical output of that run shows the weighted coupling activity, with Type I counted as 1 and
Type II as 2:

```
scheme I   none=1791 odd=3424
scheme II  none=2507 odd=2543 full=165 refused_full=1330
scheme III none=1579 odd=1203 even=1214 full=1219
weighted coupling activity raw=75010 schemeI=42371 schemeII=45937 schemeIII=29505
```

The stimulus deliberately includes many complemented and alternating words, so these numbers
show the relative behaviour of the schemes, not the saving on real traffic.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --top-module tb_noc_coding_top \
  rtl/coupling_pkg.sv tb/tb_ref_pkg.sv -Irtl -Itb tb/tb_noc_coding_top.sv -o sim
./obj_dir/sim
```

Replace `tb_noc_coding_top` with any other testbench in `tb/`. Link widths are set by each
encoder's and decoder's `DATA_W`. It must be odd for schemes I and II and even for scheme III,
and elaboration stops with an error otherwise. The line masks in `coupling_pkg` support links of
up to 64 lines.
