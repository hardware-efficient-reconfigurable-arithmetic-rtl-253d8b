# Reconfigurable binary / BCD sign-magnitude adder-subtractor

One combinational datapath that adds or subtracts two **sign-magnitude**
numbers, treated either as **binary** integers or as **8421 BCD** decimal
numbers, and returns a sign-magnitude result. A single mode bit switches
between the two number systems at run time. Decimal subtraction works on the
digits directly, with no conversion to and from binary.

The main idea is to turn every request into one of two operations on the
magnitudes, |N1| + |N2| or |N1| − |N2|. A magnitude comparator runs in
parallel with the adders and decides in advance how the difference comes out:

* |N1| > |N2|: the comparator output is the carry-in that completes a
  two's-complement (or ten's-complement) subtraction. The sign is N1's.
* |N1| ≤ |N2|: there is no carry-in. The adder output is then the one's
  complement of |N2| − |N1|. A final row of XOR gates inverts it, and the
  sign of N1 is flipped.

So no result ever needs a second, complementing addition.

## Word format and interface

`reconfig_adder #(N_BITS = 32)`

| port  | dir | width  | meaning |
|-------|-----|--------|---------|
| `n1`  | in  | N_BITS | operand N1: bit N_BITS−1 is the sign (1 = negative), the rest is the magnitude |
| `n2`  | in  | N_BITS | operand N2, same format |
| `add` | in  | 1      | 1 requests N1 + N2, 0 requests N1 − N2 |
| `bin` | in  | 1      | 1 = binary, 0 = BCD |
| `sum` | out | N_BITS | result, sign-magnitude |
| `ovf` | out | 1      | carry out of the magnitude on an effective addition (the magnitude wraps) |

* **Binary mode.** The magnitude is a plain N_BITS−1 bit unsigned number
  (31 bits at the default). An unsigned operand is a word with sign bit 0.
* **BCD mode.** The magnitude holds `(N_BITS−1)/4` whole digits in its low
  bits: 7 digits in bits 27:0 at the default. The spare high magnitude bits
  (30:28) are ignored on input and return as 0. The operands must be valid
  BCD digits (0–9). Other nibble codes give undefined results.
* **Timing.** The unit is purely combinational. It has no clock or reset, and
  the result is valid in the same cycle as the operands. To pipeline it, put
  registers around it.

## The effective operation (EOp)

EOp = N1s ⊕ N2s ⊕ Add. EOp = 1 means the magnitudes are added, and the
result takes N1's sign. EOp = 0 means they are subtracted:

| N1s | N2s | Add | EOp | magnitude work |
|-----|-----|-----|-----|----------------|
| 0 | 0 | 1 | 1 | +(N1 + N2) |
| 0 | 0 | 0 | 0 | +(N1 − N2) |
| 0 | 1 | 1 | 0 | +(N1 − N2) |
| 0 | 1 | 0 | 1 | +(N1 + N2) |
| 1 | 0 | 1 | 0 | −(N1 − N2) |
| 1 | 0 | 0 | 1 | −(N1 + N2) |
| 1 | 1 | 1 | 1 | −(N1 + N2) |
| 1 | 1 | 0 | 0 | −(N1 − N2) |

On effective subtraction the subtrahend goes through an XOR row controlled by
¬EOp, which gives its one's complement.

## Datapath

The datapath has six subunits. Signals flow top to bottom, and subunit 6
runs beside the others:

```
 N2 ─► XOR(¬EOp) ─┬───────────────► MUX1 ◄─ DSS             N1, ¬N2
                  └─► digitwise−6 ─►  │                         │
                                       ▼                    Co logic ──► Co
 N1 ──────────────────────────► adder 1 ◄─ Cin1                 │
                                       │                 Co·¬EOp ─► DMUX1(Bin)
 N1, N2* (MUX2) ─► DC logic ─► correction coder ─► adder 2 ◄─ Cin2
                                       │                │
                                 MUX4 (Bin: adder 1 or adder 2)
                                       │
                               XOR(SC), sign = N1s ⊕ SC ─► sum
```

| subunit | modules | used in |
|---------|---------|---------|
| 1: operand preparation | `eop_logic`, `xor_stage`, `digitwise6`, `dss_logic`, `mux2_1` (MUX1) | both modes; digitwise−6 only for BCD subtraction |
| 2: decimal correction | `mux2_1` (MUX2), `dc_logic`, `dec_corr_coder` | BCD only |
| 3: adder 1 | `carry_propagate_adder` | both modes |
| 4: adder 2 | `carry_propagate_adder`, `mux2_1` (MUX4) | BCD only; MUX4 bypasses it in binary mode |
| 5: sum correction | `sum_correction` (contains a `xor_stage`) | both modes |
| 6: carry-in | `co_logic`, AND gate, `demux1_2` (DMUX1) | both modes, in parallel |

* **DSS = ¬EOp · ¬Bin** marks a BCD subtraction. When it is set, MUX1 and
  MUX2 take the nine's complement from `digitwise6` instead of the one's
  complement.
* **Co** is the group generate of |N1| + ¬|N2| over the whole magnitude, so
  Co = 1 exactly when |N1| > |N2|. `co_logic` reduces the bitwise
  (generate, propagate) pairs in a log-depth tree.
* The carry-in **Co · ¬EOp** is steered by DMUX1. In binary mode it goes to
  adder 1. In BCD mode it goes to adder 2, which is where the decimal
  correction is added, and it also goes into the digit-carry chain.
* **SC = ¬Co · ¬EOp** selects the final inversion.

## Binary mode

Only subunits 1, 3, 5 and 6 take part:

* **Effective addition:** Σ = |N1| + |N2|, and `ovf` is the carry out.
* **Effective subtraction:** Σ = |N1| + ¬|N2| + Co.
  * With Co = 1 this is the exact difference.
  * With Co = 0 it equals ¬(|N2| − |N1|), which SC inverts.

## BCD mode: how the decimal correction works

This is the least obvious part of the design. Adder 1 adds the digits as
plain binary nibbles. The decimal correction is then added in a second pass:

1. **Subtrahend.** On subtraction, each nibble of the one's complement holds
   15 − d. `digitwise6` subtracts 6 from every nibble with a small
   hard-wired function and no carries between nibbles. That gives 9 − d,
   the nine's complement.
2. **Digit carries.** `dc_logic` computes the decimal carry out of every
   digit of N1 + N2* + cin, where N2* is N2 or its nine's complement. Each
   digit has a generate (digit sum ≥ 10) and a propagate (digit sum = 9).
   The carries follow dc_i = g_i | p_i·dc_{i−1}.
3. **Correction word.** `dec_corr_coder` builds one nibble per digit:

   | case | DC = 1 | DC = 0 |
   |------|--------|--------|
   | effective addition | 0110 | 0000 |
   | subtraction, \|N1\| > \|N2\| (Co = 1) | 0110 | 0000 |
   | subtraction, \|N1\| ≤ \|N2\| (Co = 0) | 1100 | 0110 |
   | binary mode | 0000 | 0000 |

4. **Adder 2.** Adder 2 adds the correction word and the carry-in to the
   binary nibble sum.

**Why +6 works.** Where a decimal carry leaves a digit, the binary nibble sum
is too large by 10 at that position but 1 too small at the next one. In
base-16 terms that is an error of 16 − 10 = 6 at the digit. So adding 6 where
DC = 1 turns the binary sum into the correct BCD digits. This is an exact
identity on the whole word, not a per-nibble adjustment, and a single
carry-propagate addition applies it.

**Why +6 more when Co = 0.** Without a carry-in, N1 plus the nine's
complement of N2 is the nine's complement of the true difference r: each
digit is 9 − r_i. An XOR can only produce 15 − x from x, so each digit gets
a further +6, making it 15 − r_i. The SC inversion then yields r_i. This is
why the Co = 0 row uses 12 and 6 instead of 6 and 0.

**Worked example:** 67 − 958 with 7 digits.

| step | value |
|------|-------|
| Co (is 67 > 958?) | 0, so no carry-in |
| N2* | 9999041 |
| adder 1 | 0x0000067 + 0x9999041 = 0x99990A8 |
| digit carries | only digit 1 (6 + 4) |
| correction | 0x66666C6 |
| adder 2 | 0x99990A8 + 0x66666C6 = 0xFFFF76E |
| invert (SC = 1) | 0000891 |
| sign | N1s ⊕ 1, so the result is −891 |

In BCD mode, `ovf` is the decimal carry out of the top digit on effective
addition.

## Zero and the sign

When the magnitudes are equal on an effective subtraction, Co = 0. The sign
then comes out as the inverse of N1's sign, so +5 − (+5) gives −0. This
follows the sign rule the design was specified with, and it is kept on
purpose. Add a zero-detect on the magnitude if a canonical +0 is needed.

## Where this RTL departs from or adds to its specification

* **SC.** The specification states SC = Co · EOp, but it also defines
  EOp = 1 as effective *addition*. Used literally, that would complement
  results of additions. The inversion is needed exactly on effective
  subtraction without a carry-in, so SC = ¬Co · ¬EOp is used.
* **Correction coder input.** The coder is driven by the effective operation
  EOp rather than the raw `add` input, because the correction values depend
  on the effective operation.
* **Carry-in in decimal subtraction.** The carry-in (Co · ¬EOp) is applied
  whenever |N1| > |N2|, which turns the nine's complement into the ten's
  complement. It feeds both the digit-carry chain and adder 2.
* **`ovf` output.** The specification treats the unit as overflow-free and
  leaves the adder carry outs unconnected. `ovf` is an addition of this
  design.
* **BCD digit packing and width.** The 7-digit BCD packing and the 32-bit
  default width are choices of this design. The width matches the 32-bit
  adder and multiplexer of the reference.
* **No pipeline registers.** The reference describes the subunits as
  working "in a pipelined manner" but defines no stages or latency. The RTL
  is combinational.
* **Own gate-level forms.** The digit-carry logic and the Co tree use this
  design's own structures. The reference's gate equation for the digit
  carry is not reproduced.
* **Mux and demux select polarities are assumed:**
  * `mux2_1`: select 0 → `mux_in1`.
  * `demux1_2`: select 0 → `demux_out1`, and the idle output is 0.
* **Not built:**
  * **Complement operand formats.** Other operand formats (two's- or
    ten's-complement inputs) are mentioned only in passing, and only
    sign-magnitude is built.
  * **Earlier adders.** The earlier adders the design is compared with
    (Hwang, Fischer, Haller, Humberto, Sreehari) are not part of it.

## Files

* `rtl/ra_pkg.sv`: the shared width default, the BCD digit type and the
  digit-count function.
* `rtl/reconfig_adder.sv`: top level.
* `rtl/` leaf modules, in data-flow order:
  * `eop_logic`
  * `dss_logic`
  * `xor_stage`
  * `digitwise6`
  * `mux2_1`
  * `co_logic`
  * `demux1_2`
  * `dc_logic`
  * `dec_corr_coder`
  * `carry_propagate_adder`
  * `sum_correction`
* `tb/tb_<module>.sv`: one self-checking testbench per module.
  * Leaf testbenches compare against truth tables or arithmetic written out
    independently (decimal digit-by-digit addition, magnitude compare, wide
    integer sums).
  * `tb_reconfig_adder` runs the full 32-bit design. It uses directed cases
    and 4000 random operations with the modes interleaved, checked against
    an integer model that converts BCD to decimal values and back. It also
    counts every mechanism and fails if any never occurred:
    * effective addition in each mode
    * the three subtraction cases (>, <, =) in each mode
    * both correction values (+6 and +12)
    * overflow in each mode
    * mode switches

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ra_pkg.sv \
    tb/tb_reconfig_adder.sv --top-module tb_reconfig_adder -Mdir obj
./obj/Vtb_reconfig_adder
```

Replace `reconfig_adder` with any module name to run that module's
testbench. `-Irtl` lets Verilator find each module by its file name.

## Changing the size

`N_BITS` sets the word width. The magnitude is N_BITS−1 bits, and BCD mode
uses ⌊(N_BITS−1)/4⌋ digits. Choosing N_BITS = 4k + 1 (e.g. 33) uses every
magnitude bit for digits. `tb_reconfig_adder` derives all its sizes from its
local `N`. To test another width, change `N` and pass it to the instance.
