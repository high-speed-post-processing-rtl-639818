# Residue-number adder and subtractor from reversible gates

A residue number system (RNS) represents an integer by its remainders with
respect to a set of pairwise coprime moduli. With the moduli {5, 3, 2}, the
number 29 becomes (29 mod 5, 29 mod 3, 29 mod 2) = (4, 2, 1). Addition and
subtraction then work on each remainder on its own, modulo its own modulus.
No carry passes from one channel to another. The channels are narrow and run
in parallel, so the carry chain is only as long as the widest channel.

This RTL builds that scheme at gate level from reversible gates:

- the TSG gate, a 4-input/4-output reversible gate that acts as a full adder;
- the Feynman (controlled-NOT) gate.

From these it builds ripple-carry adders and subtractors. From those it
builds modular adders and subtractors. From those it builds the converters
between binary and residue form. Every block above the gates uses additions
only: there are no dividers and no multipliers.

The whole design is combinational. It has no clock and no reset.

## Datapath

```
 x (5 b) ─► forward_converter ─► x_rns ─┐   per channel i (m = 5, 3, 2):
 y (5 b) ─► forward_converter ─► y_rns ─┼─► residue_adder      ─► sum_rns  ─► reverse_converter ─► z_sum  = (x+y) mod 30
                                        └─► residue_subtractor ─► diff_rns ─► reverse_converter ─► z_diff = (x-y) mod 30

 a16, b16, m16 (16 b) ─► residue_subtractor (N = 16) ─► s16 = (a16-b16) mod m16
```

`rns_top` holds two independent things side by side:

1. **The RNS adder/subtractor.**
   - The moduli set is {5, 3, 2}, so the dynamic range is 30.
   - Binary operands are 5 bits wide.
   - Each residue channel is 4 bits wide.
   - `z_sum` equals x + y while x + y < 30. Above that it wraps modulo 30.
     The same holds for `z_diff` when x < y.
   - The intermediate residues are brought out as outputs, for observation.
2. **A stand-alone 16-bit residue subtractor.** This is the modular
   subtractor at its default width, with its own ports.

The moduli, widths and types are in `rns_pkg`. `rns_vec_t` is a packed array
of three 4-bit residues. Element `i` is the residue modulo `MODULI[i]`.

## The adder cell: TSG gate chain (`tsg_gate`, `rev_adder`)

The TSG gate maps (a, b, c, d) one-to-one onto (p, q, r, s):

```
p = a
q = (~a & ~c) ^ ~b
r = q ^ d
s = (q & d) ^ ((a & b) ^ c)
```

With `c = 0` the gate works as a full adder:

- `q = a ^ b`;
- `r` is the sum of a, b and d;
- `s` is the carry-out.

`rev_adder` chains N of these gates. Stage i gets `d` from the carry of stage
i-1, and stage 0 gets `d` from `cin`. The `p` and `q` outputs are the
reversible circuit's garbage outputs and are left unused. Lint reports them
as unused signals. That is expected.

Each carry drives exactly one gate. This respects the reversible-logic rule of
no fan-out and no feedback.

`feynman_gate` computes `p = a`, `q = a ^ b`. With `b = 1` it inverts `a`.
This design uses it wherever a complement is needed, instead of an
irreversible NOT.

`rev_subtractor` computes a − b as a + ~b + 1:

- Feynman gates invert b;
- the TSG adder adds, with carry-in 1;
- a last Feynman gate inverts the carry-out into a borrow flag (1 when a < b).

## Modular addition (`residue_adder`)

The modular adder computes `s = (a + b) mod m`. It takes two residues and
the modulus m as an input port:

1. The first reversible adder forms S = a + b. S is N+1 bits: the sum plus
   the carry-out.
2. Decision: S ≥ m?
3. If yes, a second reversible adder adds the two's complement of m. That is
   ~m through Feynman gates, with the +1 entering as carry-in. The result is
   the residue.
4. If no, S is the residue.

The comparison comes for free from the carries. S ≥ m exactly when either of
these holds:

- the first adder carried out;
- the second adder, computing (S mod 2^N) + ~m + 1, carried out.

A 2-to-1 selection picks the output.

The inputs must be valid residues (a, b < m) and 1 ≤ m ≤ 2^N − 1. The output
is unspecified otherwise.

## Modular subtraction (`residue_subtractor`) — where this design departs

The modular subtractor computes `s = (a − b) mod m`:

1. A reversible subtractor forms D = a − b (mod 2^N) and a borrow.
2. If there is no borrow (a ≥ b), D is the residue.
3. Otherwise a reversible adder adds m to D. This wraps the negative
   difference back into 0 … m−1.

The flow this design follows draws the decision as "S > M", with the
unchanged difference on the "yes" branch. Read literally, that adds m to
every non-negative difference and gives a wrong residue. The RTL therefore
decides on the borrow. This is the only behavioural change from the flow as
drawn.

The default width is 16 bits, the size of the subtractor as it was
synthesised and simulated. The RNS channels use it at N = 4.

A published simulation trace of the 16-bit subtractor exists. Its operand
sequence is A = 7, 8, …, 14, B = 4, 5, …, 11, M = 0, 1, …, 7. The outputs it
shows are A + B. Those values are neither (A − B) mod M nor meaningful for
M ≤ A, so they are not used as reference values. The end-to-end test reuses
the A/B sequence with valid moduli.

## Conversions (`forward_converter`, `reverse_converter`)

Both converters use only modular additions. Their constants are computed at
elaboration by the functions in `rns_pkg`.

**Forward.** Since x = Σ x[k]·2^k, we have x mod m = Σ x[k]·(2^k mod m) mod m.

- Each channel sums the constants (2^k mod m) of the set bits of x.
- The sum uses a chain of four 4-bit residue adders working modulo m.
- Every 5-bit value converts correctly, including 30 and 31.

**Reverse.** This uses the Chinese remainder theorem:
z = Σ rᵢ·Wᵢ mod 30, with Wᵢ = (30/mᵢ)·((30/mᵢ)⁻¹ mod mᵢ).

- For {5, 3, 2} the weights are 6, 10 and 15.
- Each product rᵢ·Wᵢ is split over the bits of rᵢ. The 12 constant terms
  (Wᵢ·2^j mod 30) are summed by a chain of eleven 5-bit residue adders working
  modulo 30.
- The residues must be valid: rᵢ < mᵢ.

## Parameters and ports

| Item | Value | Where it comes from |
|---|---|---|
| Moduli `MODULI` | {5, 3, 2} | the set of the worked example (29 → 4, 2, 1) |
| Channel width `RES_W` | 4 | the 4-bit residue adder/subtractor |
| Dynamic range `DYN_RANGE` | 30 | product of the moduli |
| Binary width `BIN_W` | 5 | chosen: smallest width for 0..29 |
| `residue_adder` `N` | 4 | the 4-bit residue adder |
| `residue_subtractor` `N` | 16 | the synthesised 16-bit subtractor |
| `rev_adder`, `rev_subtractor` `N` | 4 | the 4-bit reversible adder/subtractor |

Changing the moduli means editing `NUM_CH`, `MODULI`, `DYN_RANGE` and
`BIN_W` together in `rns_pkg`. The moduli must be pairwise coprime. Each must
fit in `RES_W` bits. `DYN_RANGE` must fit in `BIN_W` bits and be below
2^`BIN_W`. The converters recompute their constants from these values.

`rns_top` ports:

- inputs `x`, `y` (5 bits);
- outputs `x_rns`, `y_rns`, `sum_rns`, `diff_rns` (3 × 4 bits);
- outputs `z_sum`, `z_diff` (5 bits);
- inputs `a16`, `b16`, `m16` and output `s16` (16 bits each).

## Choices not fixed by the source design

These are this design's own choices:

- The gate equations of the TSG and Feynman gates. These are the standard
  published definitions.
- How the subtractor is built from inverters and carry-in.
- Reading the comparison S ≥ m from carries.
- The use of Feynman gates as inverters.
- The algorithms of both converters.
- Producing the sum and the difference side by side. The source block diagram
  shows only the adder path.
- The 5-bit binary width.

The 16-bit subtractor takes the modulus as a 16-bit input, `m16`. The
synthesised original reports 48 pins, which covers only A, B and S; its
simulation trace, however, drives M as a signal, and that is followed here.

The Peres gate is named in the same family of reversible gates, but nothing
places it in this datapath. It is not included.

## Verification

Each module has a self-checking testbench in `tb/`. Each computes its
expected values independently, in plain integer arithmetic:

| Testbench | What it checks |
|---|---|
| `tb_tsg_gate` | all 16 inputs; output equations, full-adder behaviour, reversibility (all 16 outputs distinct) |
| `tb_feynman_gate` | all 4 inputs |
| `tb_rev_adder`, `tb_rev_subtractor` | exhaustive at 4 bits, random at 16 bits |
| `tb_residue_adder`, `tb_residue_subtractor` | every modulus 1..15 with every valid residue pair at 4 bits, random at 16 bits; both branches of the flow must occur |
| `tb_forward_converter` | all 32 inputs, including 29 → (4, 2, 1) |
| `tb_reverse_converter` | all 30 valid residue triples |
| `tb_rns_top` | all 900 pairs x, y in 0..29 at the default sizes, checking every intermediate residue and both binary results, then the 16-bit subtractor |

`tb_rns_top` also counts four events and fails if any never occurs:

- a channel sum reduced by its modulus;
- a channel difference that borrowed;
- a binary sum that wrapped;
- a binary difference that wrapped.

To run a testbench with Verilator, for example the top level:

```
verilator --binary --timing -Wall -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/rns_pkg.sv tb/tb_rns_top.sv --top-module tb_rns_top
./obj_dir/Vtb_rns_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. A
watchdog ends the run with a failure if it hangs.

For lint alone: `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv
rtl/rns_pkg.sv rtl/rns_top.sv`. The only warnings are the unused garbage
outputs of the reversible gates.
