# Mixed radix conversion for Fermat moduli in diminished-1 carry-save arithmetic

A residue number system (RNS) holds an integer X as its remainders r_i = X mod m_i
for a set of coprime moduli. Arithmetic on residues is fast and needs no carries
between them. Comparing magnitudes, detecting overflow or checking redundant residues
for errors is not possible that way, though. Those jobs need the weighted mixed radix
form of X:

    X = a1 + a2*m1 + a3*m1*m2,      0 <= a_i < m_i

Mixed radix conversion (MRC) computes the digits one after another:

    a1 = r1
    a2 = (r2 - a1) * |m1^-1|_m2                       mod m2
    a3 = ((r3 - a1) * |m1^-1|_m3 - a2) * |m2^-1|_m3   mod m3

This RTL computes the conversion for three Fermat moduli m_i = 2^n_i + 1, for example
{3, 5, 17} or {17, 257, 65537}. Built directly, every subtraction and every
multiplication by an inverse would end in a carry-propagate adder. Each one would also
need extra logic for the value zero. This design keeps every intermediate value in a
redundant form, a *diminished-1 carry-save pair*, so that:

- subtraction becomes bit inversion plus a 4:2 compressor;
- multiplication by a constant becomes wiring, inverters and 4:2 compressors;
- no stage needs zero detection;
- carries propagate only in the three final adders, one per digit.

The whole converter is combinational: no clock, no registers, no reset.

## Diminished-1 carry-save numbers

This number format is what makes the design work, and the rest of this file relies on it.

**Diminished-1 (Dim1).** An n-bit pattern d modulo 2^n+1 stands for the value d+1.
The patterns 0 to 2^n-1 therefore cover the values 1 to 2^n, where 2^n means -1.
Plain Dim1 needs a separate flag for zero. The pair form below does not.

**Carry-save pair.** A pair of n-bit Dim1 patterns (s, c) stands for

    X = (s + 1) + (c + 1)   mod 2^n + 1

Every one of the 2^2n bit combinations is a legal pair, and zero is just one of the
values a pair can hold. For example, s = 1111 and c = 0000 gives 16 + 1 = 17 ≡ 0
(mod 17). Three operations are cheap on Dim1 patterns:

| operation | on a Dim1 pattern d (value V = d+1) | cost |
|---|---|---|
| negate, V -> -V | invert every bit: ~d + 1 = 2^n - d ≡ -(d+1) | n inverters |
| double, V -> 2V | rotate left one place, inverting the bit that wraps to bit 0 (2^n ≡ -1) | one inverter |
| add | full adders; the carry leaving bit n-1 has weight 2^n ≡ -1, so it re-enters bit 0 inverted | one full-adder row |

A 3:2 carry-save stage built this way maps three Dim1 operands to two Dim1 operands
with the same sum. The inverted end-around carry contributes a constant -1. That -1
exactly cancels the one surplus "+1" offset (three operands carry +3, two carry +2),
so no correction constant is ever needed.

**Binary residues in and out.** A binary residue r in 0..2^n (n+1 bits) becomes a
pair with one inverter:

    s = r[n-1:0],   c = {ones, ~r[n]}

For example, 13 mod 17 gives s = 1101, c = 1111 (14 + 16 = 30 ≡ 13), and 16 mod 17
gives s = 0000, c = 1110 (1 + 15). At the end, a pair goes back to binary through a
modulo 2^n+1 adder and an increment (`dim1_add_conv`).

## Dataflow of the converter

Each box below is one instance in `mrc3_dim1cs`. Each arrow carries a carry-save pair,
except the binary outputs a1, a2 and a3.

```
(s1,c1) ─┬─────────────────────────────── Add/Conv ──> a1
         ├─ Add_Inv(m1→m2) ─┐
         │      (s2,c2) ────┴ 4:2 ─ Mult_Inv×|m1^-1|_m2 ─┬─ Add/Conv ──> a2
         │                                               └─ Add_Inv(m2→m3) ─┐
         └─ Add_Inv(m1→m3) ─┐                                               │
                (s3,c3) ────┴ 4:2 ─ Mult_Inv×|m1^-1|_m3 ────────────────────┴ 4:2 ─ Mult_Inv×|m2^-1|_m3 ─ Add/Conv ──> a3
```

Digit 3 uses the carry-save form of a2, taken at the Mult_Inv output *before* a2's
adder. So the longest path contains only one carry-propagate adder. The three inverse
constants are computed at elaboration from the exponents (`fermat_pkg::mod_inverse`).

## The units

### Add_Inv: negating a residue into a larger modulus (`dim1_add_inv`)

To form r2 - a1 modulo m2, we need -a1 modulo m2. But a1 is only known as a pair
modulo the *smaller* modulus m1, and a pair's integer value x = s + c + 2 is not
reduced: it lies in [2, 2*m1 - 2]. So the residue is r = x - k*m1, with k equal to 0
or 1. Then

    -r ≡ -(s+1) - (c+1) + k*m1      (mod m2)

which is computed as

    p = {ones,    ~s}     value 2^n2 - s = -(s+1)
    q = {~k ... , ~c}     value -(c+1) if k = 0, and 2^n1 - c = -(c+1) + m1 if k = 1

Adding the constant m1 costs nothing beyond k, which is the carry out of s + c + 1 over
n1 bits. A prefix tree computes k, so the delay grows as log2 n1. The rest of the unit
is inverters and constant bits: the upper bits of p are always 1.

### 4:2 Comp (`dim1_csa42`)

This is two modulo 2^n+1 carry-save stages (`dim1_csa32`). It turns four Dim1 operands
into one pair with the same sum modulo 2^n+1, in two full-adder delays. In the
converter, the operands are one residue's pair plus the pair for the other residue's
negation, so the output is their difference.

### Mult_Inv: multiplying by a constant inverse (`dim1_mult_inv`)

The constant K (parameter, 1..2^n) is recoded at elaboration into radix-4 Booth digits
d_j ∈ {-2,-1,0,1,2}. Each nonzero digit turns each half of the input pair into one
Dim1 partial product: the half multiplied by 2^(2j), or 2^(2j+1) when |d_j| = 2
(rotations with inverted wrap), inverted for a negative digit. Zero digits produce
nothing. A tree of `dim1_csa42` reduces the 2×(nonzero digits) partial products to two,
which form the output pair. The unit contains no adder.

| set | \|m1^-1\|_m2 | \|m1^-1\|_m3 | \|m2^-1\|_m3 |
|---|---|---|---|
| {3,5,17} | 2 | 6 | 7 |
| {5,17,257} | 7 | 103 | 121 |
| {5,17,65537} | 7 | 26215 | 30841 |
| {5,257,65537} | 103 | 26215 | 32641 |
| {17,257,65537} | 121 | 30841 | 32641 |

### Add/Conv (`dim1_add_conv`)

This is a Kogge-Stone parallel-prefix adder modulo 2^n+1. The inverted carry out is
folded into each bit's carry as G[i-1:0] | P[i-1:0]·~Cout. The adder produces the
Dim1 sum d. Conversion to binary then gives:

- a = 0 when every bit propagates (s + c = 2^n - 1, the value zero);
- a = d + 1 otherwise.

The output is n+1 bits wide, with range 0..2^n.

## Interfaces

`mrc3_top #(N1, N2, N3)` is the top level. It takes weighted binary residues:

| port | dir | width | meaning |
|---|---|---|---|
| r1, r2, r3 | in | N_i+1 | X mod (2^N_i + 1), range 0..2^N_i |
| a1, a2, a3 | out | N_i+1 | mixed radix digits, X = a1 + a2·m1 + a3·m1·m2 |

`mrc3_dim1cs` is the same converter without the input encoders, for residues that are
already carry-save pairs (`s1, c1, s2, c2, s3, c3`, each N_i bits wide).

The defaults are N = (1, 2, 4), the moduli {3, 5, 17}. The other evaluated sets are
reached by parameters:

| set | N1 | N2 | N3 |
|---|---|---|---|
| {5,17,257} | 2 | 4 | 8 |
| {5,17,65537} | 2 | 4 | 16 |
| {5,257,65537} | 2 | 8 | 16 |
| {17,257,65537} | 4 | 8 | 16 |

The parameters must satisfy N1 < N2 < N3, which elaboration checks. N up to 30 is
supported by the elaboration arithmetic.

**Timing.** The converter is purely combinational. The outputs are valid one
propagation delay after the inputs change. The critical path runs through digit 3 and
contains:

1. an Add_Inv;
2. three levels of 4:2 compressors plus the two multiplier trees;
3. one carry-propagate adder.

Register the ports externally if the converter sits in a clocked pipeline.

## Files

| file | contents |
|---|---|
| `rtl/fermat_pkg.sv` | elaboration-time functions: modulus, modular inverse, Booth digit |
| `rtl/dim1cs_encode.sv` | binary residue → carry-save pair |
| `rtl/dim1_csa32.sv`, `rtl/dim1_csa42.sv` | modulo 2^n+1 3:2 and 4:2 compressors |
| `rtl/dim1_add_inv.sv` | cross-modulus additive inverse |
| `rtl/dim1_mult_inv.sv` | Booth-recoded constant multiplier |
| `rtl/dim1_add_conv.sv` | prefix adder and conversion to binary |
| `rtl/mrc3_dim1cs.sv` | the converter on carry-save inputs |
| `rtl/mrc3_top.sv` | top level with binary residue inputs |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mrc3_workloads` |

## Verification

Every testbench compares the design with plain integer arithmetic. None of them uses
the converter's own algorithm. The digit references are X mod m1, (X / m1) mod m2 and
X / (m1·m2). Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_dim1cs_encode` | every residue at n = 1 and 4, a sample at n = 16; the exact bit patterns for 13 and 16 mod 17 |
| `tb_dim1_csa42` | exhaustive at n = 1 and 4, random at n = 16 |
| `tb_dim1_add_conv` | exhaustive at n = 1 and 4, random at n = 16, including zero and 2^n results |
| `tb_dim1_add_inv` | exhaustive for (n_i, n_j) = (1,2), (2,4), (4,16), (8,16); counts the k = 1 correction |
| `tb_dim1_mult_inv` | K = 2, 6, 7, 16 (= -1), 1, 255, 32641, 12345: exhaustive up to n = 8, random at n = 16 |
| `tb_mrc3_dim1cs` | all 2^14 carry-save input patterns of {3,5,17}; random redundant pairs for {5,17,257} |
| `tb_mrc3_top` | defaults, no overrides: all 255 values of X. Fails unless it sees a 2^n input, an Add_Inv correction, a zero digit and a 2^n digit |
| `tb_mrc3_workloads` | all five moduli sets, 20,000 random X each plus 0 and M-1 |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fermat_pkg.sv tb/tb_mrc3_top.sv --top-module tb_mrc3_top -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second.

## How far this follows the published architecture, and what is this design's own

These parts follow the published architecture:

- the dataflow of the twelve units;
- carrying a2 into digit 3 in carry-save form;
- the input encoding with one inverter;
- the 4:2 compressor in two full-adder delays;
- Booth-recoded constant multipliers whose partial products feed 4:2 compressors;
- a parallel-prefix modulo 2^n+1 adder followed by conversion, used only at the outputs.

These parts are this design's own choices:

- **Add_Inv.** The architecture says only that a known constant is added to form the
  inverse in the other modulus. The exact k-controlled split above was worked out here.
  It has been verified exhaustively, but its gate count may differ from the original.
- **Booth radix.** Radix 4 is assumed.
- **Compressor tree shape.** The tree groups operands four at a time, level by level.
- **Prefix network.** Kogge-Stone is assumed.
- **Increment.** The conversion's increment is written as `+ 1` and left to synthesis.
- **No pipelining.** None is described, so none is added.

The published comparison is measured in gate equivalents and in synthesis results for
a 130 nm library. This RTL is behavioural-structural and has not been mapped to gates,
so those area and delay figures are not reproduced. The published comparison is
against a two's-complement converter built from multi-operand modular adders; that
baseline is not included.

## Changing it

- **Another moduli set.** Set N1 < N2 < N3; the inverses follow automatically.
- **More than three moduli.** Digit i needs, for each earlier digit j:
  1. an Add_Inv from m_j into m_i;
  2. a 4:2 compressor;
  3. a Mult_Inv by |m_j^-1|_m_i.

  Feed each earlier digit's carry-save form, not its binary output, into the later
  chains. Copy the digit-3 pattern of `mrc3_dim1cs`.
- **Pipelining.** Registers can be placed on any carry-save pair. Every arrow in the
  dataflow diagram is a legal cut.
