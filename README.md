# Error-detecting AES S-box on redundant GF(2^4) arithmetic

This is an 8-bit S-box: multiplicative inversion in GF(2^8), with the AES
input map and affine map built in. Every stage carries concurrent error
detection. The inversion runs in the tower field GF((2^4)^2). Its GF(2^4)
arithmetic uses two *redundant* 5-bit representations of the 16-element
field. In these representations, squaring and basis changes cost nothing,
and the multiplier is only ten AND gates.

For error detection, the datapath is split into blocks. Each block has a
checker that predicts a parity (or two interleaved parities) of the block's
outputs from the block's inputs. It then compares the prediction with the
parity of what the block actually produced. A mismatch raises a flag. Several
properties of the redundant arithmetic make this cheap. Some signatures are
the constant 0. The predicted parities of the GF(2^4) multiplier and inverter
have short closed forms.

The RTL is synthesizable SystemVerilog. The datapath is combinational. The
top level puts one register in front of it and one behind it. The block
partition of the checker (7, 5, 4 or 3 blocks) and the signature kind
(parity or interleaved parity) are parameters.

## Number representations

Everything below depends on four representations, so they come first.

* **Tower field.** A byte `a = {h, l}` (h = a[7:4], l = a[3:0]) stands for
  `h*alpha^16 + l*alpha`. Here `{alpha, alpha^16}` is a normal basis of
  GF(2^8) over GF(2^4). alpha is a root of `X^2 + tau*X + nu` with
  `tau = beta + beta^4` and `nu = beta`.
* **GF(2^4) normal basis (NB), 4 bits.** beta is a root of the all-one
  polynomial `x^4+x^3+x^2+x+1`, so `beta^5 = 1`. Bit i of h stands for
  `beta^(i+1)`. The set {beta, beta^2, beta^3, beta^4} is the normal basis
  {beta, beta^2, beta^4, beta^8} in another order. Squaring is therefore a
  bit permutation: positions 1,2,3,4 go to 2,4,1,3.
* **Redundantly represented basis (RRB), 5 bits.** x stands for
  `sum x_i*beta^i`, i = 0..4. Since `1 + beta + ... + beta^4 = 0`, the vectors
  x and ~x are the same element. Converting from NB to RRB costs nothing:
  put a 0 at position 0.
* **Polynomial ring representation (PRR), 5 bits.** Same vector and same
  value, but only even-weight vectors are used. These are the elements of
  `GF(2)[x]/(x^5+1)` that vanish modulo x+1. The GF(2^4) inverter is correct
  only for inputs in this form.
* **Pair sums, 10 bits.** For an RRB vector x, the ten XORs `x_i ^ x_j`
  (i<j), in the order 01,02,03,04,12,13,14,23,24,34. They are identical for x
  and ~x, so they name the field element uniquely. The multiplier consumes
  operands in this form.

The RRB product is

    u0 = s14 t14 + s23 t23     u1 = s01 t01 + s24 t24     u2 = s02 t02 + s34 t34
    u3 = s03 t03 + s12 t12     u4 = s04 t04 + s13 t13     (sij = s_i + s_j)

This is the cyclic convolution `s*t mod x^5-1`, plus `sum s_i t_i` times the
all-one vector, and the all-one vector is zero in this basis.

## Datapath (`gf8_inv_core`)

Inversion uses `a^-1 = a^16 * (a^17)^-1`. Here `a^17` is the norm and lies
in GF(2^4), and `a^16 = l*alpha^16 + h*alpha` just swaps the halves.

| unit | module | in | out | what it does |
|---|---|---|---|---|
| M1 | `trans_matrix` | s (8) | a = {h,l} (8) | isomorphism from the AES polynomial basis to the tower normal basis |
| H, L | `pair_xor4` x2 | h, l (4) | H, L (6 each) | pair sums `h_i^h_j`, 1<=i<j<=4 |
| NBtoRRB | wiring in core | h,H / l,L | 10 bits each | pair sums of `{h,0}`: the 4 plain bits and the 6 H sums |
| Stage 1 | `stage1_pow17` | h, l, H, L | d (5, PRR) | `d = phi'(h*l) + phi''((h+l)^2)` = a^17 |
| Stage 2 | `stage2_inv4` | d | e (5, RRB) | e = d^-1 in GF(2^4), AND-OR form |
| F | `pair_xor5` | e | F (10) | pair sums of e |
| Stage 3 | `stage3_mul_rrb` x2 | pair sums | h' = e*l, l' = e*h (5 each) | RRB multiply, 10 AND + 5 XOR |
| M2 | `inv_trans_affine` | {h',l'} (10) | o (8) | inverse isomorphism merged with the AES affine matrix, then ^0x63 |

Notes on the parts that are least obvious:

* **Stage 1.** The NB product h*l is formed by the RRB formula above with
  coordinate 0 of both operands equal to 0. That formula uses the plain
  bits and the H/L sums. If coordinate 0 of the result is 1, the result is
  complemented to bring it back to 4 NB bits. phi' (5x4) multiplies by
  `tau^2` and phi'' (5x4) multiplies by `nu`. Both produce PRR. Every column
  of both matrices has even weight, so d always has even weight, whatever
  the input.
* **Stage 2**, with `|` for OR and `^` for XOR:
  `e0 = (d1|d4)(d2|d3)`,
  `e1 = ~d4(d1^d2) | d0 d4 (d2|d3)`,
  `e2 = ~d3(d2^d4) | d0 d3 (d1|d4)`,
  `e3 = ~d2(d1^d3) | d0 d2 (d1|d4)`,
  `e4 = ~d1(d3^d4) | d0 d1 (d2|d3)`.
  The output is correct for the 16 even-weight inputs and for 11111.
* **M2.** Each 5-bit half of each row has even weight. This makes the
  output independent of which of the two RRB forms h' and l' take.
* All four matrices (M1, M2, phi', phi'') are in `sbox_ed_pkg`. Each row is
  one output bit, and bit j of a row is the coefficient of input bit j.

The core was verified exhaustively against a reference that computes the
AES S-box directly: GF(2^8) inverse as a^254, then the affine map. All
256 inputs match.

## Error detection (`ed_checker`, `sig_pred_*`)

Each block compares the signature of its outputs with a signature predicted
from its inputs. In the predictions below, subscripts are bit numbers.

| block | predicted parity | predicted interleaved parities (even / odd output bits) |
|---|---|---|
| M1 | `s1^s2^s3^s4^s5^s6` | `s1` / `s2^..^s6` |
| H, L | parity(h) ^ parity(l): each bit is in 3 pair sums | (parity only) |
| NBtoRRB + Stage 1 | 0: pair sums of a 5-bit vector have even parity, and so does d | (parity only) |
| Stage 2 | `d1 d2 d3 ~(d0^d4) ^ ~d0 (d2 d3 d4 ^ d1 d3 d4 ^ d1 d2 d4)` | e0^e2^e4 / e1^e3, written out from the Stage 2 equations |
| F | 0 | (parity only) |
| Stage 3 | `sum_{i!=j} s_i t_j` per multiplier | `s0(t2+t4)+s1(t3+t4)+s2(t0+t3)+s3(t1+t2+t3+t4)+s4(t0+t1+t3+t4)` / `s0(t1+t3)+s1(t0+t2)+s2(t1+t4)+s3(t0+t3)+s4(t2+t4)` |
| M2 (+affine) | `a1^a2` of the 10-bit input | `a0^a1^a2^a3^a6^a7` / `a0^a3^a6^a7` |

Stage 3 sees its operands only as pair sums. The checker rebuilds each
operand as `(0, x0^x1, ..., x0^x4)`, which is x or ~x. Every bracket in the
Stage 3 predictions has an even number of terms, so the prediction does not
depend on which of the two it gets.

The partitions (`ED_BLOCKS`):

| value | blocks |
|---|---|
| 7 (default) | M1 / H,L / NBtoRRB+Stage 1 / Stage 2 / F / Stage 3 / M2 |
| 5 | M1+H,L / NBtoRRB+Stage 1 / Stage 2 / F+Stage 3 / M2 |
| 4 | M1 / H,L+NBtoRRB+Stage 1 / Stage 2 / F+Stage 3+M2 |
| 3 | M1+H,L+NBtoRRB+Stage 1 / Stage 2 / F+Stage 3+M2 |

A merged block needs a signature that can still be predicted from its
inputs. The choices made here:

* **M1 + H,L.** The parity of H and L is compared with the M1 prediction.
  This catches a fault on `a` because the H/L sums are then built from the
  wrong bits.
* **H,L + NBtoRRB + Stage 1.** The parity of the pair-sum part of the
  NBtoRRB outputs and d is compared with parity(a).
* **Blocks that end in M2.** The checker recomputes the two (or six) bits
  of {h',l'} on which the M2 parities depend, using its own copy of the pair
  sums of e and of two multipliers.

With `INTERLEAVED = 1`, two signatures are used only where interleaved
predictions exist (M1, Stage 2, Stage 3, M2 and the merged blocks that end
in them). The other blocks keep a single parity.

Each comparison is one XOR, and the block flags are ORed into `out_err`.
Hardening the comparator is not modelled.

## Top level (`sbox_ed_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, synchronous active-low reset |
| in_valid, in_byte | in | 1, 8 | input byte |
| fault_mask | in | 78 (`sbox_nodes_t`) | XOR onto the unit outputs; registered with the byte; tie to 0 |
| fi_en, fi_burst, fi_rate | in | 1, 3, 4 | built-in LFSR fault injector: enable, adjacent bits per fault, rate (inject when 4 LFSR bits < rate) |
| out_valid, out_byte | out | 1, 8 | S-box result, exactly 2 clock edges after the input |
| out_err | out | 1 | signature mismatch in any block |
| out_err_blk | out | 7 | bit b: block b+1 mismatched |
| out_fault | out | 1 | a non-zero fault mask acted on this result |

The top accepts one byte per cycle. The flag and the result are
registered together. An assertion states that a clean (fault-free) result
is never flagged.

`fault_lfsr` is a 32-bit external-feedback LFSR (x^32+x^22+x^2+x+1). It
places bursts of 1..7 adjacent flipped bits at pseudo-random node positions
and at pseudo-random intervals. It exists for evaluation. Both injection
paths disappear in synthesis when their inputs are tied to 0.

The node struct `sbox_nodes_t`, from MSB to LSB, is
a(8) H(6) L(6) NBtoRRB_h(10) NBtoRRB_l(10) d(5) e(5) F(10) h'(5) l'(5) o(8).

## Measured behaviour

`tb_sbox_ed_campaign` runs all eight configurations side by side on the
same inputs and the same LFSR fault stream. A fault is one injection into
one S-box evaluation. Coverage is the number of flagged injections divided
by the number of injections. A false alarm is a flag on a byte that came
out correct.

| config | single-bit: coverage | single-bit: false alarm | 1..4 adjacent bits: coverage | 1..4 adjacent bits: false alarm |
|---|---|---|---|---|
| 7 blocks, parity | 1.000 | 0.205 | 0.656 | 0.066 |
| 7 blocks, interleaved | 1.000 | 0.205 | 0.828 | 0.070 |
| 5 blocks, parity | 0.934 | 0.172 | 0.624 | 0.056 |
| 5 blocks, interleaved | 0.934 | 0.172 | 0.776 | 0.060 |
| 4 blocks, parity | 0.693 | 0.123 | 0.462 | 0.042 |
| 4 blocks, interleaved | 0.782 | 0.123 | 0.622 | 0.042 |
| 3 blocks, parity | 0.486 | 0.062 | 0.348 | 0.022 |
| 3 blocks, interleaved | 0.575 | 0.062 | 0.559 | 0.029 |

Each single-bit column comes from 35,000 injections, each multi-bit column
from 80,000.

The ordering matches what the construction is meant to give. More blocks
give more coverage and more false alarms, and interleaving helps against
adjacent-bit faults. With 7 blocks, every single-bit fault on any node is
caught.

The absolute numbers are not those published for this construction (about
99.9% coverage and 0.03-0.05% false alarms). The published campaign counted
faults over all 16 S-boxes of an AES SubBytes step, with a gate-level fault
model that is not fully specified. The model here is harsher: every
injection hits exactly one node of one S-box, including nodes whose value is
often masked, such as an F pair sum that is ANDed with 0. Those masked faults
are most of the false alarms in the table.

## Where this RTL departs from, or adds to, the published construction

* **Interleaved parities of Stage 2.** These are written out directly
  from the Stage 2 equations (e0^e2^e4 and e1^e3 as functions of d), not
  taken in a minimized closed form. They were checked exhaustively against
  the inverter. The single parity uses the compact closed form, which is
  exact for all 32 inputs.
* **Stage 1 internals.** How h*l is formed from h, l, H, L, and the squaring
  permutation, are this design's own. The published construction gives
  only `phi'hl + phi''(h+l)^2` and the two matrices. Both matrices were
  checked to multiply by tau^2 and nu.
* **Signatures not given by the construction.** The H/L, NBtoRRB and F
  signatures, and all signatures of merged blocks (5/4/3 partitions and the
  4-block variant), are derived here.
* **Wiring of Stage 3.** `h' = e*l` and `l' = e*h` follow from the algebra.
  The bit layout is h = a[7:4], l = a[3:0], with h' in the upper half of the
  10-bit inverse. With these choices, M1 and M2 as published reproduce the
  AES S-box exactly.
* **Additions.** The affine constant 0x63 comes from the AES definition.
  The I/O registers, the reset, the fault-injection ports and the LFSR rules
  are additions.
* **Not included.** Error detection for the AES linear layers (described
  only in outline). The AES round and key schedule around the S-box. The
  comparison designs. The 65-nm synthesis results.

## Files

* `rtl/sbox_ed_pkg.sv`: node struct, matrices, pair-index helpers
* `rtl/trans_matrix.sv`, `pair_xor4.sv`, `stage1_pow17.sv`,
  `stage2_inv4.sv`, `pair_xor5.sv`, `stage3_mul_rrb.sv`,
  `inv_trans_affine.sv`: the datapath units
* `rtl/gf8_inv_core.sv`: the datapath with fault-injection XORs on each
  unit output
* `rtl/sig_pred_inv4.sv`, `sig_pred_mul.sv`, `ed_checker.sv`: the error
  detection
* `rtl/fault_lfsr.sv`, `rtl/sbox_ed_top.sv`: the injector and the top level
* `tb/tb_gf_ref_pkg.sv`: reference arithmetic (AES field, GF(2^4) in
  polynomial basis, tower field), independent of the design's formulas
* `tb/tb_<module>.sv`: a self-checking test per module
* `tb/tb_sbox_ed_top.sv`: end-to-end test at default parameters
* `tb/tb_sbox_ed_campaign.sv`: the fault campaigns above

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example:

    verilator --binary --timing --assert -y rtl -y tb --top-module tb_sbox_ed_top \
        rtl/sbox_ed_pkg.sv tb/tb_gf_ref_pkg.sv tb/tb_sbox_ed_top.sv
    ./obj_dir/Vtb_sbox_ed_top

To run a different test, substitute its file and module name. Each test
finishes in seconds. For a lint run:

    verilator --lint-only -Wall -y rtl rtl/sbox_ed_pkg.sv rtl/sbox_ed_top.sv

The remaining lint warnings are unused bits: the parity predictions depend
on only some bits of their inputs.

Change `ED_BLOCKS` / `INTERLEAVED` on `sbox_ed_top` to pick a partition and
signature kind. For production, tie `fault_mask`, `fi_en` and `fi_rate` to 0.
