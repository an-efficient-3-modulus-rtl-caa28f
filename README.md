# Residue-to-binary converter for the moduli set (2^k + 1, 2^k, 2^k − 1)

A residue number system (RNS) holds an integer X as its remainders modulo a few pairwise
coprime moduli. Addition and multiplication then work on each remainder independently, with no
carries between them. Turning the remainders back into an ordinary binary number is the hard
part. This RTL does that conversion for the popular three-modulus set

    m1 = 2^k + 1,   m2 = 2^k,   m3 = 2^k − 1,   dynamic range M = 2^k (2^{2k} − 1).

It is a single combinational block. The arithmetic is one row of full adders and one 2k-bit
adder. Everything else is wiring, inverters and k OR gates.

## The idea in one paragraph

Since 2^k is one of the moduli, the low k bits of X are simply r2. Only the high part,
H = ⌊X / 2^k⌋ (a value below 2^{2k} − 1), needs computing. Applying the Chinese remainder
theorem to this set gives

    H = | (C − r1) + B + A |  mod (2^{2k} − 1)
    C − r1 = (−2^{2k−1} + 2^{k−1}) · r1
    B      = −2^k · r2
    A      = (2^{2k−1} + 2^{k−1}) · r3

with every product taken modulo 2^{2k} − 1. Two facts make this cheap on a 2k-bit word:

* 2^{2k} ≡ 1, so multiplying by 2^m is an m-place **left rotation**.
* The negative of a value is its **ones' complement**.

Each term is therefore a rotated and partly inverted copy of one residue. Taken literally,
C − r1 and B give four words. Because of the special shape of the residues, those four words
merge into two, leaving only three words to add modulo 2^{2k} − 1. Then X = {H, r2}.

## Forming the three operands (`rns_operand_gen`)

This is the part that needs the most explanation. Write r1 = c_k c_{k−1} … c_0 (k + 1 bits) and
r2 = b_{k−1} … b_0. The two merged words are listed below, most significant bit first, each 2k
bits wide:

    op_c = ~c0 | (c_{k−1} | c_k) … (c_0 | c_k) | ~c_{k−1} … ~c_1
              1 bit        k bits                   k−1 bits
    op_b = b_{k−1} | ~b_{k−2} … ~b_0 | ~b_{k−1} | b_{k−1} … b_{k−1}
              1 bit      k−1 bits        1 bit       k−1 bits

Why the merges are exact:

* **−2^{2k−1}·r1** is r1 rotated right by one place and then inverted. **2^{k−1}·r1** is r1
  shifted into bits 2k−1 … k−1. Their constant-one bits and c_k can be moved into a second word.
  The −2^k·r2 term adds the word 0…0 1…1 (k ones). Adding that to the second word gives
  1 c_k…c_k 1…1.
* A residue modulo 2^k + 1 has **c_k = 1 only when r1 = 2^k**, and then every other bit is 0.
  So the k copies of c_k can be ORed into the matching bits of the first word. No adder is
  needed.
* The remaining constant 1 0…0 1…1 and the word ~b_{k−1}…~b_0 0…0 have no two ones in the same
  position except at the top. The top carry wraps round to bit 0 and ripples through the low
  ones, which leaves op_b as above.

Worked example, k = 3, r1 = 3, r2 = 3:

    op_c = 001110 = 14
    op_b = 000100 = 4
    14 + 4 = 18 = (35·3 − 8·3) mod 63

The third operand needs no logic. A = 2^{k−1} (2^k + 1) · r3, and (2^k + 1) · r3 is the word
{r3, r3}. So

    op_a = {r3, r3} rotated right by one place

The document does not print this bit pattern. It follows directly from the formula for A.

## Adding three words modulo 2^{2k} − 1

* **`eac_csa`**: a row of 2k `full_adder` cells, one per bit position. Each cell takes the three
  operand bits of its weight. Carry i moves to position i + 1. The carry out of the top cell
  would have weight 2^{2k} ≡ 1, so it goes to bit 0 (end-around carry). The result is two words
  with the same sum modulo 2^{2k} − 1.
* **`eac_adder`**: a 2k-bit adder whose carry-out feeds its carry-in. Wiring that literally would
  create a combinational loop. Instead, this design uses a Kogge-Stone parallel-prefix
  carry-look-ahead network and applies the feedback as one extra prefix level:

      eac = G[2k−1:0]
      c_i = G[i−1:0] | (P[i−1:0] & eac)

  G[2k−1:0] is exactly the carry-out the adder gives with carry-in 0. When a + b = 2^{2k} − 1,
  the result is all ones, which is the second code for zero.
* **`zero_fix`**: the document's redundancy removal. Let a = AND of all 2k adder bits. Each
  output bit is d_i = ~a & a_i, so all ones becomes zero and every other word passes unchanged.

The critical path is the operand inverters/ORs, one full adder, the prefix adder (about
log2(2k) + 3 gate levels) and the zero fix.

## Interface (`rns_r2b_converter`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `r1` | in  | K+1   | residue modulo 2^K + 1. Must be 0 … 2^K. |
| `r2` | in  | K     | residue modulo 2^K |
| `r3` | in  | K     | residue modulo 2^K − 1. 0 … 2^K − 2; the value 2^K − 1 is also read as 0. |
| `x`  | out | 3K    | X in [0, 2^K (2^{2K} − 1)). `x[K-1:0]` equals `r2`. |

* Parameter `K` (`int unsigned`, default 3). K must be at least 2.
* There is no clock or reset. The output is valid one propagation delay after the inputs
  change. Add registers around the block if a pipeline is needed.
* If r1 > 2^K, the output is meaningless: the OR merge relies on r1 being a proper residue.

## Where this RTL goes beyond the source algorithm

These follow the published algorithm:

* the operand formulas
* the carry-save row with wrapped carry
* the adder with its carry fed back
* the all-ones zero fix

These are this design's own choices:

* the Kogge-Stone network inside the adder (the source asks only for a fast carry-look-ahead
  adder)
* how the carry feedback is resolved without a loop
* the wiring for A
* the default K = 3, which is the size of the source's worked example
* the fully combinational form

The source's cost comparison is analytic (full-adder delays and areas) and is not reproduced
here.

## Files

| file | content |
|------|---------|
| `rtl/rns_r2b_converter.sv` | top: operand former → carry-save row → end-around adder → zero fix |
| `rtl/rns_operand_gen.sv` | the three 2k-bit operands |
| `rtl/eac_csa.sv`, `rtl/full_adder.sv` | carry-save row with end-around carry |
| `rtl/eac_adder.sv` | parallel-prefix adder modulo 2^W − 1 |
| `rtl/zero_fix.sv` | all-ones → zero |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/r2b_sweep.sv` | helper that checks one converter size against a reference |

## Verification and how far to trust it

Each testbench computes its expected values with plain integer arithmetic (the `%` operator and
sums modulo 2^{2k} − 1), not by copying the bit patterns. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_rns_r2b_converter`: every X of the default size (k = 3, 504 values), plus r3 = 7 as the
  second zero code. It also counts each mechanism and fails if one never fires:
  * r1 = 2^k
  * a wrapped carry in the carry-save row
  * an end-around carry in the adder
  * the zero fix
* `tb_rns_r2b_sizes`: every X for k = 2, 4 and 5 (up to 32 736 values), plus edge and 20 000
  random values each for k = 8, 12 and 16.
* `tb_rns_operand_gen`: checks A, C − r1 + B and their total modulo 63 separately for all
  504 inputs, plus the worked example.
* `tb_eac_csa`: all 262 144 triples at 6 bits.
* `tb_eac_adder`: all pairs at 6 bits and random pairs at 16 bits, with the exact expected code.
* `tb_zero_fix`: all 64 words.

Each testbench has been shown to fail on a deliberately broken copy of its module.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_rns_r2b_converter \
              tb/tb_rns_r2b_converter.sv -o sim && ./obj_dir/sim

To build another size, set `K` on `rns_r2b_converter`. All internal widths follow from it.
