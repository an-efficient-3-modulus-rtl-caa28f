// rns_r2b_converter: residue-to-binary converter for the moduli set (2^k + 1, 2^k, 2^k - 1).
//
// The input is a residue triple (r1, r2, r3) of a number X in [0, M), M = 2^k (2^{2k} - 1);
// the output is X in 3k bits. Because 2^k is one of the moduli, the low k bits of X are r2
// itself and only the high part [X / 2^k], a 2k-bit value below 2^{2k} - 1, needs arithmetic:
//   1. rns_operand_gen turns the residues into three 2k-bit words by wiring, inverters and
//      k OR gates;
//   2. eac_csa, a row of 2k full adders with its top carry wrapped to bit 0, reduces the three
//      words to two, modulo 2^{2k} - 1;
//   3. eac_adder, a carry look-ahead adder with end-around carry, adds the two;
//   4. zero_fix maps the all-ones code of zero to zero.
// X = {[X / 2^k], r2}. This is the structure of the published algorithm; the adder's internal network and
// the choice of a purely combinational block without registers are this design's own.
// Interface: r1 (k+1 bits, 0..2^k), r2 (k bits), r3 (k bits, 0..2^k-2; 2^k-1 is read as 0) in,
// x (3k bits) out. Combinational, no clock: a result is valid one propagation delay after the
// inputs, about one full adder, a 2k-bit carry look-ahead adder and two gate levels.
// Requires K >= 2. For r1 > 2^k the output is undefined.
module rns_r2b_converter #(
  parameter int unsigned K = 3     // the k of the moduli set
) (
  input  logic [K:0]     r1,       // residue modulo 2^k + 1
  input  logic [K-1:0]   r2,       // residue modulo 2^k
  input  logic [K-1:0]   r3,       // residue modulo 2^k - 1
  output logic [3*K-1:0] x         // binary value X
);
  localparam int unsigned W = 2 * K;

  logic [W-1:0] op_c, op_b, op_a;  // three operands, sum = [X / 2^k] modulo 2^W - 1
  logic [W-1:0] csa_sum, csa_carry;
  logic [W-1:0] adder_sum;         // [X / 2^k], all ones possible for zero
  logic [W-1:0] high;              // [X / 2^k]

  rns_operand_gen #(.K(K)) u_ops (
    .r1(r1), .r2(r2), .r3(r3), .op_c(op_c), .op_b(op_b), .op_a(op_a)
  );

  eac_csa #(.W(W)) u_csa (
    .x(op_c), .y(op_b), .z(op_a), .sum(csa_sum), .carry(csa_carry)
  );

  eac_adder #(.W(W)) u_add (
    .a(csa_sum), .b(csa_carry), .s(adder_sum)
  );

  zero_fix #(.W(W)) u_zero (
    .a(adder_sum), .d(high)
  );

  assign x = {high, r2};
endmodule
