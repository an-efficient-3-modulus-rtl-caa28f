// rns_operand_gen: forms the three 2k-bit operands whose sum modulo 2^{2k} - 1 is [X / 2^k].
//
// For the moduli (2^k + 1, 2^k, 2^k - 1) the Chinese remainder theorem reduces to
//   [X / 2^k] = | (C - r1) + B + A |  modulo 2^{2k} - 1,
// with C - r1 = (-2^{2k-1} + 2^{k-1}) r1, B = -2^k r2 and A = (2^{2k-1} + 2^{k-1}) r3, all taken
// modulo 2^{2k} - 1. Modulo 2^{2k} - 1 a product by 2^m is an m-place left rotation and a negation
// is a ones complement, so each term is a rotated, partly inverted copy of its residue. The four
// words that C - r1 and B give are merged, as the published algorithm derives, into two: with
// r1 = c_k..c_0 and r2 = b_{k-1}..b_0,
//   op_c = ~c0 , (c_{k-1} | c_k) .. (c_0 | c_k) , ~c_{k-1} .. ~c_1
//   op_b = b_{k-1} , ~b_{k-2} .. ~b_0 , ~b_{k-1} , b_{k-1} (k-1 copies)
// (most significant bit first). The merge relies on c_k = 1 only when r1 = 2^k, so r1 must be a
// proper residue, 0..2^k. A needs no logic: (2^{2k-1} + 2^{k-1}) r3 = 2^{k-1} (2^k + 1) r3 is the
// word {r3, r3} rotated left k-1 places, equivalently right one place. That wiring of A is this
// design's own working of the formula for A.
// Interface: r1 (k+1 bits), r2, r3 (k bits) in; op_c, op_b, op_a (2k bits) out.
// Combinational: k OR gates and inverters only, no clock. Requires K >= 2.
module rns_operand_gen #(
  parameter int unsigned K = 3     // the k of the moduli set
) (
  input  logic [K:0]     r1,       // residue modulo 2^k + 1
  input  logic [K-1:0]   r2,       // residue modulo 2^k
  input  logic [K-1:0]   r3,       // residue modulo 2^k - 1
  output logic [2*K-1:0] op_c,     // merged C - r1 term
  output logic [2*K-1:0] op_b,     // merged B term
  output logic [2*K-1:0] op_a      // A term
);
  localparam int unsigned W = 2 * K;

  logic [2*K-1:0] r3_twice;

  always_comb begin
    // op_c: ~c0 on top, c_i | c_k at bits k-1+i, ~c_i at bits i-1.
    op_c[W-1] = ~r1[0];
    for (int unsigned i = 0; i < K; i++) op_c[K-1+i] = r1[i] | r1[K];
    for (int unsigned i = 1; i < K; i++) op_c[i-1]   = ~r1[i];

    // op_b: b_{k-1} on top, ~b_i at bits k+i, ~b_{k-1} at bit k-1, b_{k-1} below.
    op_b[W-1] = r2[K-1];
    for (int unsigned i = 0; i + 1 < K; i++) op_b[K+i] = ~r2[i];
    op_b[K-1] = ~r2[K-1];
    for (int unsigned i = 0; i + 1 < K; i++) op_b[i]   = r2[K-1];

    // op_a: {r3, r3} rotated right by one place.
    r3_twice = {r3, r3};
    op_a     = {r3_twice[0], r3_twice[W-1:1]};
  end
endmodule
