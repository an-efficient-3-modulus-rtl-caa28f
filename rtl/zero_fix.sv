// zero_fix: removes the redundant all-ones code for zero from a W-bit residue modulo 2^W - 1.
//
// A W-bit word holds numbers modulo 2^W - 1 with two codes for zero, all zeros and all ones.
// Let a be the AND of all input bits; every output bit is d_i = NOT(a) AND a_i, so all ones
// becomes all zeros and every other word passes unchanged. This is the published circuit.
// Interface: a in, d out. Combinational, one W-input AND plus one AND level, no clock.
module zero_fix #(
  parameter int unsigned W = 6     // word width, 2k
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] d
);
  logic all_ones;

  always_comb begin
    all_ones = &a;
    d        = a & {W{~all_ones}};
  end
endmodule
