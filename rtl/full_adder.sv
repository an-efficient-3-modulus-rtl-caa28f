// full_adder: one-bit full adder, the cell of the carry-save row.
//
// Adds three bits of equal weight and returns a sum bit of the same weight and a carry bit of
// twice the weight. Purely combinational, no clock. The converter uses 2k of these side by side
// to reduce three 2k-bit operands to two.
module full_adder (
  input  logic x,    // operand bit
  input  logic y,    // operand bit
  input  logic z,    // operand bit
  output logic s,    // sum bit, weight 1
  output logic c     // carry bit, weight 2
);
  always_comb begin
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
  end
endmodule
