// eac_csa: carry-save reduction of three W-bit numbers to two, modulo 2^W - 1.
//
// A row of W full adders; the bits of equal weight of the three operands enter one adder. The
// carry of adder i has weight 2^(i+1) and is moved one place to the left. The carry of the most
// significant adder would have weight 2^W, and since 2^W = 1 modulo 2^W - 1 it is wrapped round
// to bit 0 (end-around carry). The outputs therefore satisfy
//   (sum + carry) mod (2^W - 1) = (x + y + z) mod (2^W - 1).
// The row and the wrapped carry are as the converter's structure prescribes; W is generic.
// Interface: x, y, z in; sum and the already-shifted carry word out. Combinational, one
// full-adder delay, no clock.
module eac_csa #(
  parameter int unsigned W = 6     // operand width, 2k
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry      // carry word, bit 0 holds the carry of bit W-1
);
  logic [W-1:0] cout;             // carry of the full adder in each position

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.x(x[i]), .y(y[i]), .z(z[i]), .s(sum[i]), .c(cout[i]));
  end

  // Rotate the carries one place left: position i+1 gets carry i, position 0 gets carry W-1.
  assign carry = {cout[W-2:0], cout[W-1]};
endmodule
