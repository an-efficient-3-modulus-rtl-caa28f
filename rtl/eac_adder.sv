// eac_adder: W-bit carry look-ahead adder with end-around carry, i.e. an adder modulo 2^W - 1.
//
// The converter needs a fast W-bit binary adder whose carry-out is connected to its carry-in.
// This implementation is a parallel-prefix (Kogge-Stone) carry look-ahead adder. Wiring the
// carry-out literally back to the carry-in would form a combinational loop, so the feedback is
// resolved inside the prefix network instead: the group generate of all W bits is exactly the
// carry-out the adder would produce with carry-in 0, and it is applied as the carry-in through
// one extra AND-OR level, c_i = G[i-1:0] | (P[i-1:0] & G[W-1:0]). When a + b = 2^W - 1 the group
// generate is 0 and the result is all ones, the second code for zero; the zero_fix stage that
// follows removes it. The published algorithm asks only for a fast adder with its carry-out fed back; the
// choice of a Kogge-Stone network is this design's own.
// Interface: a, b in; s = (a + b) mod (2^W - 1) out, all ones allowed for zero.
// Combinational, about log2(W) + 3 gate levels, no clock.
module eac_adder #(
  parameter int unsigned W = 6     // operand width, 2k
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;   // prefix levels

  logic [W-1:0] gp [0:L];          // group generate after each prefix level
  logic [W-1:0] pp [0:L];          // group propagate after each prefix level
  logic [W-1:0] h;                 // half sums a ^ b
  logic         eac;               // end-around carry, the carry-out fed back to bit 0
  logic [W-1:0] c;                 // carry into each bit

  always_comb begin
    h     = a ^ b;
    gp[0] = a & b;
    pp[0] = h;
    // Kogge-Stone: after level l, position i covers bits i down to max(0, i - 2^(l+1) + 1).
    for (int unsigned l = 0; l < L; l++) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          gp[l+1][i] = gp[l][i] | (pp[l][i] & gp[l][i - (1 << l)]);
          pp[l+1][i] = pp[l][i] & pp[l][i - (1 << l)];
        end else begin
          gp[l+1][i] = gp[l][i];
          pp[l+1][i] = pp[l][i];
        end
      end
    end
    eac  = gp[L][W-1];
    c[0] = eac;
    for (int unsigned i = 1; i < W; i++) begin
      c[i] = gp[L][i-1] | (pp[L][i-1] & eac);
    end
    s = h ^ c;
  end
endmodule
