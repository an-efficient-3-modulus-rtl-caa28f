// tb_eac_csa: exhaustive self-check of the end-around-carry carry-save row at 6 bits.
// For every triple (x, y, z) it checks that the sum word is the bitwise parity of the three
// operands and that sum + carry equals x + y + z modulo 2^6 - 1. It also counts the triples in
// which the top carry wraps to bit 0, and fails if none did. One triple per clock; a watchdog
// ends a hung run.
module tb_eac_csa;
  localparam int unsigned W = 6;
  localparam int unsigned MOD = (1 << W) - 1;
  logic clk;
  logic [W-1:0] x, y, z, sum, carry;
  int checks = 0, failures = 0;
  int wraps = 0;

  eac_csa dut (.x(x), .y(y), .z(z), .sum(sum), .carry(carry));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    x = '0; y = '0; z = '0;
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++)
        for (int k = 0; k < (1 << W); k++) begin
          @(posedge clk);
          x = W'(i); y = W'(j); z = W'(k);
          #1;
          checks++;
          if (carry[0]) wraps++;
          if (sum !== (x ^ y ^ z) || ((int'(sum) + int'(carry)) % MOD) != ((i + j + k) % MOD)) begin
            failures++;
            if (failures < 10) $display("FAIL x=%0d y=%0d z=%0d sum=%0d carry=%0d", x, y, z, sum, carry);
          end
        end
    if (wraps == 0) begin failures++; $display("no wrapped carry exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
