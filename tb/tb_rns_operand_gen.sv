// tb_rns_operand_gen: self-check of the operand former at k = 3.
// For every X in [0, 504) the residues modulo 9, 8 and 7 are applied. The checks, computed
// with integer arithmetic modulo 63 rather than bit patterns:
//   op_a            = (2^5 + 2^2) * r3 mod 63                  (the A term)
//   op_c + op_b     = (2^5 + 2^2 - 1) * r1 - 2^3 * r2 mod 63     (C - r1 + B)
//   op_c+op_b+op_a  = floor(X / 8) mod 63
// plus the worked example r1 = 3, r2 = 3, whose two merged words are 14 and 4.
// One vector per clock; a watchdog ends a hung run.
module tb_rns_operand_gen;
  localparam int unsigned K = 3;
  localparam int MOD = (1 << (2 * K)) - 1;
  logic clk;
  logic [K:0] r1;
  logic [K-1:0] r2, r3;
  logic [2*K-1:0] op_c, op_b, op_a;
  int checks = 0, failures = 0;

  rns_operand_gen dut (.r1(r1), .r2(r2), .r3(r3), .op_c(op_c), .op_b(op_b), .op_a(op_a));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic int md(int v);
    int t = v % MOD;
    return (t < 0) ? t + MOD : t;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s r1=%0d r2=%0d r3=%0d c=%0d b=%0d a=%0d", what, r1, r2, r3, op_c, op_b, op_a);
    end
  endtask

  initial begin
    r1 = '0; r2 = '0; r3 = '0;
    for (int xv = 0; xv < ((1 << K) + 1) * (1 << K) * ((1 << K) - 1); xv++) begin
      @(posedge clk);
      r1 = (K+1)'(xv % ((1 << K) + 1));
      r2 = K'(xv % (1 << K));
      r3 = K'(xv % ((1 << K) - 1));
      #1;
      check(int'(op_a) == md(((1 << (2*K-1)) + (1 << (K-1))) * int'(r3)), "A");
      check(md(int'(op_c) + int'(op_b)) ==
            md(((1 << (2*K-1)) + (1 << (K-1)) - 1) * int'(r1) - (1 << K) * int'(r2)), "C-r1+B");
      check(md(int'(op_c) + int'(op_b) + int'(op_a)) == md(xv >> K), "X/2^k");
    end
    @(posedge clk);
    r1 = 3; r2 = 3; r3 = 0;
    #1;
    check(op_c == 6'd14 && op_b == 6'd4, "example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
