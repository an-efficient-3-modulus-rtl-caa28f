// tb_rns_r2b_converter: end-to-end check of the converter at its default size, k = 3.
// Every X in [0, 504) is reduced to its residues modulo 9, 8 and 7 by the testbench and fed to
// the converter, which must return X. Where r3 = 0 the vector is repeated with r3 = 7, the
// second code of zero modulo 7. The run also counts how often each mechanism of the converter
// is used and fails if one never is:
//   r1 = 2^k (the only residue with c_k = 1, handled by the OR merge),
//   a carry wrapped round the carry-save row, an end-around carry in the adder,
//   and the all-ones adder result that the zero fix clears.
// One vector per clock; a watchdog ends a hung run.
module tb_rns_r2b_converter;
  localparam int unsigned K = 3;
  localparam int unsigned M1 = (1 << K) + 1, M2 = 1 << K, M3 = (1 << K) - 1;
  localparam int unsigned W = 2 * K;
  logic clk;
  logic [K:0] r1;
  logic [K-1:0] r2, r3;
  logic [3*K-1:0] x;
  int checks = 0, failures = 0;
  int n_ck = 0, n_csa_wrap = 0, n_add_wrap = 0, n_zero_fix = 0, n_r3_alt = 0;

  rns_r2b_converter dut (.r1(r1), .r2(r2), .r3(r3), .x(x));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic apply(int unsigned xv, int unsigned r3v);
    @(posedge clk);
    r1 = (K+1)'(xv % M1);
    r2 = K'(xv % M2);
    r3 = K'(r3v);
    #1;
    checks++;
    if (r1[K]) n_ck++;
    if (dut.csa_carry[0]) n_csa_wrap++;
    if (int'(dut.csa_sum) + int'(dut.csa_carry) >= (1 << W)) n_add_wrap++;
    if (&dut.adder_sum) n_zero_fix++;
    if (r3v == M3) n_r3_alt++;
    if (int'(x) != int'(xv)) begin
      failures++;
      if (failures < 10) $display("FAIL X=%0d r=(%0d,%0d,%0d) got %0d", xv, r1, r2, r3, x);
    end
  endtask

  initial begin
    r1 = '0; r2 = '0; r3 = '0;
    for (int unsigned xv = 0; xv < M1 * M2 * M3; xv++) begin
      apply(xv, xv % M3);
      if (xv % M3 == 0) apply(xv, M3);
    end
    $display("mechanisms: r1=2^k %0d, csa wrap %0d, adder wrap %0d, zero fix %0d, r3 alt zero %0d",
             n_ck, n_csa_wrap, n_add_wrap, n_zero_fix, n_r3_alt);
    if (n_ck == 0)       begin failures++; $display("r1 = 2^k never applied"); end
    if (n_csa_wrap == 0) begin failures++; $display("carry-save wrap never happened"); end
    if (n_add_wrap == 0) begin failures++; $display("adder end-around carry never happened"); end
    if (n_zero_fix == 0) begin failures++; $display("zero fix never used"); end
    if (n_r3_alt == 0)   begin failures++; $display("second zero code of r3 never applied"); end
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
