// tb_rns_r2b_sizes: end-to-end check of the converter at several values of k.
// k = 2, 4 and 5 are tested exhaustively over the whole dynamic range, k = 8, 12 and 16 with
// random values; each size must reproduce every X from its residues. Watchdog included.
module tb_rns_r2b_sizes;
  logic clk;
  int c2, f2, c4, f4, c5, f5, c8, f8, c12, f12, c16, f16;
  logic d2, d4, d5, d8, d12, d16;
  int checks, failures;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  r2b_sweep #(.K(2))                 s2  (.clk(clk), .checks(c2),  .failures(f2),  .done(d2));
  r2b_sweep #(.K(4))                 s4  (.clk(clk), .checks(c4),  .failures(f4),  .done(d4));
  r2b_sweep #(.K(5))                 s5  (.clk(clk), .checks(c5),  .failures(f5),  .done(d5));
  r2b_sweep #(.K(8),  .NRAND(20000)) s8  (.clk(clk), .checks(c8),  .failures(f8),  .done(d8));
  r2b_sweep #(.K(12), .NRAND(20000)) s12 (.clk(clk), .checks(c12), .failures(f12), .done(d12));
  r2b_sweep #(.K(16), .NRAND(20000)) s16 (.clk(clk), .checks(c16), .failures(f16), .done(d16));

  initial begin
    wait (d2 && d4 && d5 && d8 && d12 && d16);
    checks   = c2 + c4 + c5 + c8 + c12 + c16;
    failures = f2 + f4 + f5 + f8 + f12 + f16;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4 + c5 + c8 + c12 + c16,
             f2 + f4 + f5 + f8 + f12 + f16 + 1);
    $finish;
  end
endmodule
