// tb_zero_fix: exhaustive self-check of zero_fix at its default width (6 bits).
// Every input word is applied; the expected output is the input itself, except that the
// all-ones word must come out as zero. One word per clock; a watchdog ends a hung run.
module tb_zero_fix;
  localparam int unsigned W = 6;
  logic clk;
  logic [W-1:0] a, d;
  int checks = 0, failures = 0;

  zero_fix dut (.a(a), .d(d));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    a = '0;
    for (int v = 0; v < (1 << W); v++) begin
      @(posedge clk);
      a = W'(v);
      #1;
      checks++;
      if (d !== ((v == (1 << W) - 1) ? W'(0) : W'(v))) begin
        failures++;
        $display("FAIL a=%0d d=%0d", a, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
