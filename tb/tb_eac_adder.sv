// tb_eac_adder: self-check of the end-around-carry adder.
// At the default width (6 bits) all 4096 operand pairs are applied; a second instance at
// 16 bits gets random pairs. The reference is the integer sum with its carry-out added back:
// a + b when a + b < 2^W, else a + b - (2^W - 1). That pins the exact code, including the
// all-ones result for a + b = 2^W - 1. One pair per clock; a watchdog ends a hung run.
module tb_eac_adder;
  localparam int unsigned W1 = 6;
  localparam int unsigned W2 = 16;
  logic clk;
  logic [W1-1:0] a1, b1, s1;
  logic [W2-1:0] a2, b2, s2;
  int checks = 0, failures = 0;
  int wraps = 0;

  eac_adder dut1 (.a(a1), .b(b1), .s(s1));
  eac_adder #(.W(W2)) dut2 (.a(a2), .b(b2), .s(s2));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic longint unsigned ref_sum(longint unsigned a, longint unsigned b, int w);
    longint unsigned t = a + b;
    return (t >= (64'd1 << w)) ? t - ((64'd1 << w) - 1) : t;
  endfunction

  initial begin
    a1 = '0; b1 = '0; a2 = '0; b2 = '0;
    for (int x = 0; x < (1 << W1); x++) begin
      for (int y = 0; y < (1 << W1); y++) begin
        @(posedge clk);
        a1 = W1'(x); b1 = W1'(y);
        #1;
        checks++;
        if (x + y >= (1 << W1)) wraps++;
        if (64'(s1) != ref_sum(64'(x), 64'(y), W1)) begin
          failures++;
          if (failures < 10) $display("FAIL W=%0d a=%0d b=%0d s=%0d", W1, a1, b1, s1);
        end
      end
    end
    for (int n = 0; n < 5000; n++) begin
      @(posedge clk);
      a2 = W2'($urandom); b2 = W2'($urandom);
      if (n == 0) begin a2 = 16'hFFFF; b2 = 16'hFFFF; end
      if (n == 1) begin a2 = 16'h1234; b2 = 16'hEDCB; end   // sum 2^16 - 1
      #1;
      checks++;
      if (64'(s2) != ref_sum(64'(a2), 64'(b2), W2)) begin
        failures++;
        if (failures < 10) $display("FAIL W=%0d a=%0h b=%0h s=%0h", W2, a2, b2, s2);
      end
    end
    if (wraps == 0) begin failures++; $display("no end-around carry exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
