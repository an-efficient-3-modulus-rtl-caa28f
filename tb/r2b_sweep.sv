// r2b_sweep: test harness that runs one rns_r2b_converter of width K against a reference.
// For K <= 5 it applies every X in [0, M), M = 2^K (2^{2K} - 1); for larger K it applies
// NRAND random values of X plus the edge values 0, 1, M - 1 and 2^K (r1 = 2^K wraps first
// there). The residues are computed here with the % operator and the converter must return X.
// It raises done when finished and reports its counts on checks and failures.
module r2b_sweep #(
  parameter int unsigned K     = 3,
  parameter int unsigned NRAND = 1000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam longint unsigned M1 = (64'd1 << K) + 1;
  localparam longint unsigned M2 = 64'd1 << K;
  localparam longint unsigned M3 = (64'd1 << K) - 1;
  localparam longint unsigned M  = M1 * M2 * M3;

  logic [K:0]     r1;
  logic [K-1:0]   r2, r3;
  logic [3*K-1:0] x;

  rns_r2b_converter #(.K(K)) dut (.r1(r1), .r2(r2), .r3(r3), .x(x));

  task automatic apply(longint unsigned xv);
    @(posedge clk);
    r1 = (K+1)'(xv % M1);
    r2 = K'(xv % M2);
    r3 = K'(xv % M3);
    #1;
    checks++;
    if (64'(x) != xv) begin
      failures++;
      if (failures < 10) $display("FAIL K=%0d X=%0d got %0d", K, xv, x);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    r1 = '0; r2 = '0; r3 = '0;
    if (K <= 5) begin
      for (longint unsigned xv = 0; xv < M; xv++) apply(xv);
    end else begin
      apply(0); apply(1); apply(M - 1); apply(M2);
      for (int unsigned n = 0; n < NRAND; n++) apply({$urandom, $urandom} % M);
    end
    done = 1'b1;
  end
endmodule
