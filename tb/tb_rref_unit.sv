// tb_rref_unit: self-checking test of the RREF unit at two sizes: the small
// 3 x 7 example over F_7 (plus random 3 x 7 matrices) and random 8 x 20
// matrices over F_127, each compared with a software Gauss-Jordan reference,
// including rank-deficient inputs, skipped pivot columns and the
// constant-time latency K*(K+8).
module tb_rref_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic f0, f1;
  int c0, c1, e0, e1, s0, s1, d0, d1, k0, k1;
  int checks, failures;

  rref_unit_check #(.N(7),  .K(3), .Q(7),   .NTEST(12), .WORKED_EX(1)) u_small (
    .clk, .rst_n, .finished(f0), .checks(c0), .failures(e0), .n_swaps(s0), .n_deficient(d0), .n_skipcol(k0));
  rref_unit_check #(.N(20), .K(8), .Q(127), .NTEST(16)) u_large (
    .clk, .rst_n, .finished(f1), .checks(c1), .failures(e1), .n_swaps(s1), .n_deficient(d1), .n_skipcol(k1));

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (f0 && f1);
    checks = c0 + c1 + 3;
    failures = e0 + e1;
    if (s0 + s1 == 0)  begin failures++; $display("FAIL no row swap exercised"); end
    if (d0 + d1 == 0)  begin failures++; $display("FAIL no rank-deficient matrix"); end
    if (k0 + k1 == 0)  begin failures++; $display("FAIL no skipped pivot column"); end
    $display("swaps=%0d deficient=%0d skipped_columns=%0d", s0 + s1, d0 + d1, k0 + k1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, e0 + e1 + 1);
    $finish;
  end
endmodule
