// tb_col_sort: column sorter checked at two sizes: the worked 4 x 5
// example (values up to 8, so q = 127) inside a 4 x 9 matrix, and random
// 6 x 20 matrices over a 2-letter alphabet with many equal prefixes and
// ties. Counts exact ties so that stability is really exercised.
module tb_col_sort;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic f0, f1;
  int c0, c1, e0, e1, t0, t1, checks, failures;

  col_sort_check #(.N(9),  .K(4), .Q(127), .NTEST(4),  .ALPHA(4), .EXAMPLE(1)) u_ex (
    .clk, .rst_n, .finished(f0), .checks(c0), .failures(e0), .n_ties(t0));
  col_sort_check #(.N(20), .K(6), .Q(7),   .NTEST(12), .ALPHA(2)) u_rand (
    .clk, .rst_n, .finished(f1), .checks(c1), .failures(e1), .n_ties(t1));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (f0 && f1);
    checks = c0 + c1 + 1;
    failures = e0 + e1;
    if (t0 + t1 == 0) begin failures++; $display("FAIL no equal columns exercised"); end
    $display("ties=%0d", t0 + t1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, e0 + e1 + 1);
    $finish;
  end
endmodule
