// tb_rref_pivot_search: presents random sparse rows with random search-area
// bounds and compares best_valid/best_row/best_col with a direct search
// (left-most non-zero column inside the area, first row on a tie).
module tb_rref_pivot_search;
  localparam int N = 24, K = 10, W = 7, RW = 4, CW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, row_valid, best_valid;
  logic [CW:0] min_col;
  logic [RW-1:0] row_lo, row_idx, best_row;
  logic [N-1:0][W-1:0] row_data;
  logic [CW-1:0] best_col;
  int checks = 0, failures = 0, n_empty = 0;

  rref_pivot_search #(.N(N), .K(K), .W(W)) dut (.*);

  initial begin
    clear = 0; row_valid = 0; min_col = '0; row_lo = '0; row_idx = '0; row_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      int mc, rl, exp_col, exp_row;
      mc = $urandom_range(N);
      rl = $urandom_range(K-1);
      exp_col = N; exp_row = -1;
      for (int r = 0; r < K; r++) begin
        logic [N-1:0][W-1:0] d;
        for (int c = 0; c < N; c++)
          d[c] = ($urandom_range(9) == 0) ? W'(1 + $urandom_range(126)) : '0;
        if (r >= rl)
          for (int c = mc; c < N; c++)
            if (d[c] != 0 && c < exp_col) begin exp_col = c; exp_row = r; end
        clear = (r == 0); min_col = (CW+1)'(mc); row_lo = RW'(rl);
        row_valid = 1; row_idx = RW'(r); row_data = d;
        @(negedge clk);
        clear = 0;
        row_valid = 0;
        if ($urandom_range(2) == 0) @(negedge clk);   // idle gap
      end
      row_valid = 0;
      checks++;
      if (exp_row < 0) begin
        n_empty++;
        if (best_valid) begin failures++; $display("FAIL test %0d: found pivot in empty area", t); end
      end else if (!best_valid || best_col != CW'(exp_col) || best_row != RW'(exp_row)) begin
        failures++;
        $display("FAIL test %0d: got v%0d r%0d c%0d expected r%0d c%0d", t, best_valid, best_row, best_col, exp_row, exp_col);
      end
    end
    if (n_empty == 0) begin failures++; $display("FAIL empty area never tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
