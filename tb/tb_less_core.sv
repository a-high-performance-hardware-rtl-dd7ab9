// tb_less_core: end-to-end test of the LESS matrix engine at N = 16, K = 8,
// q = 127. Each operation sends K generator rows, with or without a random
// monomial matrix, and checks the pivot mask, the rank flags, the sorted
// column list and every output row against a software model (matrix product
// with the full monomial matrix, Gauss-Jordan RREF, stable column sort).
// It also counts how often each mechanism of the engine occurred and fails
// if one never did: monomial transform and bypass, row swap in the RREF
// unit, a skipped (non-pivot) column before a pivot, a rank-deficient input,
// an index exchange in the column sorter, and back-to-back operations.
// The end-to-end latency after the last generator row is checked against
// 2 + K*(K+8) + N + (N-K)*(K+2) + K + 2 cycles.
module tb_less_core;
  import rref_ref_pkg::*;
  localparam int N = 16, K = 8, Q = 127, W = 7, M = N - K, RW = 3, CW = 4;
  localparam int NTEST = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, use_monomial, g_valid, busy, done, full_rank, sort_ok, out_valid;
  logic [N-1:0][CW-1:0] perm;
  logic [N-1:0][W-1:0]  scale, g_row;
  logic [N-1:0]         pivot_mask;
  logic [M-1:0][CW-1:0] col_idx;
  logic [RW-1:0]        out_tag;
  logic [M-1:0][W-1:0]  out_row;

  less_core #(.N(N), .K(K), .Q(Q)) dut (.*);

  int checks = 0, failures = 0;
  int n_mono = 0, n_bypass = 0, n_swap = 0, n_skipcol = 0, n_deficient = 0, n_exch = 0;

  // sorter state 4 is its exchange step
  always @(posedge clk) begin
    if (dut.u_rref.mem_swap && dut.u_rref.ps_best_valid &&
        dut.u_rref.ps_best_row != dut.u_rref.rtr[RW-1:0]) n_swap++;
    if (dut.u_sort.state == 3'd4 && dut.u_sort.swapped != dut.u_sort.col_idx) n_exch++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int g[], p[], order[$], pi[N], qs[N];
    bit piv[];
    int rank, lat, rows_seen;
    bit mono;
    start = 0; use_monomial = 0; g_valid = 0; perm = '0; scale = '0; g_row = '0;
    g = new[K*N];
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < NTEST; t++) begin
      mono = (t % 3 != 2);
      for (int i = 0; i < K*N; i++) g[i] = $urandom_range(Q - 1);
      if (t % 4 == 1) for (int j = 0; j < N; j++) g[3*N + j] = (5 * g[j]) % Q;   // rank K-1
      if (t % 4 == 3 && !mono) for (int r = 0; r < K; r++) g[r*N + 1] = 0;    // column 1 skipped
      for (int i = 0; i < N; i++) pi[i] = i;
      pi.shuffle();
      for (int j = 0; j < N; j++) qs[j] = 1 + $urandom_range(Q - 2);
      // software model: p = g * Qmono (or g), RREF, sort
      p = new[K*N];
      for (int r = 0; r < K; r++)
        for (int j = 0; j < N; j++)
          p[r*N + j] = mono ? (g[r*N + pi[j]] * qs[j]) % Q : g[r*N + j];
      rank = rref(p, K, N, Q, piv);
      if (rank < K) n_deficient++;
      for (int c = 0; c < N && c < rank; c++) if (!piv[c]) begin n_skipcol++; break; end
      order = {};
      for (int j = 0; j < N; j++) if (!piv[j]) begin
        int pos;
        pos = order.size();
        while (pos > 0 && col_cmp(p, K, N, order[pos-1], j) > 0) pos--;
        order.insert(pos, j);
      end
      if (mono) n_mono++; else n_bypass++;

      // drive
      use_monomial = mono;
      for (int j = 0; j < N; j++) begin perm[j] = CW'(pi[j]); scale[j] = W'(qs[j]); end
      start = 1; @(negedge clk); start = 0;
      for (int r = 0; r < K; r++) begin
        g_valid = 1;
        for (int j = 0; j < N; j++) g_row[j] = W'(g[r*N + j]);
        @(negedge clk);
      end
      g_valid = 0;
      lat = 0; rows_seen = 0;
      while (!done) begin
        if (out_valid) begin
          check(int'(out_tag) == rows_seen, "row order");
          if (rank == K)
            for (int i = 0; i < M; i++)
              check(int'(out_row[i]) == p[rows_seen*N + order[i]],
                    $sformatf("test %0d row %0d pos %0d: got %0d expected %0d", t, rows_seen, i, out_row[i], p[rows_seen*N + order[i]]));
          rows_seen++;
        end
        @(negedge clk); lat++;
      end
      check(lat == 2 + K*(K+8) + N + M*(K+2) + K + 2,
            $sformatf("latency %0d expected %0d", lat, 2 + K*(K+8) + N + M*(K+2) + K + 2));
      check(rows_seen == K, "row count");
      check(full_rank == (rank == K), "full_rank");
      check(sort_ok == (rank == K), "sort_ok");
      for (int c = 0; c < N; c++) check(pivot_mask[c] == piv[c], $sformatf("test %0d pivot_mask[%0d]", t, c));
      if (rank == K) for (int i = 0; i < M; i++) check(int'(col_idx[i]) == order[i], $sformatf("col_idx[%0d]", i));
      // next operation starts right away
    end
    $display("monomial=%0d bypass=%0d row_swaps=%0d skipped_cols=%0d rank_deficient=%0d sort_exchanges=%0d",
             n_mono, n_bypass, n_swap, n_skipcol, n_deficient, n_exch);
    check(n_mono > 0, "monomial path never used");
    check(n_bypass > 0, "bypass path never used");
    check(n_swap > 0, "no row swap");
    check(n_skipcol > 0, "no skipped column");
    check(n_deficient > 0, "no rank-deficient input");
    check(n_exch > 0, "no sort exchange");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
