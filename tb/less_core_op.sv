// less_core_op: one complete operation of the LESS matrix engine at the
// size given by its parameters. A random generator
// matrix is multiplied by a random monomial matrix, reduced and sorted by the
// engine; pivot mask, sorted column list, every output element and the
// latency are compared with a software model (column permutation and
// scaling, Gauss-Jordan RREF, stable sort of the non-pivot columns).
module less_core_op #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 8,
  parameter int unsigned Q = 127
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  import rref_ref_pkg::*;
  localparam int W = $clog2(Q), M = N - K, RW = $clog2(K), CW = $clog2(N);

  logic start, use_monomial, g_valid, busy, done, full_rank, sort_ok, out_valid;
  logic [N-1:0][CW-1:0] perm;
  logic [N-1:0][W-1:0]  scale, g_row;
  logic [N-1:0]         pivot_mask;
  logic [M-1:0][CW-1:0] col_idx;
  logic [RW-1:0]        out_tag;
  logic [M-1:0][W-1:0]  out_row;

  less_core #(.N(N), .K(K), .Q(Q)) dut (.*);

  int n_bad = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (n_bad++ < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int g[], p[], order[$], pi[N], qs[N];
    bit piv[];
    int rank, lat, rows_seen, expected_lat;
    start = 0; use_monomial = 1; g_valid = 0; perm = '0; scale = '0; g_row = '0;
    g = new[K*N];
    for (int i = 0; i < K*N; i++) g[i] = $urandom_range(Q - 1);
    for (int i = 0; i < N; i++) pi[i] = i;
    pi.shuffle();
    for (int j = 0; j < N; j++) qs[j] = 1 + $urandom_range(Q - 2);
    p = new[K*N];
    for (int r = 0; r < K; r++)
      for (int j = 0; j < N; j++) p[r*N + j] = (g[r*N + pi[j]] * qs[j]) % Q;
    rank = rref(p, K, N, Q, piv);
    order = {};
    for (int j = 0; j < N; j++) if (!piv[j]) begin
      int pos;
      pos = order.size();
      while (pos > 0 && col_cmp(p, K, N, order[pos-1], j) > 0) pos--;
      order.insert(pos, j);
    end
    expected_lat = 2 + K*(K+8) + N + M*(K+2) + K + 2;

    finished = 0; checks = 0; failures = 0;
    wait (rst_n);
    @(negedge clk);
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
                  $sformatf("row %0d pos %0d: got %0d expected %0d", rows_seen, i, out_row[i], p[rows_seen*N + order[i]]));
        rows_seen++;
      end
      @(negedge clk); lat++;
    end
    $display("N=%0d K=%0d rank=%0d latency=%0d cycles", N, K, rank, lat);
    check(lat == expected_lat, $sformatf("latency %0d expected %0d", lat, expected_lat));
    check(rows_seen == K, "row count");
    check(full_rank == (rank == K), "full_rank");
    check(sort_ok == (rank == K), "sort_ok");
    for (int c = 0; c < N; c++) check(pivot_mask[c] == piv[c], $sformatf("pivot_mask[%0d]", c));
    if (rank == K) for (int i = 0; i < M; i++) check(int'(col_idx[i]) == order[i], $sformatf("col_idx[%0d]", i));
    finished = 1;
  end
endmodule
