// col_sort_check: drives one col_sort instance from a behavioural row
// memory (one-cycle read latency) and checks its output against a stable
// sort of the non-pivot columns done in the testbench.
//
// EXAMPLE = 1 runs first the 4 x 5 column-sorting example (its columns are
// placed at non-pivot positions 0..4, pivot columns follow). The remaining
// tests use random matrices over a small alphabet so that columns share long
// equal prefixes and exact ties occur, and random pivot positions. One test
// gives a mask with too few pivots, which must clear ok. The time from start
// to done must be N + M*(K+2) + K + 2 cycles for every input.
module col_sort_check #(
  parameter int unsigned N = 9,
  parameter int unsigned K = 4,
  parameter int unsigned Q = 127,
  parameter int unsigned NTEST = 8,
  parameter int unsigned ALPHA = 3,
  parameter bit          EXAMPLE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_ties
);
  import rref_ref_pkg::*;
  localparam int unsigned W  = $clog2(Q);
  localparam int unsigned M  = N - K;
  localparam int unsigned RW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic                 start, rd_en, busy, done, ok, out_valid;
  logic [N-1:0]         pivot_mask;
  logic [RW-1:0]        rd_row, out_tag;
  logic [N-1:0][W-1:0]  rd_data;
  logic [M-1:0][CW-1:0] col_idx;
  logic [M-1:0][W-1:0]  out_row;

  col_sort #(.N(N), .K(K), .Q(Q)) dut (.*);

  int m[];
  logic [K-1:0][N-1:0][W-1:0] mat;   // copy of m read by the memory model
  always_ff @(posedge clk)
    if (rd_en) rd_data <= mat[rd_row];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL [N=%0d K=%0d] %s", N, K, what); end
  endtask

  int ex [4][5] = '{'{0,4,0,1,2}, '{1,5,1,0,0}, '{6,4,3,0,6}, '{8,4,0,0,0}};
  int ex_order [5] = '{2,0,3,4,1};

  initial begin
    int order[$];
    int lat, rows_seen;
    bit bad_mask;
    finished = 0; checks = 0; failures = 0; n_ties = 0;
    start = 0; pivot_mask = '0;
    m = new[K*N];
    wait (rst_n);
    @(negedge clk);
    for (int t = 0; t < NTEST; t++) begin
      bad_mask = (t == NTEST - 1);
      for (int i = 0; i < K*N; i++) m[i] = $urandom_range(ALPHA - 1);
      pivot_mask = '0;
      if (EXAMPLE && t == 0) begin
        for (int r = 0; r < K; r++) for (int j = 0; j < N; j++)
          m[r*N + j] = (j < 5) ? ((r < 4) ? ex[r][j] : 0) : ((j - 5) == r);
        for (int j = 5; j < N; j++) pivot_mask[j] = 1'b1;
      end else begin
        int placed;
        placed = 0;
        while (placed < K - (bad_mask ? 1 : 0)) begin
          int c;
          c = $urandom_range(N - 1);
          if (!pivot_mask[c]) begin pivot_mask[c] = 1'b1; placed++; end
        end
      end
      // reference: stable insertion sort of the non-pivot column indices
      order = {};
      for (int j = 0; j < N; j++) if (!pivot_mask[j]) begin
        int pos;
        pos = order.size();
        while (pos > 0 && col_cmp(m, K, N, order[pos-1], j) > 0) pos--;
        if (pos > 0 && col_cmp(m, K, N, order[pos-1], j) == 0) n_ties++;
        order.insert(pos, j);
      end
      if (EXAMPLE && t == 0)
        for (int i = 0; i < 5; i++) check(order[i] == ex_order[i], "reference disagrees with worked example");

      for (int r = 0; r < K; r++) for (int j = 0; j < N; j++) mat[r][j] = W'(m[r*N + j]);
      start = 1; @(negedge clk); start = 0;
      lat = 1; rows_seen = 0;
      while (!done) begin
        if (out_valid) begin
          check(int'(out_tag) == rows_seen, "output row order");
          if (!bad_mask)
            for (int i = 0; i < M; i++)
              check(int'(out_row[i]) == m[rows_seen*N + order[i]],
                    $sformatf("test %0d row %0d pos %0d: got %0d expected %0d", t, rows_seen, i, out_row[i], m[rows_seen*N + order[i]]));
          rows_seen++;
        end
        @(negedge clk); lat++;
      end
      check(lat == N + M*(K+2) + K + 2, $sformatf("latency %0d expected %0d", lat, N + M*(K+2) + K + 2));
      check(rows_seen == K, "row count");
      check(ok == !bad_mask, "ok flag");
      if (!bad_mask)
        for (int i = 0; i < M; i++) check(int'(col_idx[i]) == order[i], $sformatf("col_idx[%0d]", i));
      @(negedge clk);
    end
    finished = 1;
  end
endmodule
