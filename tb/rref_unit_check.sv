// rref_unit_check: drives one rref_unit instance with a set of matrices and
// compares every reduced row, the pivot mask, the rank flag and the latency
// with the software reference in rref_ref_pkg.
//
// Matrices: optionally the 3 x 7 example over F_7 used to illustrate the
// algorithm, then random matrices, some made rank deficient (a zero row, a
// row equal to a multiple of another) and some whose first columns are zero
// so that pivot columns are skipped. Rows are loaded with random gaps.
// The latency from the last loaded row to done must be K*(K+8) cycles for
// every matrix (constant time).
module rref_unit_check #(
  parameter int unsigned N = 7,
  parameter int unsigned K = 3,
  parameter int unsigned Q = 7,
  parameter int unsigned NTEST = 10,
  parameter bit          WORKED_EX = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_swaps,
  output int   n_deficient,
  output int   n_skipcol
);
  import rref_ref_pkg::*;

  localparam int unsigned W  = $clog2(Q);
  localparam int unsigned RW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned LAT_PASS = 8;   // cycles per pass beyond K

  logic                start, ld_valid, busy, done, full_rank, ext_rd_en;
  logic [N-1:0][W-1:0] ld_row, ext_rd_data;
  logic [N-1:0]        pivot_mask;
  logic [RW-1:0]       ext_rd_row;

  rref_unit #(.N(N), .K(K), .Q(Q)) dut (
    .clk, .rst_n, .start, .ld_valid, .ld_row, .busy, .done, .full_rank,
    .pivot_mask, .ext_rd_en, .ext_rd_row, .ext_rd_data
  );

  // count real row swaps (pivot found below the row to reduce)
  always @(posedge clk)
    if (dut.mem_swap && dut.ps_best_valid && dut.ps_best_row != dut.rtr[RW-1:0])
      n_swaps++;

  int m[];
  int ref_m[];
  bit piv[];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [N=%0d K=%0d] %s", N, K, what);
    end
  endtask

  initial begin
    int rank, lat, kind;
    finished = 0; checks = 0; failures = 0; n_swaps = 0; n_deficient = 0; n_skipcol = 0;
    start = 0; ld_valid = 0; ld_row = '0; ext_rd_en = 0; ext_rd_row = '0;
    m = new[K*N];
    wait (rst_n);
    repeat (3) @(negedge clk);
    for (int t = 0; t < NTEST; t++) begin
      kind = t % 4;
      for (int i = 0; i < K*N; i++) m[i] = $urandom_range(Q-1);
      if (WORKED_EX && t == 0) begin
        m = '{2,2,3,3,1,4,3, 3,3,1,5,1,4,4, 5,3,1,2,2,2,6};
      end else if (kind == 1) begin
        // rank deficient: last row zero, row 1 = 3 * row 0
        for (int j = 0; j < N; j++) begin
          m[(K-1)*N + j] = 0;
          if (K > 2) m[N + j] = (3 * m[j]) % Q;
        end
      end else if (kind == 2) begin
        // leading columns zero apart from the last row, column 1 zero
        for (int r = 0; r < K; r++) begin
          m[r*N] = (r == K-1) ? 1 + $urandom_range(Q-2) : 0;
          m[r*N + 1] = 0;
        end
      end
      ref_m = new[K*N](m);
      rank = rref(ref_m, K, N, Q, piv);
      if (rank < K) n_deficient++;
      for (int c = 0; c < rank; c++) if (!piv[c]) begin n_skipcol++; break; end

      // load
      start = 1; @(negedge clk); start = 0;
      for (int r = 0; r < K; r++) begin
        while ($urandom_range(3) == 0) begin
          ld_valid = 0;
          @(negedge clk);
        end
        ld_valid = 1;
        for (int j = 0; j < N; j++) ld_row[j] = W'(m[r*N + j]);
        @(negedge clk);
      end
      ld_valid = 0;
      lat = 0;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == K*(K+LAT_PASS), $sformatf("latency %0d, expected %0d", lat, K*(K+LAT_PASS)));
      check(full_rank == (rank == K), "full_rank flag");
      for (int c = 0; c < N; c++)
        check(pivot_mask[c] == piv[c], $sformatf("pivot_mask[%0d]", c));
      // read back all rows
      for (int r = 0; r < K; r++) begin
        ext_rd_en = 1; ext_rd_row = RW'(r);
        @(negedge clk);
        ext_rd_en = 0;
        for (int j = 0; j < N; j++)
          check(int'(ext_rd_data[j]) == ref_m[r*N + j],
                $sformatf("test %0d row %0d col %0d: got %0d expected %0d", t, r, j, ext_rd_data[j], ref_m[r*N + j]));
      end
    end
    finished = 1;
  end

endmodule
