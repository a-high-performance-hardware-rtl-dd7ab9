// rref_ref_pkg: software reference for the testbenches.
//
// Plain Gauss-Jordan elimination over F_q on int arrays, written
// independently of the RTL: for each row to reduce, the left-most column
// with a non-zero entry in the remaining rows becomes the pivot column, the
// first such row is swapped up, rescaled to a leading 1 and subtracted from
// all other rows. Because the RREF of a matrix is unique, any correct
// implementation must give the same matrix. Also holds the lexicographic
// column comparison used to check the column sorter.
package rref_ref_pkg;

  function automatic int inv_mod(int a, int q);
    for (int b = 1; b < q; b++) if ((a * b) % q == 1) return b;
    return 0;
  endfunction

  // In-place RREF of a k x n matrix stored row-major in m (m[r*n + c]).
  // Returns the rank; piv[c] is set for each pivot column.
  function automatic int rref(ref int m[], input int k, input int n, input int q, ref bit piv[]);
    int rank;
    rank = 0;
    piv = new[n];
    for (int c = 0; c < n && rank < k; c++) begin
      int p;
      p = -1;
      for (int r = rank; r < k; r++) if (m[r*n + c] != 0 && p < 0) p = r;
      if (p >= 0) begin
        int iv;
        for (int j = 0; j < n; j++) begin
          int t;
          t = m[rank*n + j]; m[rank*n + j] = m[p*n + j]; m[p*n + j] = t;
        end
        iv = inv_mod(m[rank*n + c], q);
        for (int j = 0; j < n; j++) m[rank*n + j] = (m[rank*n + j] * iv) % q;
        for (int r = 0; r < k; r++) begin
          if (r != rank) begin
            int f;
            f = m[r*n + c];
            for (int j = 0; j < n; j++)
              m[r*n + j] = ((m[r*n + j] - f * m[rank*n + j]) % q + q) % q;
          end
        end
        piv[c] = 1;
        rank++;
      end
    end
    return rank;
  endfunction

  // -1, 0, 1 as column a is lexicographically below, equal to, above column b
  function automatic int col_cmp(ref int m[], input int k, input int n, input int a, input int b);
    for (int r = 0; r < k; r++) begin
      if (m[r*n + a] < m[r*n + b]) return -1;
      if (m[r*n + a] > m[r*n + b]) return 1;
    end
    return 0;
  endfunction

endpackage
