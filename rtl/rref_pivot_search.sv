// rref_pivot_search: constant-time pivot search of the RREF unit.
//
// Rows of the matrix are presented one per cycle (row_valid, row_idx,
// row_data). For each row a bank of N parallel detectors marks the non-zero
// elements that lie inside the search area: columns >= min_col and rows >=
// row_lo. A priority encoder over the N detector outputs picks the left-most
// such column of the row. Across rows the unit keeps the candidate with the
// smallest column; on a tie the row seen first is kept. After every row of
// the search area has been presented, best_col is the pivot column and
// best_row a row holding a non-zero in it; best_valid is low if the search
// area was entirely zero.
//
// Every presented row costs exactly one cycle whatever it holds, so the time
// does not depend on the data. The search area shrinks as the reduction
// advances because the RREF controller raises min_col and row_lo.
//
// Timing: clear (with min_col/row_lo) starts a new search; each row_valid
// updates best_* at the next clock edge. clear and row_valid in the same
// cycle start a new search with that row as its first.
// Detectors plus priority encoder follow the published architecture; the tie rule and the
// interface are this design's own.
module rref_pivot_search #(
  parameter int unsigned N = less_pkg::N_L1,
  parameter int unsigned K = less_pkg::K_L1,
  parameter int unsigned W = $clog2(less_pkg::Q_LESS),
  localparam int unsigned RW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [CW:0]          min_col,   // one bit wider: N means "empty area"
  input  logic [RW-1:0]        row_lo,
  input  logic                 row_valid,
  input  logic [RW-1:0]        row_idx,
  input  logic [N-1:0][W-1:0]  row_data,
  output logic                 best_valid,
  output logic [RW-1:0]        best_row,
  output logic [CW-1:0]        best_col
);

  logic [CW:0]   min_col_q;
  logic [RW-1:0] row_lo_q;
  logic [CW:0]   area_col;
  logic [RW-1:0] area_row;
  logic [N-1:0]  nz;
  logic          row_hit;
  logic [CW-1:0] row_col;

  // A clear in the same cycle as a row applies its bounds to that row
  assign area_col = clear ? min_col : min_col_q;
  assign area_row = clear ? row_lo  : row_lo_q;

  // Parallel non-zero detectors restricted to the search area
  always_comb begin
    for (int c = 0; c < N; c++)
      nz[c] = (row_data[c] != '0) && ((CW+1)'(c) >= area_col);
  end

  // Priority encoder: left-most (lowest index) detector that fires
  always_comb begin
    row_hit = 1'b0;
    row_col = '0;
    for (int c = N - 1; c >= 0; c--) begin
      if (nz[c]) begin
        row_hit = 1'b1;
        row_col = CW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_col_q  <= '0;
      row_lo_q   <= '0;
      best_valid <= 1'b0;
      best_row   <= '0;
      best_col   <= '0;
    end else begin
      if (clear) begin
        min_col_q  <= min_col;
        row_lo_q   <= row_lo;
        best_valid <= 1'b0;
      end
      if (row_valid && row_hit && (row_idx >= area_row) &&
          (clear || !best_valid || row_col < best_col)) begin
        best_valid <= 1'b1;
        best_row   <= row_idx;
        best_col   <= row_col;
      end
    end
  end

endmodule
