// col_sort: sorts the non-pivot columns of a matrix in RREF.
//
// After reduction the K pivot columns form an identity and carry no
// information; the M = N - K non-pivot columns are put into a canonical
// order before they are hashed. Columns are compared element by element from
// the top row down (lexicographic order, row 0 most significant) and placed
// in ascending order; equal columns keep their original order.
//
// The matrix stays where it is (in the RREF column memory, read a row at a
// time through rd_*); only a list of M column indices is sorted:
//   COMPACT  one cycle per column: the indices of the non-pivot columns are
//            collected in ascending order (N cycles);
//   SORT     odd-even transposition sort, M passes. In each pass the rows
//            are streamed top to bottom; every compared pair of neighbouring
//            list entries remembers whether it is still equal or which side
//            is larger at the first row where they differ. At the end of the
//            pass the pairs found out of order exchange their indices. Each
//            pass takes K + 2 cycles whatever the data (constant time);
//   OUTPUT   the rows are streamed once more and each leaves as the M
//            non-pivot elements in sorted column order.
//
// Interface and timing:
//   start        begins a sort using pivot_mask (bit c = pivot column c).
//   rd_en/rd_row row read request to the matrix memory; rd_data must return
//                the row one cycle after rd_en.
//   out_valid    one cycle per row r = out_tag, with out_row holding the
//                sorted non-pivot elements of that row.
//   col_idx      the sorted column index list, valid from done on.
//   done         pulse after the last output row; ok is low if the mask did
//                not hold exactly M non-pivot columns.
//   Total time from start to done: N + M*(K+2) + K + 2 cycles.
// Sorting the non-pivot columns by element-wise comparison follows the
// published architecture; the index-list transposition sorter is this
// design's own choice.
module col_sort #(
  parameter int unsigned N = less_pkg::N_L1,
  parameter int unsigned K = less_pkg::K_L1,
  parameter int unsigned Q = less_pkg::Q_LESS,
  localparam int unsigned W  = $clog2(Q),
  localparam int unsigned M  = N - K,
  localparam int unsigned RW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [N-1:0]         pivot_mask,
  output logic                 rd_en,
  output logic [RW-1:0]        rd_row,
  input  logic [N-1:0][W-1:0]  rd_data,
  output logic                 busy,
  output logic                 done,
  output logic                 ok,
  output logic [M-1:0][CW-1:0] col_idx,
  output logic                 out_valid,
  output logic [RW-1:0]        out_tag,
  output logic [M-1:0][W-1:0]  out_row
);

  typedef enum logic [2:0] {S_IDLE, S_COMPACT, S_SORT, S_LAST, S_SWAP, S_OUT, S_OUT_LAST} state_e;

  state_e         state;
  logic [CW:0]    cnt;        // column / row counter
  logic [CW:0]    nfound;     // non-pivot columns seen
  logic [CW:0]    pass;
  logic           phase;      // 0: pairs (0,1),(2,3)..  1: pairs (1,2),(3,4)..
  logic           rdv;        // rd_data holds a row this cycle
  logic [RW-1:0]  rdv_tag;
  logic           rdv_out;    // ... and it is an output row

  logic [M-1:0][W-1:0]  elem;
  logic [M-1:0]         decided, gt;
  logic [M-1:0]         act;      // pair (m, m+1) compared in this pass
  logic [M-1:0][CW-1:0] swapped;

  // Element of each listed column in the row being returned
  always_comb begin
    for (int m = 0; m < M; m++) elem[m] = rd_data[col_idx[m]];
  end

  always_comb begin
    for (int m = 0; m < M; m++) act[m] = (m + 1 < M) && ((m % 2) == int'(phase));
  end

  // Index list after the exchanges of this pass
  always_comb begin
    for (int m = 0; m < M; m++) begin
      swapped[m] = col_idx[m];
      if (m > 0 && act[m-1] && gt[m-1])   swapped[m] = col_idx[m-1];
      else if (act[m] && gt[m] && m + 1 < M) swapped[m] = col_idx[m+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      nfound  <= '0;
      pass    <= '0;
      phase   <= 1'b0;
      col_idx <= '0;
      decided <= '0;
      gt      <= '0;
      rdv     <= 1'b0;
      rdv_tag <= '0;
      rdv_out <= 1'b0;
      done    <= 1'b0;
      ok      <= 1'b0;
    end else begin
      done    <= 1'b0;
      rdv     <= rd_en;
      rdv_tag <= rd_row;
      rdv_out <= rd_en && (state == S_OUT);

      // pairwise lexicographic comparison, first differing row decides
      if (rdv && !rdv_out) begin
        for (int m = 0; m < M - 1; m++) begin
          if (act[m] && !decided[m] && elem[m] != elem[m+1]) begin
            decided[m] <= 1'b1;
            gt[m]      <= elem[m] > elem[m+1];
          end
        end
      end

      case (state)
        S_IDLE: if (start) begin
          state  <= S_COMPACT;
          cnt    <= '0;
          nfound <= '0;
          ok     <= 1'b0;
        end
        S_COMPACT: begin
          if (!pivot_mask[cnt[CW-1:0]]) begin
            nfound <= nfound + 1'b1;
            if (nfound < (CW+1)'(M)) col_idx[nfound[CW-1:0]] <= cnt[CW-1:0];
          end
          cnt <= cnt + 1'b1;
          if (cnt == (CW+1)'(N - 1)) begin
            state   <= S_SORT;
            cnt     <= '0;
            pass    <= '0;
            phase   <= 1'b0;
            decided <= '0;
            gt      <= '0;
          end
        end
        S_SORT: begin
          cnt <= cnt + 1'b1;
          if (cnt == (CW+1)'(K - 1)) state <= S_LAST;
        end
        S_LAST: state <= S_SWAP;
        S_SWAP: begin
          col_idx <= swapped;
          decided <= '0;
          gt      <= '0;
          phase   <= ~phase;
          pass    <= pass + 1'b1;
          cnt     <= '0;
          state   <= (pass == (CW+1)'(M - 1)) ? S_OUT : S_SORT;
        end
        S_OUT: begin
          cnt <= cnt + 1'b1;
          if (cnt == (CW+1)'(K - 1)) state <= S_OUT_LAST;
        end
        S_OUT_LAST: begin
          state <= S_IDLE;
          done  <= 1'b1;
          ok    <= (nfound == (CW+1)'(M));
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A sort starts only when the previous one has finished
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);

  assign busy      = (state != S_IDLE);
  assign rd_en     = (state == S_SORT) || (state == S_OUT);
  assign rd_row    = cnt[RW-1:0];
  assign out_valid = rdv_out;
  assign out_tag   = rdv_tag;
  assign out_row   = elem;

endmodule
