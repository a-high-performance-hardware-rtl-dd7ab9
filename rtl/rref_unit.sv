// rref_unit: constant-time reduced row echelon form over F_q.
//
// Brings a K x N matrix to RREF with whole-row operations. It combines the
// column memory (rref_col_mem), the row arithmetic pipeline (rref_row_arith)
// and the pivot search (rref_pivot_search) under a small controller.
//
// For each row to reduce rtr = 0 .. K-1 the controller runs (cycle 0 = ITER):
//   ITER   (0)      take the pivot (row p, column c) found by the search that
//                   ran during the previous pass, swap logical rows rtr and p
//                   in the address translation table (a no-op swap when
//                   p == rtr) and read row p, which becomes row rtr;
//   rescale (1..5)  the row enters the pipeline at cycle 1 and leaves
//                   rescaled by inv(row[c]) at cycle 5; it is written back
//                   and kept in the pivot row register;
//   GAP    (1, 2)   wait, so that the first reduce enters at cycle 4, the
//                   earliest at which the pipeline can forward the new pivot
//                   row to it;
//   RED    (3..K+2) read all K rows, one per cycle, and stream them through
//                   the pipeline subtracting row[c] * pivot row; the slot of
//                   row rtr returns the pivot row itself; every result is
//                   written back;
//   DRAIN           wait for the last result (cycle K+7). While the results
//                   leave the pipeline the pivot search for row rtr+1 runs on
//                   them (columns > c, rows > rtr), so no separate search
//                   pass is needed and the next ITER follows at cycle K+8.
// The search for the first pivot runs while the matrix is loaded. If no
// pivot exists for some rtr, the remaining rows are all zero: the pass runs
// anyway (rescale by inv(0) = 0 and reduce by a zero pivot row change
// nothing), full_rank drops and no pivot column is recorded. Every input of
// the same size therefore takes the same number of cycles.
//
// Interface and timing:
//   start            begins a run; then K rows are accepted on ld_valid
//                    (row 0 first, one per cycle at most, gaps allowed).
//   busy / done      busy from start until done, a one-cycle pulse.
//   Latency from the last loaded row to done: K*(K + 8) cycles.
//   pivot_mask       bit c set when column c is a pivot column.
//   full_rank        low if the matrix has rank below K.
//   ext_rd_*         reads logical row ext_rd_row when not busy; data one
//                    cycle later on ext_rd_data.
// The four operations, the parallel search during reduction and during
// loading, and the constant-time behaviour follow the published architecture. The published
// latency, k^2 + 3k + 58, means K + 3 cycles per pass; how the passes overlap
// to reach it is not described. This controller spends K + 8 cycles per pass.
module rref_unit #(
  parameter int unsigned N = less_pkg::N_L1,
  parameter int unsigned K = less_pkg::K_L1,
  parameter int unsigned Q = less_pkg::Q_LESS,
  localparam int unsigned W  = $clog2(Q),
  localparam int unsigned RW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 ld_valid,
  input  logic [N-1:0][W-1:0]  ld_row,
  output logic                 busy,
  output logic                 done,
  output logic                 full_rank,
  output logic [N-1:0]         pivot_mask,
  input  logic                 ext_rd_en,
  input  logic [RW-1:0]        ext_rd_row,
  output logic [N-1:0][W-1:0]  ext_rd_data
);
  import less_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ITER, S_GAP, S_RED, S_DRAIN} state_e;

  state_e          state;
  logic [RW:0]     rtr;         // row to reduce
  logic [RW:0]     cnt;         // load / read counter
  logic [RW:0]     wb_cnt;      // reduce results written back
  logic [CW-1:0]   piv_col;
  logic [CW:0]     next_min;    // left edge of the next search area

  // memory
  logic                mem_init, mem_swap, mem_wr, mem_rd;
  logic [RW-1:0]       mem_swap_b, mem_wr_row, mem_rd_row;
  logic [N-1:0][W-1:0] mem_wr_data, mem_rd_data;

  // arithmetic
  logic                iss_valid;
  row_op_e             iss_op;
  logic [RW-1:0]       iss_tag;
  logic                ar_valid;
  row_op_e             ar_op;
  logic [RW-1:0]       ar_tag;
  logic [N-1:0][W-1:0] ar_row, ar_pivot;

  // search
  logic                ps_clear, ps_valid;
  logic [CW:0]         ps_min_col;
  logic [RW-1:0]       ps_row_lo, ps_idx;
  logic [N-1:0][W-1:0] ps_data;
  logic                ps_best_valid;
  logic [RW-1:0]       ps_best_row;
  logic [CW-1:0]       ps_best_col;

  logic last_wb;
  assign last_wb = ar_valid && (ar_op == OP_REDUCE) && (wb_cnt == (RW+1)'(K - 1));

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      rtr        <= '0;
      cnt        <= '0;
      wb_cnt     <= '0;
      piv_col    <= '0;
      next_min   <= '0;
      pivot_mask <= '0;
      full_rank  <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state      <= S_LOAD;
          rtr        <= '0;
          cnt        <= '0;
          next_min   <= '0;
          pivot_mask <= '0;
          full_rank  <= 1'b1;
        end
        S_LOAD: if (ld_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == (RW+1)'(K - 1)) state <= S_ITER;
        end
        S_ITER: begin
          cnt    <= '0;
          wb_cnt <= '0;
          if (ps_best_valid) begin
            piv_col                 <= ps_best_col;
            next_min                <= (CW+1)'(ps_best_col) + 1'b1;
            pivot_mask[ps_best_col] <= 1'b1;
          end else begin
            full_rank <= 1'b0;
          end
          state <= S_GAP;
        end
        // two cycles so that the first reduce enters three cycles after the
        // rescale, as early as the pivot row can be forwarded to it
        S_GAP: begin
          cnt <= cnt + 1'b1;
          if (cnt == (RW+1)'(1)) begin
            cnt   <= '0;
            state <= S_RED;
          end
        end
        S_RED: begin
          cnt <= cnt + 1'b1;
          if (cnt == (RW+1)'(K - 1)) state <= S_DRAIN;
          if (ar_valid && ar_op == OP_REDUCE) wb_cnt <= wb_cnt + 1'b1;
        end
        S_DRAIN: begin
          if (ar_valid && ar_op == OP_REDUCE) wb_cnt <= wb_cnt + 1'b1;
          if (last_wb) begin
            rtr <= rtr + 1'b1;
            if (rtr == (RW+1)'(K - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_ITER;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ---------------- memory port control ----------------
  always_comb begin
    mem_init    = (state == S_IDLE) && start;
    mem_swap    = (state == S_ITER);
    mem_swap_b  = ps_best_valid ? ps_best_row : rtr[RW-1:0];
    mem_wr      = 1'b0;
    mem_wr_row  = ar_tag;
    mem_wr_data = ar_row;
    if (state == S_LOAD) begin
      mem_wr      = ld_valid;
      mem_wr_row  = cnt[RW-1:0];
      mem_wr_data = ld_row;
    end else if (ar_valid) begin
      mem_wr = 1'b1;
    end
    mem_rd     = 1'b0;
    mem_rd_row = ext_rd_row;
    case (state)
      S_IDLE:    mem_rd = ext_rd_en;
      S_ITER:    begin mem_rd = 1'b1; mem_rd_row = mem_swap_b; end   // pivot row, before the swap
      S_RED:     begin mem_rd = 1'b1; mem_rd_row = cnt[RW-1:0]; end
      default:   ;
    endcase
  end

  // Rows read for the pipeline enter it one cycle after the read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_valid <= 1'b0;
      iss_op    <= OP_RESCALE;
      iss_tag   <= '0;
    end else begin
      iss_valid <= (state == S_ITER) || (state == S_RED);
      iss_op    <= (state == S_RED) ? OP_REDUCE : OP_RESCALE;
      iss_tag   <= (state == S_RED) ? cnt[RW-1:0] : rtr[RW-1:0];
    end
  end

  assign ext_rd_data = mem_rd_data;

  rref_col_mem #(.N(N), .K(K), .W(W)) u_mem (
    .clk, .rst_n,
    .init    (mem_init),
    .swap_en (mem_swap),
    .swap_a  (rtr[RW-1:0]),
    .swap_b  (mem_swap_b),
    .wr_en   (mem_wr),
    .wr_row  (mem_wr_row),
    .wr_data (mem_wr_data),
    .rd_en   (mem_rd),
    .rd_row  (mem_rd_row),
    .rd_data (mem_rd_data)
  );

  rref_row_arith #(.N(N), .K(K), .Q(Q)) u_arith (
    .clk, .rst_n,
    .in_valid  (iss_valid),
    .in_op     (iss_op),
    .in_skip   (iss_tag == rtr[RW-1:0]),
    .in_pcol   (piv_col),
    .in_tag    (iss_tag),
    .in_row    (mem_rd_data),
    .out_valid (ar_valid),
    .out_op    (ar_op),
    .out_tag   (ar_tag),
    .out_row   (ar_row),
    .pivot_row (ar_pivot)
  );

  // Search: during loading over the incoming rows, afterwards over the
  // reduced rows leaving the pipeline.
  always_comb begin
    if (state == S_LOAD) begin
      ps_clear   = 1'b0;
      ps_valid   = ld_valid;
      ps_idx     = cnt[RW-1:0];
      ps_data    = ld_row;
    end else begin
      ps_clear   = ar_valid && (ar_op == OP_RESCALE);
      ps_valid   = ar_valid && (ar_op == OP_REDUCE);
      ps_idx     = ar_tag;
      ps_data    = ar_row;
    end
    if (state == S_IDLE) begin
      ps_clear   = start;
      ps_min_col = '0;
      ps_row_lo  = '0;
    end else begin
      ps_min_col = next_min;
      ps_row_lo  = RW'(rtr + 1'b1);
    end
  end

  // Interface rules: a run starts only when idle, rows arrive only while
  // loading, and the external read port is used only when idle (it shares
  // the memory read port with the controller).
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);
  a_ld_in_load: assert property (@(posedge clk) disable iff (!rst_n) ld_valid |-> state == S_LOAD);
  a_rd_idle:    assert property (@(posedge clk) disable iff (!rst_n) ext_rd_en |-> state == S_IDLE);

  rref_pivot_search #(.N(N), .K(K), .W(W)) u_search (
    .clk, .rst_n,
    .clear      (ps_clear),
    .min_col    (ps_min_col),
    .row_lo     (ps_row_lo),
    .row_valid  (ps_valid),
    .row_idx    (ps_idx),
    .row_data   (ps_data),
    .best_valid (ps_best_valid),
    .best_row   (ps_best_row),
    .best_col   (ps_best_col)
  );

endmodule
