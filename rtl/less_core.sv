// less_core: LESS matrix engine, RREF(G * Q) with canonical column order.
//
// The central computation of LESS key generation, signing and verification
// is to take a generator matrix G (K x N over F_q), multiply it by a monomial
// matrix Q, bring the product to reduced row echelon form and put the
// non-pivot columns into a canonical (sorted) order, which is what gets
// hashed and transmitted. This module chains the units that do it:
//
//   rows of G --> monomial_apply --> rref_unit --> col_sort --> sorted rows
//                 (perm, scale)      (column       (reads the reduced
//                                     memory)        matrix back a row at a
//                                                    time)
//
// With use_monomial low the rows bypass the monomial transform, which gives
// RREF(G) itself (for instance to bring a freshly sampled generator to
// systematic form during key generation).
//
// Interface and timing:
//   start               begins an operation; use_monomial, perm and scale are
//                       sampled while the rows pass and must stay stable.
//   g_valid / g_row     the K rows of G, row 0 first, at most one per cycle.
//   out_valid/out_tag/  K rows of the sorted non-pivot part (M = N - K
//   out_row             elements each), row out_tag.
//   col_idx             sorted non-pivot column indices.
//   pivot_mask          pivot columns of RREF(G * Q).
//   full_rank, sort_ok  low if the product had rank below K.
//   done                one-cycle pulse after the last output row.
//   Latency after the last row of G: 2 + K*(K+8) cycles for the
//   reduction, then N + (N-K)*(K+2) + K + 2 cycles for sorting and output.
// The hash, the CSPRNG that expands seeds into G and Q, and the protocol
// sequencing around this engine are not part of this module.
module less_core #(
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
  input  logic                 use_monomial,
  input  logic [N-1:0][CW-1:0] perm,
  input  logic [N-1:0][W-1:0]  scale,
  input  logic                 g_valid,
  input  logic [N-1:0][W-1:0]  g_row,
  output logic                 busy,
  output logic                 done,
  output logic                 full_rank,
  output logic                 sort_ok,
  output logic [N-1:0]         pivot_mask,
  output logic [M-1:0][CW-1:0] col_idx,
  output logic                 out_valid,
  output logic [RW-1:0]        out_tag,
  output logic [M-1:0][W-1:0]  out_row
);

  logic                mono_valid;
  logic [N-1:0][W-1:0] mono_row;
  logic                byp_valid, byp_valid2;
  logic [N-1:0][W-1:0] byp_row, byp_row2;
  logic                ld_valid;
  logic [N-1:0][W-1:0] ld_row;

  logic                rref_busy, rref_done;
  logic                rd_en;
  logic [RW-1:0]       rd_row;
  logic [N-1:0][W-1:0] rd_data;
  logic                sort_busy;

  monomial_apply #(.N(N), .Q(Q)) u_mono (
    .clk, .rst_n,
    .perm, .scale,
    .in_valid  (g_valid && use_monomial),
    .in_row    (g_row),
    .out_valid (mono_valid),
    .out_row   (mono_row)
  );

  // Bypass path with the same two-cycle delay as the monomial unit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byp_valid  <= 1'b0;
      byp_valid2 <= 1'b0;
    end else begin
      byp_valid  <= g_valid && !use_monomial;
      byp_valid2 <= byp_valid;
    end
  end
  always_ff @(posedge clk) begin
    byp_row  <= g_row;
    byp_row2 <= byp_row;
  end

  assign ld_valid = mono_valid || byp_valid2;
  assign ld_row   = mono_valid ? mono_row : byp_row2;

  rref_unit #(.N(N), .K(K), .Q(Q)) u_rref (
    .clk, .rst_n,
    .start       (start),
    .ld_valid    (ld_valid),
    .ld_row      (ld_row),
    .busy        (rref_busy),
    .done        (rref_done),
    .full_rank   (full_rank),
    .pivot_mask  (pivot_mask),
    .ext_rd_en   (rd_en),
    .ext_rd_row  (rd_row),
    .ext_rd_data (rd_data)
  );

  col_sort #(.N(N), .K(K), .Q(Q)) u_sort (
    .clk, .rst_n,
    .start      (rref_done),
    .pivot_mask (pivot_mask),
    .rd_en, .rd_row, .rd_data,
    .busy       (sort_busy),
    .done       (done),
    .ok         (sort_ok),
    .col_idx, .out_valid, .out_tag, .out_row
  );

  assign busy = rref_busy || sort_busy;

endmodule
