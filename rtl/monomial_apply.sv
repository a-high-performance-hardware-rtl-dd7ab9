// monomial_apply: multiplies generator-matrix rows by a monomial matrix.
//
// A monomial matrix Q (N x N over F_q) has exactly one non-zero entry in
// each row and column, so G' = G * Q permutes and scales the columns of G:
//   G'[r][j] = G[r][perm[j]] * scale[j]  (mod q)
// where perm[j] is the row index of the non-zero entry in column j of Q and
// scale[j] that entry. The unit transforms one row per cycle: an N-way
// crossbar selects the source column of every output column, then every
// lane multiplies by its scale and reduces mod q.
//
// Interface and timing: in_valid/in_row accepted every cycle; out_valid /
// out_row follow two cycles later (stage 1: crossbar and product, stage 2:
// mod q). perm and scale must stay stable while rows are in flight.
// The operation G * Q is the one the LESS signing and verification apply to
// a generator before reduction; the crossbar structure is this design's own.
module monomial_apply #(
  parameter int unsigned N = less_pkg::N_L1,
  parameter int unsigned Q = less_pkg::Q_LESS,
  localparam int unsigned W  = $clog2(Q),
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][CW-1:0] perm,
  input  logic [N-1:0][W-1:0]  scale,
  input  logic                 in_valid,
  input  logic [N-1:0][W-1:0]  in_row,
  output logic                 out_valid,
  output logic [N-1:0][W-1:0]  out_row
);

  logic                   v1;
  logic [N-1:0][2*W-1:0]  p1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < N; j++) begin
      p1[j]      <= in_row[perm[j]] * scale[j];
      out_row[j] <= W'(p1[j] % (2*W)'(Q));
    end
  end

endmodule
