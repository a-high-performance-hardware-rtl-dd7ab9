// rref_row_arith: pipelined row-wide modular arithmetic of the RREF unit.
//
// One datapath of N parallel lanes serves both row operations:
//   OP_RESCALE : out = row * inv(row[pcol])           (rescale pivot row)
//   OP_REDUCE  : out = row - row[pcol] * pivot_row     (reduce another row)
// Each lane computes a * f mod q with a = row[c] (rescale) or the stored
// pivot row element (reduce), and f the per-row factor, then subtracts from
// row[c] for a reduce. The result of a rescale is also captured in the pivot
// row register, which the following reduce operations read. A reduce with
// in_skip set returns the pivot row itself (used for the pivot row's own
// slot in the reduce pass, which keeps the schedule constant and lets that
// slot be read before the rescaled row has been written back).
//
// Pipeline (a new row may enter every cycle, latency LAT = 4 cycles):
//   S1  factor select: N:1 mux of row[pcol] and the inverse look-up
//   S2  N products a * f
//   S3  N reductions mod q
//   S4  subtract mod q (reduce) or pass (rescale); result registered
// A reduce may enter three cycles after the rescale whose result it uses:
// while that result is on out_row it is forwarded to the multipliers, and
// from the next cycle on it is in the pivot row register.
// Sharing the lanes between the two operations, the pivot row register and
// pipelining follow the published architecture; the stage split is this design's own.
module rref_row_arith #(
  parameter int unsigned N = less_pkg::N_L1,
  parameter int unsigned K = less_pkg::K_L1,
  parameter int unsigned Q = less_pkg::Q_LESS,
  localparam int unsigned W  = $clog2(Q),
  localparam int unsigned RW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  less_pkg::row_op_e    in_op,
  input  logic                 in_skip,
  input  logic [CW-1:0]        in_pcol,
  input  logic [RW-1:0]        in_tag,
  input  logic [N-1:0][W-1:0]  in_row,
  output logic                 out_valid,
  output less_pkg::row_op_e    out_op,
  output logic [RW-1:0]        out_tag,
  output logic [N-1:0][W-1:0]  out_row,
  output logic [N-1:0][W-1:0]  pivot_row
);
  import less_pkg::*;

  // Inverse table, built at elaboration
  logic [W-1:0] inv_rom [2**W];
  always_comb begin
    for (int a = 0; a < 2**W; a++) inv_rom[a] = W'(mod_inv(a, Q));
  end

  typedef struct packed {
    logic              valid;
    row_op_e           op;
    logic              skip;
    logic [RW-1:0]     tag;
  } ctl_t;

  ctl_t                       c1, c2, c3;
  logic [N-1:0][W-1:0]        r1, r2, r3;
  logic [W-1:0]               f1;
  logic [N-1:0][2*W-1:0]      p2;
  logic [N-1:0][W-1:0]        m3;
  logic [N-1:0][W-1:0]        piv_fwd;

  // Pivot row, forwarded from the output while it is being stored
  assign piv_fwd = (out_valid && out_op == OP_RESCALE) ? out_row : pivot_row;

  // S1: factor selection
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c1 <= '0;
    else        c1 <= '{valid: in_valid, op: in_op, skip: in_skip, tag: in_tag};
  end
  always_ff @(posedge clk) begin
    r1 <= in_row;
    if (in_op == OP_RESCALE) f1 <= inv_rom[in_row[in_pcol]];
    else                     f1 <= in_skip ? '0 : in_row[in_pcol];
  end

  // S2: products
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c2 <= '0;
    else        c2 <= c1;
  end
  always_ff @(posedge clk) begin
    r2 <= r1;
    for (int c = 0; c < N; c++)
      p2[c] <= (2*W)'(c1.op == OP_RESCALE ? r1[c] : piv_fwd[c]) * (2*W)'(f1);
  end

  // S3: reduction mod q
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c3 <= '0;
    else        c3 <= c2;
  end
  always_ff @(posedge clk) begin
    r3 <= r2;
    for (int c = 0; c < N; c++) m3[c] <= W'(p2[c] % (2*W)'(Q));
  end

  // S4: modular subtraction or pass-through
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_op    <= OP_RESCALE;
      out_tag   <= '0;
    end else begin
      out_valid <= c3.valid;
      out_op    <= c3.op;
      out_tag   <= c3.tag;
    end
  end
  always_ff @(posedge clk) begin
    for (int c = 0; c < N; c++) begin
      if (c3.op == OP_RESCALE)   out_row[c] <= m3[c];
      else if (c3.skip)          out_row[c] <= piv_fwd[c];
      else if (r3[c] >= m3[c])   out_row[c] <= r3[c] - m3[c];
      else                       out_row[c] <= W'((W+1)'(r3[c]) + (W+1)'(Q) - (W+1)'(m3[c]));
    end
  end

  // Pivot row register, loaded by each rescale result
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pivot_row <= '0;
    else if (out_valid && out_op == OP_RESCALE) pivot_row <= out_row;
  end

endmodule
