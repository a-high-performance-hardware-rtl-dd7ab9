// rref_col_mem: matrix storage of the RREF unit.
//
// The k x n matrix is held in N independent column RAMs, each K words of W
// bits: RAM c holds column c. Reading or writing the same address in all N
// RAMs at once moves a whole matrix row in one cycle. The RAMs have a
// separate write port and read port (simple dual port), so a row can be read
// while another is written.
//
// Rows are addressed logically. A translation table maps each logical row to
// the physical RAM address that holds it, so swapping two rows is a swap of
// two table entries: one cycle, whatever the rows hold (constant time).
//
// Interface and timing:
//   init      : resets the translation table to the identity (one cycle).
//   swap_en   : exchanges the table entries of logical rows swap_a, swap_b.
//   wr_en     : writes wr_data into logical row wr_row (translated with the
//               table as it stands in that cycle).
//   rd_en     : reads logical row rd_row; rd_data is valid one cycle later.
// The RAM contents are not reset; the table is. A write and a swap in the
// same cycle use the table from before the swap.
// Column RAMs, the translation table and the separate ports follow the
// published column-memory architecture; the port protocol is this
// design's own.
module rref_col_mem #(
  parameter int unsigned N = less_pkg::N_L1,
  parameter int unsigned K = less_pkg::K_L1,
  parameter int unsigned W = $clog2(less_pkg::Q_LESS),
  localparam int unsigned RW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic                 swap_en,
  input  logic [RW-1:0]        swap_a,
  input  logic [RW-1:0]        swap_b,
  input  logic                 wr_en,
  input  logic [RW-1:0]        wr_row,
  input  logic [N-1:0][W-1:0]  wr_data,
  input  logic                 rd_en,
  input  logic [RW-1:0]        rd_row,
  output logic [N-1:0][W-1:0]  rd_data
);

  logic [RW-1:0] xlat [K];
  logic [RW-1:0] wr_addr, rd_addr;

  assign wr_addr = xlat[wr_row];
  assign rd_addr = xlat[rd_row];

  // Address translation table
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) xlat[i] <= RW'(i);
    end else if (init) begin
      for (int i = 0; i < K; i++) xlat[i] <= RW'(i);
    end else if (swap_en) begin
      xlat[swap_a] <= xlat[swap_b];
      xlat[swap_b] <= xlat[swap_a];
    end
  end

  // One RAM per column
  for (genvar c = 0; c < N; c++) begin : g_col
    logic [W-1:0] ram [K];
    always_ff @(posedge clk) begin
      if (wr_en) ram[wr_addr] <= wr_data[c];
      if (rd_en) rd_data[c] <= ram[rd_addr];
    end
  end

endmodule
