// tb_rref_col_mem: writes random rows, applies random logical row swaps
// through the translation table, and checks every read against a model
// that swaps whole rows. Also checks the one-cycle read latency, that a
// write and a read in the same cycle do not disturb each other, and that
// init restores the identity mapping.
module tb_rref_col_mem;
  localparam int N = 5, K = 6, W = 7, RW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init, swap_en, wr_en, rd_en;
  logic [RW-1:0] swap_a, swap_b, wr_row, rd_row;
  logic [N-1:0][W-1:0] wr_data, rd_data;
  logic [N-1:0][W-1:0] model [K];
  int checks = 0, failures = 0;

  rref_col_mem #(.N(N), .K(K), .W(W)) dut (.*);

  task automatic check_row(input int r);
    rd_en = 1; rd_row = RW'(r);
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data !== model[r]) begin
      failures++;
      $display("FAIL row %0d: got %h expected %h", r, rd_data, model[r]);
    end
  endtask

  initial begin
    init = 0; swap_en = 0; wr_en = 0; rd_en = 0;
    swap_a = 0; swap_b = 0; wr_row = 0; rd_row = 0; wr_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int round = 0; round < 20; round++) begin
      // fresh contents
      init = 1; @(negedge clk); init = 0;
      for (int r = 0; r < K; r++) begin
        logic [N-1:0][W-1:0] d;
        for (int c = 0; c < N; c++) d[c] = W'($urandom);
        model[r] = d;
        wr_en = 1; wr_row = RW'(r); wr_data = d;
        @(negedge clk);
      end
      wr_en = 0;
      for (int s = 0; s < 6; s++) begin
        int a, b;
        logic [N-1:0][W-1:0] t;
        a = $urandom_range(K-1); b = $urandom_range(K-1);
        swap_en = 1; swap_a = RW'(a); swap_b = RW'(b);
        @(negedge clk); swap_en = 0;
        t = model[a]; model[a] = model[b]; model[b] = t;
      end
      // overwrite one logical row while reading another
      begin
        int a, b;
        logic [N-1:0][W-1:0] d;
        a = $urandom_range(K-1); b = (a + 1) % K;
        for (int c = 0; c < N; c++) d[c] = W'($urandom);
        wr_en = 1; wr_row = RW'(a); wr_data = d;
        rd_en = 1; rd_row = RW'(b);
        @(negedge clk); wr_en = 0; rd_en = 0;
        checks++;
        if (rd_data !== model[b]) begin failures++; $display("FAIL concurrent read"); end
        model[a] = d;
      end
      for (int r = 0; r < K; r++) check_row(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
