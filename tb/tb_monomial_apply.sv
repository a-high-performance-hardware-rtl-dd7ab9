// tb_monomial_apply: (1) the 4 x 5 example over F_7: RREF generator rows
// times a 5 x 5 monomial matrix, with the product written out by hand;
// (2) random rows and random monomials over F_127 at N = 16, streamed one
// row per cycle, checked against a plain matrix product G * Q computed in
// the testbench from the full N x N monomial matrix. Latency must be 2.
module tb_monomial_apply;
  localparam int N1 = 5,  Q1 = 7,   W1 = 3, C1 = 3;
  localparam int N2 = 16, Q2 = 127, W2 = 7, C2 = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  // small instance
  logic [N1-1:0][C1-1:0] perm1;
  logic [N1-1:0][W1-1:0] scale1, in1, out1;
  logic v_in1, v_out1;
  monomial_apply #(.N(N1), .Q(Q1)) u1 (.clk, .rst_n, .perm(perm1), .scale(scale1),
    .in_valid(v_in1), .in_row(in1), .out_valid(v_out1), .out_row(out1));

  // large instance
  logic [N2-1:0][C2-1:0] perm2;
  logic [N2-1:0][W2-1:0] scale2, in2, out2;
  logic v_in2, v_out2;
  monomial_apply #(.N(N2), .Q(Q2)) u2 (.clk, .rst_n, .perm(perm2), .scale(scale2),
    .in_valid(v_in2), .in_row(in2), .out_valid(v_out2), .out_row(out2));

  int G1 [4][5] = '{'{1,1,0,0,5}, '{0,0,1,0,6}, '{0,0,0,1,2}, '{0,0,0,0,0}};
  int E1 [4][5] = '{'{3,3,0,1,0}, '{0,5,2,0,0}, '{0,4,0,0,6}, '{0,0,0,0,0}};

  typedef logic [N2-1:0][W2-1:0] row2_t;
  row2_t expq[$];
  int    tq[$];

  always @(negedge clk) if (v_out2) begin
    checks++;
    if (expq.size() == 0 || out2 !== expq[0] || cyc - tq[0] != 2) begin
      failures++; $display("FAIL large row: got %h", out2);
    end
    if (expq.size() != 0) begin void'(expq.pop_front()); void'(tq.pop_front()); end
  end

  initial begin
    int qm [N2][N2];
    int pi [N2];
    v_in1 = 0; v_in2 = 0; in1 = '0; in2 = '0;
    // Q of the small example: column j has its non-zero in row perm[j]
    perm1  = {C1'(3), C1'(0), C1'(2), C1'(4), C1'(1)};   // perm[0..4] = 1,4,2,0,3
    scale1 = {W1'(6), W1'(1), W1'(2), W1'(2), W1'(3)};   // scale[0..4] = 3,2,2,1,6
    perm2 = '0; scale2 = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 4; r++) begin
      for (int j = 0; j < N1; j++) in1[j] = W1'(G1[r][j]);
      v_in1 = 1; @(negedge clk); v_in1 = 0; @(negedge clk);
      for (int j = 0; j < N1; j++) begin
        checks++;
        if (int'(out1[j]) != E1[r][j] || !v_out1) begin
          failures++; $display("FAIL example row %0d col %0d: got %0d expected %0d", r, j, out1[j], E1[r][j]);
        end
      end
    end
    // random monomials, rows streamed back to back
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < N2; i++) pi[i] = i;
      pi.shuffle();
      for (int i = 0; i < N2; i++) for (int j = 0; j < N2; j++) qm[i][j] = 0;
      for (int j = 0; j < N2; j++) begin
        qm[pi[j]][j] = 1 + $urandom_range(Q2 - 2);
        perm2[j]  = C2'(pi[j]);
        scale2[j] = W2'(qm[pi[j]][j]);
      end
      for (int r = 0; r < 8; r++) begin
        row2_t g, e;
        for (int j = 0; j < N2; j++) g[j] = W2'($urandom_range(Q2 - 1));
        for (int j = 0; j < N2; j++) begin
          int acc;
          acc = 0;
          for (int i = 0; i < N2; i++) acc = (acc + int'(g[i]) * qm[i][j]) % Q2;
          e[j] = W2'(acc);
        end
        in2 = g; v_in2 = 1;
        expq.push_back(e); tq.push_back(cyc);
        @(negedge clk);
      end
      v_in2 = 0;
      repeat (3) @(negedge clk);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL missing rows"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
