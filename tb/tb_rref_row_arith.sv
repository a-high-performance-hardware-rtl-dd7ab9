// tb_rref_row_arith: one rescale followed by a back-to-back stream of reduce
// operations (one per cycle, some with in_skip, which must return the pivot
// row). In odd rounds the reduces start three cycles after the rescale, so
// the first one needs the forwarded pivot row. Checks every result against
// modular arithmetic done in the testbench, the pivot row register, the tags
// and the four-cycle latency.
module tb_rref_row_arith;
  import less_pkg::*;
  localparam int N = 9, K = 16, Q = 127, W = 7, RW = 4, CW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_skip, out_valid;
  row_op_e in_op, out_op;
  logic [CW-1:0] in_pcol;
  logic [RW-1:0] in_tag, out_tag;
  logic [N-1:0][W-1:0] in_row, out_row, pivot_row;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  rref_row_arith #(.N(N), .K(K), .Q(Q)) dut (.*);

  // expected results queue
  typedef struct { int t; row_op_e op; logic [RW-1:0] tag; logic [N-1:0][W-1:0] row; } exp_t;
  exp_t expq[$];

  function automatic int inv(int a);
    for (int b = 1; b < Q; b++) if ((a * b) % Q == 1) return b;
    return 0;
  endfunction

  always @(negedge clk) if (out_valid) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = expq.pop_front();
      if (out_row !== e.row || out_tag !== e.tag || out_op !== e.op || cyc - e.t != 4) begin
        failures++;
        $display("FAIL tag %0d: got %h expected %h (lat %0d)", e.tag, out_row, e.row, cyc - e.t);
      end
    end
  end

  initial begin
    logic [N-1:0][W-1:0] piv, r, x;
    int pc, f, iv;
    in_valid = 0; in_skip = 0; in_op = OP_RESCALE; in_pcol = 0; in_tag = 0; in_row = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 30; round++) begin
      pc = $urandom_range(N-1);
      for (int c = 0; c < N; c++) r[c] = W'($urandom_range(Q-1));
      if (round % 5 == 0) r[pc] = 1; else if (r[pc] == 0) r[pc] = 5;
      iv = inv(r[pc]);
      for (int c = 0; c < N; c++) piv[c] = W'((int'(r[c]) * iv) % Q);
      @(negedge clk);
      in_valid = 1; in_op = OP_RESCALE; in_skip = 0; in_pcol = CW'(pc); in_tag = 0; in_row = r;
      expq.push_back('{cyc, OP_RESCALE, RW'(0), piv});
      @(negedge clk);
      in_valid = 0;
      // the first reduce enters 3 cycles after the rescale (forwarding) in
      // odd rounds, later in even rounds (pivot register)
      if (round % 2 == 0) begin
        while (!(out_valid && out_op == OP_RESCALE)) @(negedge clk);
        @(negedge clk);
        checks++;
        if (pivot_row !== piv) begin failures++; $display("FAIL pivot register"); end
      end else begin
        repeat (2) @(negedge clk);
      end
      for (int t = 1; t < K; t++) begin
        bit skip;
        skip = ($urandom_range(5) == 0);
        for (int c = 0; c < N; c++) r[c] = W'($urandom_range(Q-1));
        f = skip ? 0 : r[pc];
        for (int c = 0; c < N; c++) x[c] = W'(((int'(r[c]) - f * int'(piv[c])) % Q + Q) % Q);
        if (skip) x = piv;   // the pivot row's own slot returns the pivot row
        in_valid = 1; in_op = OP_REDUCE; in_skip = skip; in_tag = RW'(t); in_row = r;
        expq.push_back('{cyc, OP_REDUCE, RW'(t), x});
        @(negedge clk);
      end
      in_valid = 0;
      repeat (6) @(negedge clk);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL missing outputs"); end
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
