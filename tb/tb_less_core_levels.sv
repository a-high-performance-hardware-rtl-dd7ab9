// tb_less_core_levels: the matrix engine built for NIST levels 3 and 5
// (n = 400, k = 200 and n = 548, k = 274, q = 127), one complete random
// operation each, checked element by element against the software model
// and for the latency 2 + K*(K+8) + N + (N-K)*(K+2) + K + 2.
module tb_less_core_levels;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic f3, f5;
  int c3, c5, e3, e5;

  less_core_op #(.N(less_pkg::N_L3), .K(less_pkg::K_L3), .Q(less_pkg::Q_LESS)) u_l3 (
    .clk, .rst_n, .finished(f3), .checks(c3), .failures(e3));
  less_core_op #(.N(less_pkg::N_L5), .K(less_pkg::K_L5), .Q(less_pkg::Q_LESS)) u_l5 (
    .clk, .rst_n, .finished(f5), .checks(c5), .failures(e5));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (f3 && f5);
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c5, e3 + e5);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c5, e3 + e5 + 1);
    $finish;
  end
endmodule
