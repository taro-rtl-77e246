// tb_mm_sweep: runs the MM array at the other sizes of its evaluation.
// Array lengths L = 2, 4, 8 and 32 (3 memory tasks among 4L array tasks give
// 37.5%, 18.8%, 9.4% and 2.3% memory-access tasks) with 16-bit data, and
// L = 16 with 32- and 64-bit integer data (C int and long long). K = 16
// throughout. Each size multiplies a random A by a random B once and checks
// every element of C and the run time.
module tb_mm_sweep;
  logic clk = 0, rst_n = 1, go = 0;
  localparam int N = 6;
  logic [N-1:0] fin;
  int c[N], f[N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mm_sweep_harness #(.L(2),  .K(16), .DW(16), .ROWS(8)) h0 (.clk, .rst_n, .go, .fin(fin[0]), .checks(c[0]), .failures(f[0]));
  mm_sweep_harness #(.L(4),  .K(16), .DW(16), .ROWS(8)) h1 (.clk, .rst_n, .go, .fin(fin[1]), .checks(c[1]), .failures(f[1]));
  mm_sweep_harness #(.L(8),  .K(16), .DW(16), .ROWS(8)) h2 (.clk, .rst_n, .go, .fin(fin[2]), .checks(c[2]), .failures(f[2]));
  mm_sweep_harness #(.L(32), .K(16), .DW(16), .ROWS(4)) h3 (.clk, .rst_n, .go, .fin(fin[3]), .checks(c[3]), .failures(f[3]));
  mm_sweep_harness #(.L(16), .K(16), .DW(32), .ROWS(4)) h4 (.clk, .rst_n, .go, .fin(fin[4]), .checks(c[4]), .failures(f[4]));
  mm_sweep_harness #(.L(16), .K(16), .DW(64), .ROWS(4)) h5 (.clk, .rst_n, .go, .fin(fin[5]), .checks(c[5]), .failures(f[5]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    go = 1;
    wait (fin == '1);
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
