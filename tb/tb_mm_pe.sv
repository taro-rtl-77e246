// tb_mm_pe: self-checking test of the compute task mm_pe (K = 4, 16 bit).
// Part 1: exactly K pairs are offered and then the inputs go empty; the sum
// must still come out (the pipeline drains without further input), one cycle
// after the last pair is taken. Part 2: random streams with random stalls on
// both inputs and on the output; every output must equal the wrapped 16-bit
// sum of K products, computed here from the same values.
module tb_mm_pe;
  localparam int DW = 16, K = 4;
  logic clk = 0, rst_n = 1;
  logic a_valid = 0, b_valid = 0, c_ready = 0;
  logic a_ready, b_ready, c_valid;
  logic [DW-1:0] a_data = '0, b_data = '0, c_data;
  int checks = 0, failures = 0, flushes = 0, stalls = 0, n_a = 0, n_c = 0, last_pop;
  logic [DW-1:0] av[$], bv[$], acc;

  mm_pe #(.K(K), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [DW-1:0] ref_row(int r);
    logic [DW-1:0] s = '0;
    for (int k = 0; k < K; k++) s += DW'(av[r*K+k] * bv[r*K+k]);
    return s;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (c_valid) begin
      check(c_data == ref_row(n_c), "row sum");
      if (!a_valid && !b_valid) flushes++;
      n_c++;
    end
    if (a_valid && b_valid && !a_ready) stalls++;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin av.push_back(DW'($urandom)); bv.push_back(DW'($urandom)); end
    #1 rst_n = 0;   // asynchronous reset from the first nanosecond
    repeat (3) @(posedge clk);
    rst_n = 1;
    // part 1: one row, then nothing
    c_ready = 1;
    while (n_a < K) begin
      @(negedge clk); a_valid = 1; b_valid = 1; a_data = av[n_a]; b_data = bv[n_a];
      @(posedge clk); if (a_ready) begin n_a++; last_pop = $time; end
    end
    @(negedge clk); a_valid = 0; b_valid = 0;
    check(c_valid && c_data == ref_row(0), "drains one cycle after last pair");
    repeat (3) @(posedge clk);
    check(n_c == 1, "exactly one output");
    // part 2: random traffic
    for (int i = 0; i < 6000 && n_a < 4000; i++) begin
      @(negedge clk);
      a_valid = ($urandom_range(99) < 70); a_data = av[n_a];
      b_valid = ($urandom_range(99) < 70); b_data = bv[n_a];
      c_ready = ($urandom_range(99) < 50);
      @(posedge clk);
      check(a_ready == b_ready, "pair popped together");
      if (a_ready) check(a_valid && b_valid, "pop only when both present");
      if (a_ready) n_a++;
    end
    @(negedge clk); a_valid = 0; b_valid = 0; c_ready = 1;
    repeat (5) @(posedge clk);
    check(n_c == n_a / K, "output count");
    check(flushes > 0, "drain without input seen");
    check(stalls > 0, "output back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
