// tb_stream_fifo: self-checking test of stream_fifo.
// Random pushes and pops against a queue reference model; checks data order,
// out_valid against the reference occupancy, in_ready (low exactly when the
// FIFO holds DEPTH tokens) and that a token is visible one cycle after push.
module tb_stream_fifo;
  localparam int DW = 8, DEPTH = 3;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [DW-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0, full_seen = 0;
  logic [DW-1:0] q[$];

  stream_fifo #(.DATA_W(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0;   // asynchronous reset from the first nanosecond
    repeat (3) @(posedge clk);
    rst_n = 1;
    // write one, it must show the next cycle
    @(negedge clk); in_valid = 1; in_data = 8'h5a;
    @(negedge clk); in_valid = 0;
    check(out_valid && out_data == 8'h5a, "one-cycle latency"); out_ready = 1;
    @(negedge clk); out_ready = 0;
    check(!out_valid, "empty after pop");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(99) < 60);
      in_data  = DW'($urandom);
      out_ready = ($urandom_range(99) < ((i / 500) % 2 ? 80 : 30));
      #1;
      check(out_valid == (q.size() != 0), "out_valid");
      check(in_ready == (q.size() != DEPTH), "in_ready");
      if (q.size() == DEPTH) full_seen++;
      if (out_valid && q.size() != 0) check(out_data == q[0], "data order");
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    check(full_seen > 0, "full state reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
