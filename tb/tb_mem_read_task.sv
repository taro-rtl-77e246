// tb_mem_read_task: self-checking test of the memory source task.
// The memory model grants requests 60% of the time and answers after 3
// cycles; the stream sink stalls at random. Run 1 reads 37 words once; run 2
// reads 5 words 4 times over (the repeat argument); run 3 has count 0. Checks
// the stream contents and order, that done pulses once per run after the last
// word has left, that no more than BUF_DEPTH words are ever in flight, and, in
// a run with no stalls, the rate of one word per cycle.
module tb_mem_read_task;
  localparam int DW = 16, AW = 32, BUF = 8;
  logic clk = 0, rst_n = 1;
  logic start = 0, done, busy, rd_req, rd_gnt, rd_rvalid, out_valid, out_ready = 0;
  logic [AW-1:0] base = '0, rd_addr;
  logic [31:0] count = '0, repeat_n = '0;
  logic [DW-1:0] rd_rdata, out_data;
  logic wr_gnt_unused;
  int checks = 0, failures = 0, got = 0, dones = 0, t0, t1;
  int unsigned sink_pct = 60;

  mem_read_task #(.DATA_W(DW), .ADDR_W(AW), .BUF_DEPTH(BUF)) dut (.*);
  ext_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(256), .LAT(3), .GNT_PCT(60)) u_mem (
    .clk, .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wr_req(1'b0), .wr_addr('0), .wr_data('0), .wr_gnt(wr_gnt_unused));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) out_ready <= ($urandom_range(99) < sink_pct);
  always @(posedge clk) if (rst_n) begin
    if (done) dones++;
    check(dut.inflight <= BUF, "credit bound");
  end

  task automatic run(input int b, input int c, input int r);
    int n = 0;
    @(negedge clk); base = AW'(b); count = c; repeat_n = r; start = 1;
    @(negedge clk); start = 0;
    got = 0;
    while (!done) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(out_data == DW'(16'h100 + b + (got % c)), "word value and order");
        got++;
      end
    end
    check(got == c * r, "word count");
    check(!out_valid, "nothing left after done");
  endtask

  initial begin
    for (int i = 0; i < 256; i++) u_mem.mem[i] = DW'(16'h100 + i);
    #1 rst_n = 0;   // asynchronous reset from the first nanosecond
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(10, 37, 1);
    run(100, 5, 4);
    @(negedge clk); start = 1; count = 0; repeat_n = 3;
    @(negedge clk); start = 0;
    @(posedge clk); #1 check(done, "empty run done next cycle");
    // no stalls anywhere: one word per cycle after the memory latency
    u_mem.gnt_pct = 100; sink_pct = 100;
    repeat (4) @(posedge clk);
    t0 = $time;
    run(0, 64, 1);
    t1 = $time;
    check((t1 - t0) / 10 <= 64 + 8, "one word per cycle");
    @(posedge clk);
    check(dones == 4, "one done per run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
