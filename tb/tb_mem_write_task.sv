// tb_mem_write_task: self-checking test of the memory sink task.
// A random-stalling source offers numbered tokens, the memory model grants
// writes 50% of the time. Run 1 writes 29 tokens at address 7, run 2 writes
// 12 at address 100, run 3 has count 0. Checks the memory contents, that
// tokens beyond count stay in the stream until the next run, that nothing
// outside the target range is written, and one done pulse per run.
module tb_mem_write_task;
  localparam int DW = 16, AW = 32;
  logic clk = 0, rst_n = 1;
  logic start = 0, done, busy, wr_req, wr_gnt, in_valid = 0, in_ready;
  logic [AW-1:0] base = '0, wr_addr;
  logic [31:0] count = '0;
  logic [DW-1:0] wr_data, in_data;
  int checks = 0, failures = 0, n_in = 0, dones = 0;

  assign in_data = DW'(16'h4000 + n_in);

  mem_write_task #(.DATA_W(DW), .ADDR_W(AW)) dut (.*);
  ext_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(256), .LAT(2), .GNT_PCT(50)) u_mem (
    .clk, .rd_req(1'b0), .rd_addr('0), .rd_gnt(), .rd_rvalid(), .rd_rdata(),
    .wr_req, .wr_addr, .wr_data, .wr_gnt);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) in_valid <= ($urandom_range(99) < 70);
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) n_in <= n_in + 1;
    if (done) dones++;
    if (!busy) check(!in_ready, "no pop while idle");
  end

  task automatic run(input int b, input int c);
    int first;
    first = n_in;
    @(negedge clk); base = AW'(b); count = c; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    check(n_in == first + c, "tokens consumed");
    for (int i = 0; i < c; i++) check(u_mem.mem[b + i] == DW'(16'h4000 + first + i), "stored word");
    check(u_mem.mem[b + c] == '0 && u_mem.mem[b - 1] == '0, "no write outside range");
    repeat (10) @(posedge clk);
    check(n_in == first + c, "extra tokens wait");
  endtask

  initial begin
    #1 rst_n = 0;   // asynchronous reset from the first nanosecond
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(7, 29);
    run(100, 12);
    run(200, 0);
    check(dones == 3, "one done per run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
