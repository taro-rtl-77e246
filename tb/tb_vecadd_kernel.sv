// tb_vecadd_kernel: end-to-end test of the vector-add kernel.
// Three memory models (A, B read; C write) with random grant stalls. Three
// runs of different lengths are started one after another, with the adder
// never restarted; each run must store C = A + B (32-bit wrap), pulse ap_done
// once and leave nothing outside C written. A last run with no stalls checks
// the rate: about one element per cycle.
module tb_vecadd_kernel;
  localparam int DW = 32, AW = 32, W = 1024;
  logic clk = 0, rst_n = 1, ap_start = 0, ap_done, ap_idle;
  logic [31:0] len = '0;
  logic [AW-1:0] base_a = '0, base_b = '0, base_c = '0;
  logic a_rd_req, a_rd_gnt, a_rd_rvalid, b_rd_req, b_rd_gnt, b_rd_rvalid, c_wr_req, c_wr_gnt;
  logic [AW-1:0] a_rd_addr, b_rd_addr, c_wr_addr;
  logic [DW-1:0] a_rd_rdata, b_rd_rdata, c_wr_data;
  int checks = 0, failures = 0, dones = 0, t0, t1;

  vecadd_kernel #(.DATA_W(DW)) dut (.*);
  ext_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(W), .LAT(3), .GNT_PCT(70)) u_ma (
    .clk, .rd_req(a_rd_req), .rd_addr(a_rd_addr), .rd_gnt(a_rd_gnt), .rd_rvalid(a_rd_rvalid),
    .rd_rdata(a_rd_rdata), .wr_req(1'b0), .wr_addr('0), .wr_data('0), .wr_gnt());
  ext_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(W), .LAT(2), .GNT_PCT(70)) u_mb (
    .clk, .rd_req(b_rd_req), .rd_addr(b_rd_addr), .rd_gnt(b_rd_gnt), .rd_rvalid(b_rd_rvalid),
    .rd_rdata(b_rd_rdata), .wr_req(1'b0), .wr_addr('0), .wr_data('0), .wr_gnt());
  ext_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(W), .LAT(2), .GNT_PCT(70)) u_mc (
    .clk, .rd_req(1'b0), .rd_addr('0), .rd_gnt(), .rd_rvalid(), .rd_rdata(),
    .wr_req(c_wr_req), .wr_addr(c_wr_addr), .wr_data(c_wr_data), .wr_gnt(c_wr_gnt));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (ap_done) dones++;

  task automatic run(input int ba, input int bb, input int bc, input int n);
    int d0;
    d0 = dones;
    for (int i = 0; i < W; i++) u_mc.mem[i] = '0;
    @(negedge clk); base_a = ba; base_b = bb; base_c = bc; len = n; ap_start = 1;
    @(negedge clk); ap_start = 0;
    check(!ap_idle, "running");
    while (!ap_done) @(posedge clk);
    @(negedge clk);
    check(ap_idle && dones == d0 + 1, "one ap_done, then idle");
    for (int i = 0; i < n; i++)
      check(u_mc.mem[bc + i] == u_ma.mem[ba + i] + u_mb.mem[bb + i], "c = a + b");
    check(u_mc.mem[bc + n] == '0 && (bc == 0 || u_mc.mem[bc - 1] == '0), "no stray write");
  endtask

  initial begin
    for (int i = 0; i < W; i++) begin u_ma.mem[i] = $urandom; u_mb.mem[i] = $urandom; end
    u_ma.mem[5] = 32'hffff_fff0; u_mb.mem[5] = 32'h20;
    #1 rst_n = 0;   // asynchronous reset from the first nanosecond
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 0, 0, 100);
    run(200, 10, 300, 37);
    run(3, 500, 600, 1);
    u_ma.gnt_pct = 100; u_mb.gnt_pct = 100; u_mc.gnt_pct = 100;
    repeat (3) @(posedge clk);
    t0 = $time;
    run(0, 0, 0, 400);
    t1 = $time;
    check((t1 - t0) / 10 <= 400 + 20, "one element per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
