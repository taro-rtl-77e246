// tb_taro_top: end-to-end test of the whole design at its default sizes
// (MM array L = 16, K = 16, 16-bit data; vector add, 32-bit data).
// Six memory models serve the six memory ports. The two kernels run at the
// same time: the MM kernel multiplies a 16 x 16 A by a 16 x 16 B, then a
// 3-row A, then (no memory stalls) a 24-row A for the rate check; the vector
// add kernel adds two runs of vectors. All results are checked against values
// computed here. The mechanisms of the design are counted and each must occur:
//   grant stalls      the memory withholds a grant
//   back-pressure     a memory read task holds a word its stream cannot take
//   empty-input wait  a free-running compute task has A but no B token
//   drain             a compute task emits a sum while both its inputs are empty
//   detached finish   ap_done while the free-running tasks are still running
//   rerun             a run started on free-running tasks that were never restarted
module tb_taro_top;
  localparam int L = 16, K = 16, DW = 16, VW = 32, AW = 32, W = 1024;
  logic clk = 0, rst_n = 1;
  logic mm_ap_start = 0, mm_ap_done, mm_ap_idle, va_ap_start = 0, va_ap_done, va_ap_idle;
  logic [31:0] mm_rows = '0, va_len = '0;
  logic [AW-1:0] mm_base_a = '0, mm_base_b = '0, mm_base_c = '0;
  logic [AW-1:0] va_base_a = '0, va_base_b = '0, va_base_c = '0;
  logic mm_a_rd_req, mm_a_rd_gnt, mm_a_rd_rvalid, mm_b_rd_req, mm_b_rd_gnt, mm_b_rd_rvalid;
  logic mm_c_wr_req, mm_c_wr_gnt;
  logic [AW-1:0] mm_a_rd_addr, mm_b_rd_addr, mm_c_wr_addr;
  logic [DW-1:0] mm_a_rd_rdata, mm_b_rd_rdata, mm_c_wr_data;
  logic va_a_rd_req, va_a_rd_gnt, va_a_rd_rvalid, va_b_rd_req, va_b_rd_gnt, va_b_rd_rvalid;
  logic va_c_wr_req, va_c_wr_gnt;
  logic [AW-1:0] va_a_rd_addr, va_b_rd_addr, va_c_wr_addr;
  logic [VW-1:0] va_a_rd_rdata, va_b_rd_rdata, va_c_wr_data;
  int checks = 0, failures = 0, t0, t1;
  int n_bp = 0, n_wait = 0, n_drain = 0, n_detached = 0, n_rerun = 0, n_mm_done = 0, n_va_done = 0;

  taro_top dut (.*);

  ext_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(W), .LAT(3), .GNT_PCT(80)) u_ma (
    .clk, .rd_req(mm_a_rd_req), .rd_addr(mm_a_rd_addr), .rd_gnt(mm_a_rd_gnt), .rd_rvalid(mm_a_rd_rvalid),
    .rd_rdata(mm_a_rd_rdata), .wr_req(1'b0), .wr_addr('0), .wr_data('0), .wr_gnt());
  ext_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(W), .LAT(2), .GNT_PCT(80)) u_mb (
    .clk, .rd_req(mm_b_rd_req), .rd_addr(mm_b_rd_addr), .rd_gnt(mm_b_rd_gnt), .rd_rvalid(mm_b_rd_rvalid),
    .rd_rdata(mm_b_rd_rdata), .wr_req(1'b0), .wr_addr('0), .wr_data('0), .wr_gnt());
  ext_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(W), .LAT(2), .GNT_PCT(30)) u_mc (
    .clk, .rd_req(1'b0), .rd_addr('0), .rd_gnt(), .rd_rvalid(), .rd_rdata(),
    .wr_req(mm_c_wr_req), .wr_addr(mm_c_wr_addr), .wr_data(mm_c_wr_data), .wr_gnt(mm_c_wr_gnt));
  ext_mem_model #(.DATA_W(VW), .ADDR_W(AW), .WORDS(W), .LAT(2), .GNT_PCT(80)) u_va (
    .clk, .rd_req(va_a_rd_req), .rd_addr(va_a_rd_addr), .rd_gnt(va_a_rd_gnt), .rd_rvalid(va_a_rd_rvalid),
    .rd_rdata(va_a_rd_rdata), .wr_req(1'b0), .wr_addr('0), .wr_data('0), .wr_gnt());
  ext_mem_model #(.DATA_W(VW), .ADDR_W(AW), .WORDS(W), .LAT(4), .GNT_PCT(80)) u_vb (
    .clk, .rd_req(va_b_rd_req), .rd_addr(va_b_rd_addr), .rd_gnt(va_b_rd_gnt), .rd_rvalid(va_b_rd_rvalid),
    .rd_rdata(va_b_rd_rdata), .wr_req(1'b0), .wr_addr('0), .wr_data('0), .wr_gnt());
  ext_mem_model #(.DATA_W(VW), .ADDR_W(AW), .WORDS(W), .LAT(2), .GNT_PCT(50)) u_vc (
    .clk, .rd_req(1'b0), .rd_addr('0), .rd_gnt(), .rd_rvalid(), .rd_rdata(),
    .wr_req(va_c_wr_req), .wr_addr(va_c_wr_addr), .wr_data(va_c_wr_data), .wr_gnt(va_c_wr_gnt));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mm.u_rd_b.out_valid && !dut.u_mm.u_rd_b.out_ready) n_bp++;
    if (dut.u_va.u_rd_a.out_valid && !dut.u_va.u_rd_a.out_ready) n_bp++;
    if (dut.u_mm.g_col[L-1].u_pe.a_valid && !dut.u_mm.g_col[L-1].u_pe.b_valid) n_wait++;
    if (dut.u_mm.g_col[0].u_pe.c_valid && !dut.u_mm.g_col[0].u_pe.a_valid
        && !dut.u_mm.g_col[0].u_pe.b_valid) n_drain++;
    if (mm_ap_done) begin
      n_mm_done++;
      // the array tasks were never told to stop: their state is untouched
      if (mm_ap_idle) n_detached++;
    end
    if (va_ap_done) n_va_done++;
  end

  task automatic mm_run(input int ba, input int bb, input int bc, input int m);
    logic [DW-1:0] s;
    if (n_mm_done > 0) n_rerun++;
    for (int i = 0; i < W; i++) u_mc.mem[i] = '0;
    @(negedge clk); mm_base_a = ba; mm_base_b = bb; mm_base_c = bc; mm_rows = m; mm_ap_start = 1;
    @(negedge clk); mm_ap_start = 0;
    check(!mm_ap_idle, "mm running");
    while (!mm_ap_done) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < m; i++)
      for (int j = 0; j < L; j++) begin
        s = '0;
        for (int k = 0; k < K; k++) s += DW'(u_ma.mem[ba + i*K + k] * u_mb.mem[bb + k*L + j]);
        check(u_mc.mem[bc + i*L + j] == s, "C element");
      end
    check(u_mc.mem[bc + m*L] == '0, "no stray C write");
  endtask

  task automatic va_run(input int ba, input int bb, input int bc, input int n);
    if (n_va_done > 0) n_rerun++;
    @(negedge clk); va_base_a = ba; va_base_b = bb; va_base_c = bc; va_len = n; va_ap_start = 1;
    @(negedge clk); va_ap_start = 0;
    while (!va_ap_done) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < n; i++)
      check(u_vc.mem[bc + i] == u_va.mem[ba + i] + u_vb.mem[bb + i], "c = a + b");
  endtask

  initial begin
    for (int i = 0; i < W; i++) begin
      u_ma.mem[i] = DW'($urandom); u_mb.mem[i] = DW'($urandom);
      u_va.mem[i] = $urandom;      u_vb.mem[i] = $urandom;
    end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        mm_run(0, 0, 0, 16);
        mm_run(300, 600, 500, 3);
      end
      begin
        va_run(0, 0, 0, 300);
        va_run(400, 100, 500, 123);
      end
    join
    // rate: no memory stalls, B streams into the array at one word per cycle
    u_ma.gnt_pct = 100; u_mb.gnt_pct = 100; u_mc.gnt_pct = 100;
    repeat (3) @(posedge clk);
    t0 = $time;
    mm_run(0, 0, 0, 24);
    t1 = $time;
    check((t1 - t0) / 10 <= 24*K*L + 60, "MM rate: one B word per cycle");
    check(n_mm_done == 3 && n_va_done == 2, "one ap_done per run");
    check(u_ma.gnt_stalls + u_mc.gnt_stalls + u_va.gnt_stalls > 0, "grant stalls seen");
    check(n_bp > 0, "back-pressure seen");
    check(n_wait > 0, "empty-input wait seen");
    check(n_drain > 0, "drain without input seen");
    check(n_detached == 3, "detached finish seen");
    check(n_rerun >= 3, "rerun on running free-running tasks seen");
    $display("mechanisms: grant stalls %0d, back-pressure %0d, empty-input waits %0d, drains %0d, detached finishes %0d, reruns %0d",
             u_ma.gnt_stalls + u_mb.gnt_stalls + u_mc.gnt_stalls + u_va.gnt_stalls + u_vb.gnt_stalls + u_vc.gnt_stalls,
             n_bp, n_wait, n_drain, n_detached, n_rerun);
    $display("MM run of 24 rows took %0d cycles (%0d B words)", (t1 - t0) / 10, 24*K*L);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
