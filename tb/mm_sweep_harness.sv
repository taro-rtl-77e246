// mm_sweep_harness: one mm_kernel of a given size with its three memory
// models, run once on random data and checked; used by tb_mm_sweep.
// On `go` it loads random A and B, starts the kernel for ROWS rows, waits for
// ap_done, compares every C element with C = A*B (DW-bit wrap), measures the
// run time and raises `fin`. `checks`/`failures` count the comparisons, plus
// one rate check: without memory stalls the run must take no more than
// ROWS*K*L + 60 cycles (one B word per cycle).
module mm_sweep_harness #(
  parameter int L    = 4,
  parameter int K    = 16,
  parameter int DW   = 16,
  parameter int ROWS = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int AW = 32, W = 4096;
  logic ap_start = 0, ap_done, ap_idle;
  logic a_rd_req, a_rd_gnt, a_rd_rvalid, b_rd_req, b_rd_gnt, b_rd_rvalid, c_wr_req, c_wr_gnt;
  logic [AW-1:0] a_rd_addr, b_rd_addr, c_wr_addr;
  logic [DW-1:0] a_rd_rdata, b_rd_rdata, c_wr_data;
  int t0, cycles;

  mm_kernel #(.L(L), .K(K), .DATA_W(DW)) dut (
    .clk, .rst_n, .ap_start, .ap_done, .ap_idle,
    .rows(32'(ROWS)), .base_a('0), .base_b('0), .base_c('0),
    .a_rd_req, .a_rd_addr, .a_rd_gnt, .a_rd_rvalid, .a_rd_rdata,
    .b_rd_req, .b_rd_addr, .b_rd_gnt, .b_rd_rvalid, .b_rd_rdata,
    .c_wr_req, .c_wr_addr, .c_wr_data, .c_wr_gnt);
  ext_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(W), .LAT(3), .GNT_PCT(100)) u_ma (
    .clk, .rd_req(a_rd_req), .rd_addr(a_rd_addr), .rd_gnt(a_rd_gnt), .rd_rvalid(a_rd_rvalid),
    .rd_rdata(a_rd_rdata), .wr_req(1'b0), .wr_addr('0), .wr_data('0), .wr_gnt());
  ext_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(W), .LAT(2), .GNT_PCT(100)) u_mb (
    .clk, .rd_req(b_rd_req), .rd_addr(b_rd_addr), .rd_gnt(b_rd_gnt), .rd_rvalid(b_rd_rvalid),
    .rd_rdata(b_rd_rdata), .wr_req(1'b0), .wr_addr('0), .wr_data('0), .wr_gnt());
  ext_mem_model #(.DATA_W(DW), .ADDR_W(AW), .WORDS(W), .LAT(2), .GNT_PCT(100)) u_mc (
    .clk, .rd_req(1'b0), .rd_addr('0), .rd_gnt(), .rd_rvalid(), .rd_rdata(),
    .wr_req(c_wr_req), .wr_addr(c_wr_addr), .wr_data(c_wr_data), .wr_gnt(c_wr_gnt));

  initial begin
    logic [DW-1:0] s;
    fin = 0; checks = 0; failures = 0;
    for (int i = 0; i < W; i++) begin
      u_ma.mem[i] = DW'({$urandom, $urandom});
      u_mb.mem[i] = DW'({$urandom, $urandom});
    end
    wait (go);
    @(negedge clk); ap_start = 1;
    t0 = 0;
    @(negedge clk); ap_start = 0;
    while (!ap_done) begin @(posedge clk); t0++; end
    @(negedge clk);
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < L; j++) begin
        s = '0;
        for (int k = 0; k < K; k++) s += DW'(u_ma.mem[i*K + k] * u_mb.mem[k*L + j]);
        checks++;
        if (u_mc.mem[i*L + j] != s) failures++;
      end
    checks++;
    if (t0 > ROWS*K*L + 60) failures++;
    $display("L=%0d K=%0d DATA_W=%0d rows=%0d: %0d cycles for %0d B words, %0d failures",
             L, K, DW, ROWS, t0, ROWS*K*L, failures);
    fin = 1;
  end
endmodule
