// mm_kernel: matrix-matrix multiplication on a one-dimensional systolic array
// of free-running tasks, C (rows x L) = A (rows x K) * B (K x L).
//
// The array is a chain of L columns. Column j holds four tasks:
//   B data feed j  (mm_feed_b)  keeps B[k][j] for compute j, forwards the rest
//   A data feed j  (mm_feed_a)  gives every A[i][k] to compute j and forwards it
//   compute j      (mm_pe)      C[i][j] = sum_k A[i][k]*B[k][j]
//   C collect j    (mm_collect) passes C[i][0..j-1] from upstream, then C[i][j]
// External memory is touched only at the chain ends: a read task streams A
// into A feed 0, a read task streams B into B feed 0, and a write task drains
// C collect L-1 into memory. All 4L array tasks are free-running: they have
// no start, done or size input and run on stream tokens alone, so they are
// marked detached in the kernel FSM; only the three memory tasks are started
// on ap_start and awaited before ap_done. The row count (rows) is a run-time
// argument known only to the memory tasks; K and L are compile-time.
//
// Memory layout (word addresses, DATA_W-bit words, row-major):
//   A at base_a, rows*K words;  B at base_b, K*L words;  C at base_c, rows*L.
// B is read once per row of A (repeat = rows), in the order B[k][0..L-1] for
// k = 0..K-1, because the feed and compute tasks keep no matrix storage.
// Each task pair is joined by a stream_fifo of FIFO_DEPTH words. Peak rate is
// one B word per cycle into the chain, i.e. one A/B pair per compute task
// every L cycles; a run takes about rows*K*L cycles.
// The chain of feed, compute and collect tasks with memory at its two ends is
// the structure given for the array; the contents of each task, the B
// re-streaming, the memory layout and the port protocol are this design's.
module mm_kernel
  import taro_pkg::*;
#(
  parameter int unsigned L          = 16,
  parameter int unsigned K          = 16,
  parameter int unsigned DATA_W     = SHORT_W,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ap_start,
  output logic              ap_done,
  output logic              ap_idle,
  input  logic [SIZE_W-1:0] rows,
  input  logic [ADDR_W-1:0] base_a,
  input  logic [ADDR_W-1:0] base_b,
  input  logic [ADDR_W-1:0] base_c,
  output logic              a_rd_req,
  output logic [ADDR_W-1:0] a_rd_addr,
  input  logic              a_rd_gnt,
  input  logic              a_rd_rvalid,
  input  logic [DATA_W-1:0] a_rd_rdata,
  output logic              b_rd_req,
  output logic [ADDR_W-1:0] b_rd_addr,
  input  logic              b_rd_gnt,
  input  logic              b_rd_rvalid,
  input  logic [DATA_W-1:0] b_rd_rdata,
  output logic              c_wr_req,
  output logic [ADDR_W-1:0] c_wr_addr,
  output logic [DATA_W-1:0] c_wr_data,
  input  logic              c_wr_gnt
);
  // Task numbering for the kernel FSM: 0 read A, 1 read B, 2 write C, then
  // the 4L free-running array tasks, all detached.
  localparam int unsigned NT = 3 + 4 * L;
  localparam logic [NT-1:0] DETACH = {{(4 * L){1'b1}}, 3'b000};

  logic [NT-1:0] t_start, t_done;
  logic          busy_a, busy_b, busy_c;

  global_fsm #(.N_TASKS(NT), .DETACH(DETACH)) u_gfsm (
    .clk, .rst_n, .ap_start, .ap_done, .ap_idle,
    .task_start(t_start), .task_done(t_done)
  );
  assign t_done[NT-1:3] = '0;  // free-running tasks never finish

  // Stream links. "w" = task side into a FIFO, "r" = FIFO side into a task.
  // A chain link j feeds A feed j (link 0 comes from the A read task).
  logic [L-1:0]             aw_v, aw_r, ar_v, ar_r;
  logic [L-1:0][DATA_W-1:0] aw_d, ar_d;
  logic [L-1:0]             bw_v, bw_r, br_v, br_r;
  logic [L-1:0][DATA_W-1:0] bw_d, br_d;
  // Feed-to-compute links.
  logic [L-1:0]             pa_wv, pa_wr, pa_rv, pa_rr;
  logic [L-1:0][DATA_W-1:0] pa_wd, pa_rd;
  logic [L-1:0]             pb_wv, pb_wr, pb_rv, pb_rr;
  logic [L-1:0][DATA_W-1:0] pb_wd, pb_rd;
  // Compute-to-collect links.
  logic [L-1:0]             pc_wv, pc_wr, pc_rv, pc_rr;
  logic [L-1:0][DATA_W-1:0] pc_wd, pc_rd;
  // Collect chain: link j leaves collect j (link L-1 goes to the C writer).
  logic [L-1:0]             cw_v, cw_r, cr_v, cr_r;
  logic [L-1:0][DATA_W-1:0] cw_d, cr_d;

  // ---------------- external-memory tasks ----------------
  mem_read_task #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_rd_a (
    .clk, .rst_n, .start(t_start[0]), .done(t_done[0]), .busy(busy_a),
    .base(base_a), .count(SIZE_W'(rows * K)), .repeat_n(SIZE_W'(1)),
    .rd_req(a_rd_req), .rd_addr(a_rd_addr), .rd_gnt(a_rd_gnt),
    .rd_rvalid(a_rd_rvalid), .rd_rdata(a_rd_rdata),
    .out_valid(aw_v[0]), .out_ready(aw_r[0]), .out_data(aw_d[0])
  );
  mem_read_task #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_rd_b (
    .clk, .rst_n, .start(t_start[1]), .done(t_done[1]), .busy(busy_b),
    .base(base_b), .count(SIZE_W'(K * L)), .repeat_n(rows),
    .rd_req(b_rd_req), .rd_addr(b_rd_addr), .rd_gnt(b_rd_gnt),
    .rd_rvalid(b_rd_rvalid), .rd_rdata(b_rd_rdata),
    .out_valid(bw_v[0]), .out_ready(bw_r[0]), .out_data(bw_d[0])
  );
  mem_write_task #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_wr_c (
    .clk, .rst_n, .start(t_start[2]), .done(t_done[2]), .busy(busy_c),
    .base(base_c), .count(SIZE_W'(rows * L)),
    .wr_req(c_wr_req), .wr_addr(c_wr_addr), .wr_data(c_wr_data), .wr_gnt(c_wr_gnt),
    .in_valid(cr_v[L-1]), .in_ready(cr_r[L-1]), .in_data(cr_d[L-1])
  );

  // ---------------- the array ----------------
  for (genvar j = 0; j < L; j++) begin : g_col
    // chain links into the feeds of column j
    stream_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_la (
      .clk, .rst_n, .in_valid(aw_v[j]), .in_ready(aw_r[j]), .in_data(aw_d[j]),
      .out_valid(ar_v[j]), .out_ready(ar_r[j]), .out_data(ar_d[j])
    );
    stream_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_lb (
      .clk, .rst_n, .in_valid(bw_v[j]), .in_ready(bw_r[j]), .in_data(bw_d[j]),
      .out_valid(br_v[j]), .out_ready(br_r[j]), .out_data(br_d[j])
    );

    logic              fa_v, fb_v;
    logic [DATA_W-1:0] fa_d, fb_d;
    logic              fa_r, fb_r;

    mm_feed_a #(.LAST(j == L - 1), .DATA_W(DATA_W)) u_feed_a (
      .in_valid(ar_v[j]), .in_ready(ar_r[j]), .in_data(ar_d[j]),
      .pe_valid(pa_wv[j]), .pe_ready(pa_wr[j]), .pe_data(pa_wd[j]),
      .fwd_valid(fa_v), .fwd_ready(fa_r), .fwd_data(fa_d)
    );
    mm_feed_b #(.L(L), .POS(j), .DATA_W(DATA_W)) u_feed_b (
      .clk, .rst_n,
      .in_valid(br_v[j]), .in_ready(br_r[j]), .in_data(br_d[j]),
      .pe_valid(pb_wv[j]), .pe_ready(pb_wr[j]), .pe_data(pb_wd[j]),
      .fwd_valid(fb_v), .fwd_ready(fb_r), .fwd_data(fb_d)
    );

    if (j < L - 1) begin : g_fwd
      assign aw_v[j+1] = fa_v;
      assign aw_d[j+1] = fa_d;
      assign fa_r      = aw_r[j+1];
      assign bw_v[j+1] = fb_v;
      assign bw_d[j+1] = fb_d;
      assign fb_r      = bw_r[j+1];
    end else begin : g_end
      // The last feeds never forward.
      assign fa_r = 1'b0;
      assign fb_r = 1'b0;
    end

    stream_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_pa (
      .clk, .rst_n, .in_valid(pa_wv[j]), .in_ready(pa_wr[j]), .in_data(pa_wd[j]),
      .out_valid(pa_rv[j]), .out_ready(pa_rr[j]), .out_data(pa_rd[j])
    );
    stream_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_pb (
      .clk, .rst_n, .in_valid(pb_wv[j]), .in_ready(pb_wr[j]), .in_data(pb_wd[j]),
      .out_valid(pb_rv[j]), .out_ready(pb_rr[j]), .out_data(pb_rd[j])
    );

    mm_pe #(.K(K), .DATA_W(DATA_W)) u_pe (
      .clk, .rst_n,
      .a_valid(pa_rv[j]), .a_ready(pa_rr[j]), .a_data(pa_rd[j]),
      .b_valid(pb_rv[j]), .b_ready(pb_rr[j]), .b_data(pb_rd[j]),
      .c_valid(pc_wv[j]), .c_ready(pc_wr[j]), .c_data(pc_wd[j])
    );

    stream_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_pc (
      .clk, .rst_n, .in_valid(pc_wv[j]), .in_ready(pc_wr[j]), .in_data(pc_wd[j]),
      .out_valid(pc_rv[j]), .out_ready(pc_rr[j]), .out_data(pc_rd[j])
    );

    logic              up_v, up_r;
    logic [DATA_W-1:0] up_d;
    if (j > 0) begin : g_up
      assign up_v       = cr_v[j-1];
      assign up_d       = cr_d[j-1];
      assign cr_r[j-1]  = up_r;
    end else begin : g_head
      assign up_v = 1'b0;
      assign up_d = '0;
    end

    mm_collect #(.POS(j), .DATA_W(DATA_W)) u_collect (
      .clk, .rst_n,
      .up_valid(up_v), .up_ready(up_r), .up_data(up_d),
      .pe_valid(pc_rv[j]), .pe_ready(pc_rr[j]), .pe_data(pc_rd[j]),
      .out_valid(cw_v[j]), .out_ready(cw_r[j]), .out_data(cw_d[j])
    );

    stream_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_lc (
      .clk, .rst_n, .in_valid(cw_v[j]), .in_ready(cw_r[j]), .in_data(cw_d[j]),
      .out_valid(cr_v[j]), .out_ready(cr_r[j]), .out_data(cr_d[j])
    );
  end
endmodule
