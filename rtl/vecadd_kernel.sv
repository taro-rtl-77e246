// vecadd_kernel: the vector-add kernel, C = A + B, with a free-running adder.
//
// Four tasks connected by three streams:
//   task 0  mem_read_task   reads len words of A from memory    -> stream a
//   task 1  mem_read_task   reads len words of B from memory    -> stream b
//   task 3  vecadd_task     free-running, c = a + b              -> stream c
//   task 2  mem_write_task  writes len words of stream c to memory
// The three memory tasks are started by the kernel FSM (global_fsm) on
// ap_start and report done; the adder has no start, done or length at all and
// is marked detached, so the kernel ends (ap_done pulse, then ap_idle) as soon
// as the writer has stored the last sum. The adder just waits for the next
// run's tokens. Only the memory tasks know the vector length.
// Each memory task has its own port (a read port each for A and B, a write
// port for C; protocol as in mem_read_task / mem_write_task). Addresses are
// word addresses. The streams are stream_fifo channels of FIFO_DEPTH words.
module vecadd_kernel
  import taro_pkg::*;
#(
  parameter int unsigned DATA_W     = INT_W,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ap_start,
  output logic              ap_done,
  output logic              ap_idle,
  input  logic [SIZE_W-1:0] len,
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
  localparam int unsigned NT = 4;

  logic [NT-1:0] t_start, t_done;
  logic          busy_a, busy_b, busy_c;

  // Task outputs into the streams and stream outputs into the tasks.
  logic              ra_v, ra_r, rb_v, rb_r, sa_v, sa_r, sb_v, sb_r;
  logic              ac_v, ac_r, sc_v, sc_r;
  logic [DATA_W-1:0] ra_d, rb_d, sa_d, sb_d, ac_d, sc_d;

  global_fsm #(.N_TASKS(NT), .DETACH(4'b1000)) u_gfsm (
    .clk, .rst_n, .ap_start, .ap_done, .ap_idle,
    .task_start(t_start), .task_done(t_done)
  );
  assign t_done[3] = 1'b0;   // a free-running task never finishes

  mem_read_task #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_rd_a (
    .clk, .rst_n, .start(t_start[0]), .done(t_done[0]), .busy(busy_a),
    .base(base_a), .count(len), .repeat_n(SIZE_W'(1)),
    .rd_req(a_rd_req), .rd_addr(a_rd_addr), .rd_gnt(a_rd_gnt),
    .rd_rvalid(a_rd_rvalid), .rd_rdata(a_rd_rdata),
    .out_valid(ra_v), .out_ready(ra_r), .out_data(ra_d)
  );
  mem_read_task #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_rd_b (
    .clk, .rst_n, .start(t_start[1]), .done(t_done[1]), .busy(busy_b),
    .base(base_b), .count(len), .repeat_n(SIZE_W'(1)),
    .rd_req(b_rd_req), .rd_addr(b_rd_addr), .rd_gnt(b_rd_gnt),
    .rd_rvalid(b_rd_rvalid), .rd_rdata(b_rd_rdata),
    .out_valid(rb_v), .out_ready(rb_r), .out_data(rb_d)
  );

  stream_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_s_a (
    .clk, .rst_n, .in_valid(ra_v), .in_ready(ra_r), .in_data(ra_d),
    .out_valid(sa_v), .out_ready(sa_r), .out_data(sa_d)
  );
  stream_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_s_b (
    .clk, .rst_n, .in_valid(rb_v), .in_ready(rb_r), .in_data(rb_d),
    .out_valid(sb_v), .out_ready(sb_r), .out_data(sb_d)
  );

  vecadd_task #(.DATA_W(DATA_W)) u_add (
    .a_valid(sa_v), .a_ready(sa_r), .a_data(sa_d),
    .b_valid(sb_v), .b_ready(sb_r), .b_data(sb_d),
    .c_valid(ac_v), .c_ready(ac_r), .c_data(ac_d)
  );

  stream_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_s_c (
    .clk, .rst_n, .in_valid(ac_v), .in_ready(ac_r), .in_data(ac_d),
    .out_valid(sc_v), .out_ready(sc_r), .out_data(sc_d)
  );

  mem_write_task #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_wr_c (
    .clk, .rst_n, .start(t_start[2]), .done(t_done[2]), .busy(busy_c),
    .base(base_c), .count(len),
    .wr_req(c_wr_req), .wr_addr(c_wr_addr), .wr_data(c_wr_data), .wr_gnt(c_wr_gnt),
    .in_valid(sc_v), .in_ready(sc_r), .in_data(sc_d)
  );
endmodule
