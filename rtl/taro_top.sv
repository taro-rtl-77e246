// taro_top: the two free-running streaming kernels, side by side.
//
//   mm_*  the matrix-matrix multiplication systolic array (mm_kernel):
//         L = 16 compute tasks, K = 16, 16-bit ("short") data.
//   va_*  the vector-add kernel (vecadd_kernel) with 32-bit ("int") data.
// The kernels share only the clock and the active-low asynchronous reset;
// each has its own ap_start/ap_done/ap_idle control and its own external
// memory ports (see mm_kernel and vecadd_kernel for the protocols). The
// external memory itself is outside this design.
// L = 16 is chosen so that the 3 memory-access tasks are 3/(4L) = 4.7% of
// all tasks, the share used for the main MM configuration; K is this
// design's choice.
module taro_top
  import taro_pkg::*;
#(
  parameter int unsigned L         = 16,
  parameter int unsigned K         = 16,
  parameter int unsigned DATA_W    = SHORT_W,
  parameter int unsigned VA_DATA_W = INT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // matrix-matrix multiplication kernel
  input  logic                 mm_ap_start,
  output logic                 mm_ap_done,
  output logic                 mm_ap_idle,
  input  logic [SIZE_W-1:0]    mm_rows,
  input  logic [ADDR_W-1:0]    mm_base_a,
  input  logic [ADDR_W-1:0]    mm_base_b,
  input  logic [ADDR_W-1:0]    mm_base_c,
  output logic                 mm_a_rd_req,
  output logic [ADDR_W-1:0]    mm_a_rd_addr,
  input  logic                 mm_a_rd_gnt,
  input  logic                 mm_a_rd_rvalid,
  input  logic [DATA_W-1:0]    mm_a_rd_rdata,
  output logic                 mm_b_rd_req,
  output logic [ADDR_W-1:0]    mm_b_rd_addr,
  input  logic                 mm_b_rd_gnt,
  input  logic                 mm_b_rd_rvalid,
  input  logic [DATA_W-1:0]    mm_b_rd_rdata,
  output logic                 mm_c_wr_req,
  output logic [ADDR_W-1:0]    mm_c_wr_addr,
  output logic [DATA_W-1:0]    mm_c_wr_data,
  input  logic                 mm_c_wr_gnt,
  // vector-add kernel
  input  logic                 va_ap_start,
  output logic                 va_ap_done,
  output logic                 va_ap_idle,
  input  logic [SIZE_W-1:0]    va_len,
  input  logic [ADDR_W-1:0]    va_base_a,
  input  logic [ADDR_W-1:0]    va_base_b,
  input  logic [ADDR_W-1:0]    va_base_c,
  output logic                 va_a_rd_req,
  output logic [ADDR_W-1:0]    va_a_rd_addr,
  input  logic                 va_a_rd_gnt,
  input  logic                 va_a_rd_rvalid,
  input  logic [VA_DATA_W-1:0] va_a_rd_rdata,
  output logic                 va_b_rd_req,
  output logic [ADDR_W-1:0]    va_b_rd_addr,
  input  logic                 va_b_rd_gnt,
  input  logic                 va_b_rd_rvalid,
  input  logic [VA_DATA_W-1:0] va_b_rd_rdata,
  output logic                 va_c_wr_req,
  output logic [ADDR_W-1:0]    va_c_wr_addr,
  output logic [VA_DATA_W-1:0] va_c_wr_data,
  input  logic                 va_c_wr_gnt
);
  mm_kernel #(.L(L), .K(K), .DATA_W(DATA_W)) u_mm (
    .clk, .rst_n,
    .ap_start(mm_ap_start), .ap_done(mm_ap_done), .ap_idle(mm_ap_idle),
    .rows(mm_rows), .base_a(mm_base_a), .base_b(mm_base_b), .base_c(mm_base_c),
    .a_rd_req(mm_a_rd_req), .a_rd_addr(mm_a_rd_addr), .a_rd_gnt(mm_a_rd_gnt),
    .a_rd_rvalid(mm_a_rd_rvalid), .a_rd_rdata(mm_a_rd_rdata),
    .b_rd_req(mm_b_rd_req), .b_rd_addr(mm_b_rd_addr), .b_rd_gnt(mm_b_rd_gnt),
    .b_rd_rvalid(mm_b_rd_rvalid), .b_rd_rdata(mm_b_rd_rdata),
    .c_wr_req(mm_c_wr_req), .c_wr_addr(mm_c_wr_addr), .c_wr_data(mm_c_wr_data),
    .c_wr_gnt(mm_c_wr_gnt)
  );

  vecadd_kernel #(.DATA_W(VA_DATA_W)) u_va (
    .clk, .rst_n,
    .ap_start(va_ap_start), .ap_done(va_ap_done), .ap_idle(va_ap_idle),
    .len(va_len), .base_a(va_base_a), .base_b(va_base_b), .base_c(va_base_c),
    .a_rd_req(va_a_rd_req), .a_rd_addr(va_a_rd_addr), .a_rd_gnt(va_a_rd_gnt),
    .a_rd_rvalid(va_a_rd_rvalid), .a_rd_rdata(va_a_rd_rdata),
    .b_rd_req(va_b_rd_req), .b_rd_addr(va_b_rd_addr), .b_rd_gnt(va_b_rd_gnt),
    .b_rd_rvalid(va_b_rd_rvalid), .b_rd_rdata(va_b_rd_rdata),
    .c_wr_req(va_c_wr_req), .c_wr_addr(va_c_wr_addr), .c_wr_data(va_c_wr_data),
    .c_wr_gnt(va_c_wr_gnt)
  );
endmodule
