// taro_pkg: types and constants shared by the free-running streaming kernels.
//
// The kernels are built as TAPA-style task graphs: tasks exchange tokens over
// FIFO streams (valid/ready/data) and only the tasks that touch external
// memory are started and awaited by a kernel-level FSM. Memory addresses are
// word addresses; every memory port moves one word per accepted request.
package taro_pkg;

  // Default data width of the matrix kernels: the benchmarks use C "short".
  parameter int unsigned SHORT_W = 16;
  // Data width of the vector-add example: C "int".
  parameter int unsigned INT_W   = 32;
  // Word-address width of the external memory ports (own choice).
  parameter int unsigned ADDR_W  = 32;
  // Width of the run-time size arguments (row count, vector length).
  parameter int unsigned SIZE_W  = 32;

  // States of the kernel-level task-management FSM.
  typedef enum logic [0:0] {
    GS_IDLE    = 1'b0,
    GS_RUNNING = 1'b1
  } gstate_e;

endpackage
