// global_fsm: the kernel-level task-management FSM, with detached tasks.
//
// The FSM is idle until the host raises ap_start. It then moves to running
// and pulses task_start for every task for one cycle. While running it
// remembers which tasks have pulsed task_done. Tasks whose bit is set in
// DETACH (the free-running tasks) are left out of that bookkeeping: the
// kernel is finished as soon as every task that is not detached has reported
// done, although the detached tasks never stop. The FSM then pulses ap_done
// for one cycle and returns to idle, where ap_idle is high.
// With DETACH = 0 the FSM waits for every task, which is the behaviour
// without the free-running optimisation.
// A task_done pulse in the cycle of the start pulse is not expected. The
// two-state encoding and the one-cycle pulse handshake are this design's own
// choices; the idle/running states and the exclusion of detached tasks follow
// the task-management scheme being modelled.
module global_fsm
  import taro_pkg::*;
#(
  parameter int unsigned         N_TASKS = 4,
  parameter logic [N_TASKS-1:0]  DETACH  = N_TASKS'(1) << (N_TASKS - 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ap_start,
  output logic               ap_done,
  output logic               ap_idle,
  output logic [N_TASKS-1:0] task_start,
  input  logic [N_TASKS-1:0] task_done
);
  gstate_e            state;
  logic [N_TASKS-1:0] finished, finished_n;

  assign finished_n = finished | task_done;
  assign ap_idle    = (state == GS_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= GS_IDLE;
      finished   <= '0;
      task_start <= '0;
      ap_done    <= 1'b0;
    end else begin
      task_start <= '0;
      ap_done    <= 1'b0;
      unique case (state)
        GS_IDLE: begin
          if (ap_start) begin
            state      <= GS_RUNNING;
            finished   <= '0;
            task_start <= '1;
          end
        end
        GS_RUNNING: begin
          finished <= finished_n;
          if ((finished_n | DETACH) == '1) begin
            state   <= GS_IDLE;
            ap_done <= 1'b1;
          end
        end
        default: state <= GS_IDLE;
      endcase
    end
  end
endmodule
