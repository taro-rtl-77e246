// tb_global_fsm: self-checking test of the kernel task-management FSM.
// Two instances with four tasks: one with task 3 detached (DETACH = 4'b1000)
// and one with no detached task. Both are started together; tasks 0..2 report
// done at different times and task 3 never does. The detached instance must
// pulse ap_done one cycle after the last of tasks 0..2 and return to idle;
// the other must stay running until task 3 also reports done. Also checks the
// one-cycle start pulse to every task and that ap_start is ignored while
// running.
module tb_global_fsm;
  logic clk = 0, rst_n = 1, ap_start = 0;
  logic d_done, d_idle, n_done, n_idle;
  logic [3:0] d_start, n_start, task_done = '0;
  int checks = 0, failures = 0, d_dones = 0, n_dones = 0;

  global_fsm #(.N_TASKS(4), .DETACH(4'b1000)) u_det (.clk, .rst_n, .ap_start,
    .ap_done(d_done), .ap_idle(d_idle), .task_start(d_start), .task_done);
  global_fsm #(.N_TASKS(4), .DETACH(4'b0000)) u_all (.clk, .rst_n, .ap_start,
    .ap_done(n_done), .ap_idle(n_idle), .task_start(n_start), .task_done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (d_done) d_dones++;
    if (n_done) n_dones++;
  end

  task automatic pulse(input int t);
    @(negedge clk); task_done[t] = 1;
    @(negedge clk); task_done[t] = 0;
  endtask

  initial begin
    #1 rst_n = 0;   // asynchronous reset from the first nanosecond
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check(d_idle && n_idle, "idle after reset");
    for (int run = 0; run < 3; run++) begin
      ap_start = 1;
      @(negedge clk); ap_start = 0;
      check(d_start == 4'hf && n_start == 4'hf, "start pulse to all tasks");
      check(!d_idle && !n_idle, "running");
      @(negedge clk); check(d_start == 0, "start is one cycle");
      ap_start = 1;  // ignored while running
      pulse(1); ap_start = 0;
      repeat (3) @(negedge clk);
      pulse(0);
      repeat (2) @(negedge clk);
      check(!d_idle, "waits for task 2");
      @(negedge clk); task_done[2] = 1;
      @(negedge clk); task_done[2] = 0;
      check(d_done && d_idle, "done pulse one cycle after last non-detached task");
      @(negedge clk);
      check(!d_done && d_idle, "detached kernel idle");
      check(!n_idle && !n_done, "non-detached kernel still waits");
      check(d_start == 0, "no restart from ignored ap_start");
      repeat (5) @(negedge clk);
      pulse(3);
      check(n_done, "all-task kernel done after task 3");
      @(negedge clk);
      check(n_idle, "all-task kernel idle");
    end
    check(d_dones == 3 && n_dones == 3, "one done per run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
