// tb_vecadd_task: self-checking test of the free-running adder vecadd_task.
// Drives every combination of a_valid, b_valid, c_ready with random data and
// checks that the task fires (pops both inputs, pushes c) exactly when all
// three are high, and that c = a + b modulo 2^32.
module tb_vecadd_task;
  logic a_valid, a_ready, b_valid, b_ready, c_valid, c_ready;
  logic [31:0] a_data, b_data, c_data;
  int checks = 0, failures = 0;

  vecadd_task #(.DATA_W(32)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 800; i++) begin
      {a_valid, b_valid, c_ready} = 3'(i);
      a_data = $urandom; b_data = $urandom;
      if (i == 8) begin a_data = 32'hffff_ffff; b_data = 32'd2; end
      #1;
      check(c_valid == (a_valid && b_valid && c_ready), "fire");
      check(a_ready == c_valid && b_ready == c_valid, "pop with push");
      if (c_valid) check(c_data == a_data + b_data, "sum");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
