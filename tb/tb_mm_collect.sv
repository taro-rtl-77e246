// tb_mm_collect: self-checking test of the C collect task mm_collect.
// Instance at POS = 2: per row it must pass 2 values from upstream, then 1
// from its compute task. Instance at POS = 0: it must pass only compute
// values and never read upstream. Sources offer numbered values (upstream
// 1000+n, compute 5000+n) and stall at random, the sink stalls at random; the
// output sequence is compared with the expected interleaving.
module tb_mm_collect;
  localparam int DW = 16, POS = 2;
  logic clk = 0, rst_n = 1;
  logic up_valid = 0, pe_valid = 0, out_ready = 0;
  logic up_ready, pe_ready, out_valid, z_up_ready, z_pe_ready, z_out_valid;
  logic [DW-1:0] up_data, pe_data, out_data, z_out_data;
  int checks = 0, failures = 0, n_up = 0, n_pe = 0, n_out = 0, n_z = 0;
  logic [DW-1:0] expv;

  assign up_data = DW'(1000 + n_up);
  assign pe_data = DW'(5000 + n_pe);

  mm_collect #(.POS(POS), .DATA_W(DW)) dut (.clk, .rst_n, .up_valid, .up_ready, .up_data,
    .pe_valid, .pe_ready, .pe_data, .out_valid, .out_ready, .out_data);
  mm_collect #(.POS(0), .DATA_W(DW)) u_zero (.clk, .rst_n, .up_valid, .up_ready(z_up_ready), .up_data,
    .pe_valid, .pe_ready(z_pe_ready), .pe_data(DW'(7000 + n_z)),
    .out_valid(z_out_valid), .out_ready, .out_data(z_out_data));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0;   // asynchronous reset from the first nanosecond
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      up_valid  = ($urandom_range(99) < 60);
      pe_valid  = ($urandom_range(99) < 60);
      out_ready = ($urandom_range(99) < 70);
      #1;
      // expected value of output number n_out
      if (n_out % (POS + 1) < POS) expv = DW'(1000 + (n_out / (POS + 1)) * POS + n_out % (POS + 1));
      else                         expv = DW'(5000 + n_out / (POS + 1));
      if (out_valid) check(out_data == expv, "order");
      check(!(up_ready && pe_ready), "one source per cycle");
      check(!z_up_ready, "head never reads upstream");
      if (z_out_valid) check(z_out_data == DW'(7000 + n_z), "head data");
      @(posedge clk);
      if (out_valid) n_out++;
      if (up_valid && up_ready) n_up++;
      if (pe_valid && pe_ready) n_pe++;
      if (pe_valid && z_pe_ready) n_z++;
    end
    check(n_out > 300, "progress");
    check(n_up == 2 * n_pe || n_up == 2 * n_pe + 1 || n_up == 2 * n_pe + 2, "ratio");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
