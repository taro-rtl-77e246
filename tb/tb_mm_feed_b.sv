// tb_mm_feed_b: self-checking test of the B data-feed task mm_feed_b.
// Task at position POS = 1 of an L = 4 chain: it sees groups of 3 words and
// must send word 0 of each group to its compute output and words 1..2 to the
// next feed. A second instance at POS = L-1 must send every word to its
// compute output. Each source offers words numbered 0, 1, 2, ... and stalls at
// random, as do the sinks; every cycle the routing, the handshake and the
// data are checked against the word number.
module tb_mm_feed_b;
  localparam int DW = 16, L = 4;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, pe_ready = 0, fwd_ready = 0, l_in_valid = 0;
  logic [DW-1:0] in_data, l_in_data;
  logic in_ready, pe_valid, fwd_valid, l_in_ready, l_pe_valid, l_fwd_valid, l_fwd_ready;
  logic [DW-1:0] pe_data, fwd_data, l_pe_data, l_fwd_data;
  int checks = 0, failures = 0, n_in = 0, n_l = 0, n_pe = 0, n_fwd = 0;
  bit to_pe;

  assign in_data     = DW'(n_in);
  assign l_in_data   = DW'(n_l);
  assign l_fwd_ready = 1'b1;

  mm_feed_b #(.L(L), .POS(1), .DATA_W(DW)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .pe_valid, .pe_ready, .pe_data, .fwd_valid, .fwd_ready, .fwd_data);
  mm_feed_b #(.L(L), .POS(L-1), .DATA_W(DW)) u_last (.clk, .rst_n,
    .in_valid(l_in_valid), .in_ready(l_in_ready), .in_data(l_in_data),
    .pe_valid(l_pe_valid), .pe_ready, .pe_data(l_pe_data),
    .fwd_valid(l_fwd_valid), .fwd_ready(l_fwd_ready), .fwd_data(l_fwd_data));

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
      in_valid   = ($urandom_range(99) < 70);
      l_in_valid = ($urandom_range(99) < 70);
      pe_ready   = ($urandom_range(99) < 60);
      fwd_ready  = ($urandom_range(99) < 60);
      #1;
      to_pe = (n_in % (L - 1) == 0);
      check(pe_valid  == (in_valid && to_pe && pe_ready),   "pe routing");
      check(fwd_valid == (in_valid && !to_pe && fwd_ready), "fwd routing");
      check(in_ready  == (pe_valid || fwd_valid),           "pop on push");
      if (pe_valid)  check(pe_data  == in_data, "pe data");
      if (fwd_valid) check(fwd_data == in_data, "fwd data");
      check(l_pe_valid == (l_in_valid && pe_ready) && !l_fwd_valid, "last task keeps all");
      if (l_pe_valid) check(l_pe_data == l_in_data, "last data");
      @(posedge clk);
      if (pe_valid) n_pe++;
      if (fwd_valid) n_fwd++;
      if (in_valid && in_ready) n_in++;
      if (l_in_valid && l_in_ready) n_l++;
    end
    check(n_fwd > n_pe && n_pe > 100, "both routes used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
