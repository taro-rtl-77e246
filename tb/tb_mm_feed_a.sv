// tb_mm_feed_a: self-checking test of the A data-feed task mm_feed_a.
// For a middle task (LAST = 0) and a last task (LAST = 1): random valid and
// ready combinations; the middle task must fire only when its input holds a
// token and both its compute output and its forward output can take it, and
// then copy the token to both; the last task ignores the forward side.
module tb_mm_feed_a;
  localparam int DW = 16;
  logic in_valid, pe_ready, fwd_ready;
  logic [DW-1:0] in_data;
  logic m_in_ready, m_pe_valid, m_fwd_valid, l_in_ready, l_pe_valid, l_fwd_valid;
  logic [DW-1:0] m_pe_data, m_fwd_data, l_pe_data, l_fwd_data;
  int checks = 0, failures = 0;

  mm_feed_a #(.LAST(1'b0), .DATA_W(DW)) u_mid (
    .in_valid, .in_ready(m_in_ready), .in_data,
    .pe_valid(m_pe_valid), .pe_ready, .pe_data(m_pe_data),
    .fwd_valid(m_fwd_valid), .fwd_ready, .fwd_data(m_fwd_data));
  mm_feed_a #(.LAST(1'b1), .DATA_W(DW)) u_last (
    .in_valid, .in_ready(l_in_ready), .in_data,
    .pe_valid(l_pe_valid), .pe_ready, .pe_data(l_pe_data),
    .fwd_valid(l_fwd_valid), .fwd_ready, .fwd_data(l_fwd_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      {in_valid, pe_ready, fwd_ready} = 3'(i);
      in_data = DW'($urandom);
      #1;
      check(m_in_ready == (in_valid && pe_ready && fwd_ready), "mid fire");
      check(m_pe_valid == m_in_ready && m_fwd_valid == m_in_ready, "mid broadcast");
      if (m_in_ready) check(m_pe_data == in_data && m_fwd_data == in_data, "mid data");
      check(l_in_ready == (in_valid && pe_ready), "last fire");
      check(l_pe_valid == l_in_ready && !l_fwd_valid, "last no forward");
      if (l_in_ready) check(l_pe_data == in_data, "last data");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
