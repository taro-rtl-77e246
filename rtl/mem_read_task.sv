// mem_read_task: an external-memory source task (reads DRAM into a stream).
//
// Tasks that access external memory are never made free-running; they are
// ordinary tasks with start and done. On a start pulse, taken while the task
// is idle, the task latches base, count and repeat and reads the words at
// base .. base+count-1, repeat times over, pushing each word to its output
// stream in address order. When all count*repeat words have left through the
// output stream it pulses done for one cycle and becomes idle again. A total
// of zero words gives done one cycle after start.
//
// Memory read port: a request (rd_req, rd_addr) is taken when rd_gnt is high;
// read data comes back in request order on rd_rvalid/rd_rdata, any number of
// cycles later, with no back-pressure. Responses land in an internal FIFO of
// BUF_DEPTH words; the task issues a request only while fewer than BUF_DEPTH
// words are requested but not yet sent on, so a full output stream throttles
// the requests and no response can be lost. The task streams one word per
// cycle as long as the memory's read latency stays below BUF_DEPTH - 1
// cycles and nothing stalls.
// The port protocol, the buffer and the repeat argument (used to re-send B to
// the MM array for every row of A) are this design's own choices.
module mem_read_task #(
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              done,
  output logic              busy,
  input  logic [ADDR_W-1:0] base,
  input  logic [taro_pkg::SIZE_W-1:0] count,
  input  logic [taro_pkg::SIZE_W-1:0] repeat_n,
  output logic              rd_req,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_gnt,
  input  logic              rd_rvalid,
  input  logic [DATA_W-1:0] rd_rdata,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data
);
  localparam int unsigned IF_W = $clog2(BUF_DEPTH + 1);

  logic [ADDR_W-1:0]   base_q;
  logic [taro_pkg::SIZE_W-1:0]   count_q, idx;
  logic [2*taro_pkg::SIZE_W-1:0] total_q, issued, sent;
  logic [IF_W-1:0]     inflight;
  logic                issue, pop, buf_in_ready;

  assign rd_req  = busy && (issued != total_q) && (inflight < IF_W'(BUF_DEPTH));
  assign rd_addr = base_q + ADDR_W'(idx);
  assign issue   = rd_req && rd_gnt;
  assign pop     = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      base_q   <= '0;
      count_q  <= '0;
      total_q  <= '0;
      idx      <= '0;
      issued   <= '0;
      sent     <= '0;
      inflight <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          base_q  <= base;
          count_q <= count;
          total_q <= count * repeat_n;
          idx     <= '0;
          issued  <= '0;
          sent    <= '0;
        end
      end else begin
        if (issue) begin
          issued <= issued + 1'b1;
          idx    <= (idx == count_q - 1'b1) ? '0 : idx + 1'b1;
        end
        if (pop) sent <= sent + 1'b1;
        if (sent == total_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (issue && !pop)      inflight <= inflight + 1'b1;
      else if (pop && !issue) inflight <= inflight - 1'b1;
    end
  end

  stream_fifo #(.DATA_W(DATA_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rd_rvalid),
    .in_ready (buf_in_ready),
    .in_data  (rd_rdata),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_data (out_data)
  );

  // The request credit guarantees room for every response.
  a_resp_room: assert property (@(posedge clk) disable iff (!rst_n) rd_rvalid |-> buf_in_ready);
endmodule
