// mem_write_task: an external-memory sink task (writes a stream to DRAM).
//
// Like every task that touches external memory it is not free-running: on a
// start pulse, taken while idle, it latches base and count, then writes the
// next count tokens of its input stream to base .. base+count-1 in order.
// When the last write has been granted it pulses done for one cycle and
// becomes idle; count = 0 gives done one cycle after start. Tokens arriving
// while the task is idle wait in the input stream.
//
// Memory write port: a write (wr_req, wr_addr, wr_data) is taken when wr_gnt
// is high; one word per cycle at most. The input token is popped in the
// cycle its write is granted. The port protocol is this design's own choice.
module mem_write_task #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              done,
  output logic              busy,
  input  logic [ADDR_W-1:0] base,
  input  logic [taro_pkg::SIZE_W-1:0] count,
  output logic              wr_req,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data,
  input  logic              wr_gnt,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data
);
  logic [ADDR_W-1:0] base_q;
  logic [taro_pkg::SIZE_W-1:0] count_q, idx;

  assign wr_req   = busy && (idx != count_q) && in_valid;
  assign wr_addr  = base_q + ADDR_W'(idx);
  assign wr_data  = in_data;
  assign in_ready = wr_req && wr_gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      base_q  <= '0;
      count_q <= '0;
      idx     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          base_q  <= base;
          count_q <= count;
          idx     <= '0;
        end
      end else if (idx == count_q) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else if (in_ready) begin
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
