// stream_fifo: the FIFO channel that connects two tasks (a TAPA stream).
//
// A producer task pushes a token when in_valid and in_ready are both high; a
// consumer task pops when out_valid and out_ready are both high. A task that
// reads an empty stream or writes a full one simply does not fire that cycle,
// which is how free-running tasks are stopped and started without any control
// signal. The storage is a circular buffer of DEPTH entries with a
// registered occupancy count; a push and a pop may happen in the same cycle
// unless the FIFO is full (in_ready is low then). Latency from push to out_valid is one cycle.
// DEPTH = 2 is this design's choice (the stream depth is not given).
module stream_fifo #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  rd_ptr, wr_ptr;
  logic [PTR_W:0]    count;
  logic              push, pop;

  assign out_valid = (count != '0);
  // in_ready depends only on the FIFO's own state, so no ready signal runs
  // combinationally through a chain of tasks.
  assign in_ready  = (count != (PTR_W+1)'(DEPTH));
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      if (push && !pop)      count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // Occupancy never exceeds DEPTH.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (PTR_W+1)'(DEPTH));
endmodule
