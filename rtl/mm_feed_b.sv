// mm_feed_b: one "Matrix B Data Feed" task of the systolic MM array.
//
// Compute task j needs column j of B. For every (row i, k) the B stream that
// enters the chain carries the L words B[k][0..L-1]; feed task POS therefore
// sees groups of L-POS words, keeps the first word of each group for its own
// compute task and forwards the other L-POS-1 words to the next feed task.
// A modulo-(L-POS) counter marks the first word of a group. The last task
// (POS = L-1) keeps every word and never forwards.
// The task is free-running: it fires in any cycle in which a token is waiting
// and the one destination it goes to can take it; there is no start, done or
// size input. The counter is the task's only state and is cleared by reset.
// The distribution scheme is this design's own choice for the feed chain
// drawn for the MM array.
module mm_feed_b #(
  parameter int unsigned L      = 16,
  parameter int unsigned POS    = 0,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              pe_valid,
  input  logic              pe_ready,
  output logic [DATA_W-1:0] pe_data,
  output logic              fwd_valid,
  input  logic              fwd_ready,
  output logic [DATA_W-1:0] fwd_data
);
  localparam int unsigned GROUP = L - POS;             // words seen per group
  localparam int unsigned CNT_W = (GROUP > 1) ? $clog2(GROUP) : 1;

  logic [CNT_W-1:0] cnt;
  logic             keep, fire;

  assign keep      = (cnt == '0);
  assign fire      = in_valid && (keep ? pe_ready : fwd_ready);
  assign in_ready  = fire;
  assign pe_valid  = fire && keep;
  assign pe_data   = in_data;
  assign fwd_valid = fire && !keep;
  assign fwd_data  = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (fire) cnt <= (cnt == CNT_W'(GROUP - 1)) ? '0 : cnt + 1'b1;
  end
endmodule
