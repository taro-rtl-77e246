// mm_feed_a: one "Matrix A Data Feed" task of the systolic MM array.
//
// A elements arrive in the order the compute tasks consume them (row by row,
// A[i][0..K-1]). Every compute task needs every A element, so each feed task
// hands each token to its own compute task and forwards it to the next feed
// task along the chain. The last feed task in the chain (LAST = 1) has no
// successor and only feeds its compute task; its fwd outputs are unused and
// fwd_valid stays low.
// The task is free-running: it fires in any cycle in which an input token is
// waiting and both destinations can take it, and has no control inputs. It is
// combinational and stateless; a token passes in the cycle it fires.
// The broadcast-and-forward scheme is this design's reading of the feed chain
// drawn for the MM array; the inner workings of the feed tasks are not given.
module mm_feed_a #(
  parameter bit          LAST   = 1'b0,
  parameter int unsigned DATA_W = 16
) (
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
  logic fire;

  assign fire      = in_valid && pe_ready && (LAST || fwd_ready);
  assign in_ready  = fire;
  assign pe_valid  = fire;
  assign pe_data   = in_data;
  assign fwd_valid = fire && !LAST;
  assign fwd_data  = in_data;
endmodule
