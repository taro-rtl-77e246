// vecadd_task: the free-running vector-add task (c = a + b).
//
// The task has no start, done or length input: it keeps running forever. In
// every cycle in which a token is waiting on both input streams and the output
// stream can take one, it pops one token of a and one of b and pushes their
// sum to c. If either input is empty or the output is full it does nothing
// that cycle, so the surrounding tasks alone decide how many sums are made.
// The task is combinational: its inputs are the read ends of two FIFOs and its
// output the write end of one, so a token moves from a/b to c in the cycle it
// fires. The addition wraps modulo 2^DATA_W, as a C int addition on 32 bits.
module vecadd_task #(
  parameter int unsigned DATA_W = 32
) (
  input  logic              a_valid,
  output logic              a_ready,
  input  logic [DATA_W-1:0] a_data,
  input  logic              b_valid,
  output logic              b_ready,
  input  logic [DATA_W-1:0] b_data,
  output logic              c_valid,
  input  logic              c_ready,
  output logic [DATA_W-1:0] c_data
);
  logic fire;

  // One loop iteration: both reads and the write are blocking.
  assign fire    = a_valid && b_valid && c_ready;
  assign a_ready = fire;
  assign b_ready = fire;
  assign c_valid = fire;
  assign c_data  = a_data + b_data;
endmodule
