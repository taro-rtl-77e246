// mm_collect: one "Matrix C Collect" task of the systolic MM array.
//
// Collect task POS passes results down the chain towards external memory.
// For every row i of C it first forwards the POS values C[i][0..POS-1] that
// arrive from the upstream collect task, then the value C[i][POS] from its own
// compute task, so the chain end emits each row of C in column order. A
// modulo-(POS+1) counter selects the stream to read; task 0 only reads its
// compute task and its up inputs are unused (up_ready stays low).
// The task is free-running: no start, done or size input; it fires when the
// selected input holds a token and the output can take it. The counter is
// cleared by reset. The ordering scheme is this design's own choice.
module mm_collect #(
  parameter int unsigned POS    = 0,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              up_valid,
  output logic              up_ready,
  input  logic [DATA_W-1:0] up_data,
  input  logic              pe_valid,
  output logic              pe_ready,
  input  logic [DATA_W-1:0] pe_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data
);
  localparam int unsigned CNT_W = (POS > 0) ? $clog2(POS + 1) : 1;

  logic [CNT_W-1:0] cnt;
  logic             own, fire;

  assign own       = (cnt == CNT_W'(POS));
  assign fire      = out_ready && (own ? pe_valid : up_valid);
  assign up_ready  = fire && !own;
  assign pe_ready  = fire && own;
  assign out_valid = fire;
  assign out_data  = own ? pe_data : up_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (fire) cnt <= own ? '0 : cnt + 1'b1;
  end
endmodule
