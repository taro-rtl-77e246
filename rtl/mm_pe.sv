// mm_pe: one "Compute" task of the systolic MM array (multiply-accumulate).
//
// Compute task j produces column j of C. Each firing pops one A token
// (A[i][k]) and one B token (B[k][j]) and multiplies them; after K firings the
// accumulated sum C[i][j] is pushed to the output stream and the accumulator
// restarts for the next row. The arithmetic wraps modulo 2^DATA_W, which is
// what C "short" accumulation stores.
//
// The task is a free-running, flushable two-stage pipeline:
//   stage 1 (entry) fires when both input streams hold a token and stage 2
//           can take a product; it registers the product and a "last of K"
//           flag.
//   stage 2 adds the registered product to the accumulator; for the last
//           product of a row it also writes the sum to the output stream and
//           so waits while the output is full.
// Stage 2 advances whether or not new input arrives, so the product of the
// final iteration reaches the output even when the inputs run dry: the
// pipeline drains itself and never needs a following input to push data out.
// The k counter is task state, not a loop index; K is a compile-time
// parameter, so the task needs no start, done or size input.
// Output latency: the sum appears one cycle after the last pair was popped.
// The pipeline split is this design's choice; that the task multiplies and
// accumulates short data follows from the benchmark.
module mm_pe #(
  parameter int unsigned K      = 16,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
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
  localparam int unsigned KC_W = (K > 1) ? $clog2(K) : 1;

  logic [KC_W-1:0]   k_cnt;
  logic [DATA_W-1:0] prod_q, acc_q, sum;
  logic              s1_valid, s1_last;
  logic              s2_go, s1_go;

  // Stage 2: accumulate; the last product of a row also needs output room.
  assign sum     = acc_q + prod_q;
  assign s2_go   = s1_valid && (!s1_last || c_ready);
  assign c_valid = s1_valid && s1_last && c_ready;
  assign c_data  = sum;

  // Stage 1: entry, fires on both inputs present and a free product register.
  assign s1_go   = a_valid && b_valid && (!s1_valid || s2_go);
  assign a_ready = s1_go;
  assign b_ready = s1_go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_cnt    <= '0;
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      prod_q   <= '0;
      acc_q    <= '0;
    end else begin
      if (s2_go) acc_q <= s1_last ? '0 : sum;
      if (s1_go) begin
        prod_q   <= DATA_W'(a_data * b_data);
        s1_last  <= (k_cnt == KC_W'(K - 1));
        k_cnt    <= (k_cnt == KC_W'(K - 1)) ? '0 : k_cnt + 1'b1;
        s1_valid <= 1'b1;
      end else if (s2_go) begin
        s1_valid <= 1'b0;
      end
    end
  end
endmodule
