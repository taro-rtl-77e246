// ext_mem_model: behavioural model of one external-memory (DRAM) port pair,
// for simulation only.
//
// The word array mem[0:WORDS-1] is loaded and inspected by the testbench
// through hierarchical references. Read port: a request is granted in a
// cycle with probability gnt_pct percent (GNT_PCT at start); the data comes back LAT cycles
// later (LAT >= 2) in request order on rd_rvalid/rd_rdata. Write port: a
// write is granted with probability GNT_PCT percent and stored at that clock
// edge. Addresses beyond the array read as zero and are not written.
module ext_mem_model #(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LAT     = 2,
  parameter int unsigned GNT_PCT = 100
) (
  input  logic              clk,
  input  logic              rd_req,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_gnt,
  output logic              rd_rvalid,
  output logic [DATA_W-1:0] rd_rdata,
  input  logic              wr_req,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  output logic              wr_gnt
);
  logic [DATA_W-1:0] mem [WORDS];
  logic [LAT-1:0]              pv = '0;
  logic [LAT-1:0][DATA_W-1:0]  pd = '0;
  int unsigned reads = 0, writes = 0, gnt_stalls = 0;
  int unsigned gnt_pct = GNT_PCT;   // may be changed by the testbench

  initial begin
    rd_gnt = 1'b1;
    wr_gnt = 1'b1;
    foreach (mem[i]) mem[i] = '0;
  end

  always @(posedge clk) begin
    if (rd_req && !rd_gnt) gnt_stalls++;
    if (wr_req && !wr_gnt) gnt_stalls++;
    pv <= {pv[LAT-2:0], rd_req && rd_gnt} ;
    pd <= {pd[LAT-2:0], (rd_req && rd_gnt && rd_addr < WORDS) ? mem[rd_addr] : DATA_W'(0)};
    if (rd_req && rd_gnt) reads++;
    if (wr_req && wr_gnt) begin
      if (wr_addr < WORDS) mem[wr_addr] <= wr_data;
      writes++;
    end
    rd_gnt <= ($urandom_range(99) < gnt_pct);
    wr_gnt <= ($urandom_range(99) < gnt_pct);
  end

  assign rd_rvalid = pv[LAT-1];
  assign rd_rdata  = pd[LAT-1];
endmodule
