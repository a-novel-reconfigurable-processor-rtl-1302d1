// cirpart_fit_mem: Fitness Memory (FM) of CIRPART.
//
// One word per chromosome of the current population: the total cost
// (net-cut cost plus partition-imbalance cost) written by the fitness
// evaluator. Lower is fitter. The parent-selection module and, at the end,
// the controller read it. One write port, one read port with one cycle of
// latency; the port arrangement is this design's choice.
module cirpart_fit_mem #(
  parameter int MAX_CHROM = 128,
  parameter int COST_W    = 16,
  localparam int CHR_W = $clog2(MAX_CHROM)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [CHR_W-1:0]  waddr,
  input  logic [COST_W-1:0] wdata,
  input  logic [CHR_W-1:0]  raddr,
  output logic [COST_W-1:0] rdata
);

  logic [COST_W-1:0] mem [MAX_CHROM];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
