// cirpart_pop_mem: Population Memory (PM) of CIRPART.
//
// Holds two banks of chromosomes, the low bank and the high bank: one holds
// the parent population while the genetic-operation module writes the
// children into the other. A chromosome is a sequence of genes, one per
// netlist module, each gene being the binary partition number (0..k-1) of
// its module; access is per gene. The address is
// {bank, chromosome, gene}, so a gene sits at
// bank*MAX_CHROM*MAX_MODULES + chromosome*MAX_MODULES + module.
//
// The two banks and gene-level access follow the document. The ports are
// this design's choice: one write port and two read ports, each with one
// cycle of latency. Read port A is shared by the controller, the fitness
// evaluator and the genetic-operation module; read port B lets the fitness
// evaluator walk the netlist while port A counts partition sizes.
module cirpart_pop_mem #(
  parameter int MAX_CHROM   = 128,
  parameter int MAX_MODULES = 4096,
  parameter int MAX_PARTS   = 8,
  localparam int CHR_W  = $clog2(MAX_CHROM),
  localparam int MOD_W  = $clog2(MAX_MODULES),
  localparam int GENE_W = $clog2(MAX_PARTS),
  localparam int AW     = 1 + CHR_W + MOD_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [GENE_W-1:0] wdata,
  input  logic [AW-1:0]     raddr_a,
  output logic [GENE_W-1:0] rdata_a,
  input  logic [AW-1:0]     raddr_b,
  output logic [GENE_W-1:0] rdata_b
);

  logic [GENE_W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata_a <= mem[raddr_a];
    rdata_b <= mem[raddr_b];
  end

endmodule
