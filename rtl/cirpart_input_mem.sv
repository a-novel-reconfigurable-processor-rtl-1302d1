// cirpart_input_mem: Input Memory (IM), the netlist store of CIRPART.
//
// The netlist is kept as a pin list: one word per pin, holding the index of
// the module the pin belongs to in bits [MOD_W-1:0] and, in bit MOD_W, a
// flag set on the last pin of each net. Nets follow one another, so the
// list of N nets with P pins in total fills words 0..P-1. The document
// names this memory as an external RAM that stores the netlist and is read
// repeatedly; the pin-list format is this design's choice.
//
// Interface: one write port (we/waddr/wdata) used while the controller
// takes in the netlist, one read port with one cycle of latency
// (rdata is the word at the raddr of the previous cycle).
module cirpart_input_mem #(
  parameter int MAX_PINS    = 16384,
  parameter int MAX_MODULES = 4096,
  localparam int PIN_W = $clog2(MAX_PINS),
  localparam int MOD_W = $clog2(MAX_MODULES)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [PIN_W-1:0] waddr,
  input  logic [MOD_W:0]   wdata,
  input  logic [PIN_W-1:0] raddr,
  output logic [MOD_W:0]   rdata
);

  logic [MOD_W:0] mem [MAX_PINS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
