// tb_cirpart_fem: fitness evaluation against a reference cost model.
//
// Random netlists and random populations (random sizes, 2..4 partitions,
// either bank) are placed in behavioural memories with one cycle of read
// latency. Every fitness-memory write is compared with the reference cost
// (cut nets + largest minus smallest partition), each chromosome must be
// written exactly once, and `done` must rise
// num_chrom * (max(num_modules, num_pins + 1) + 3) + 1 clock edges after
// the edge that samples `start`.
module tb_cirpart_fem;
  import cirpart_pkg::*;
  import tb_cirpart_ref_pkg::*;

  localparam int MAX_CHROM = 8, MAX_MODULES = 32, MAX_PINS = 128, MAX_PARTS = 4;
  localparam int CHR_W = $clog2(MAX_CHROM), MOD_W = $clog2(MAX_MODULES);
  localparam int PIN_W = $clog2(MAX_PINS), GENE_W = $clog2(MAX_PARTS);
  localparam int AW = 1 + CHR_W + MOD_W;

  logic clk = 0, rst_n = 0, start = 0, done, bank = 0;
  logic [REG_W-1:0] num_modules = 0, num_pins = 0, num_chrom = 0, num_parts = 0;
  logic [PIN_W-1:0] im_raddr;
  logic [MOD_W:0] im_rdata;
  logic [AW-1:0] pma_raddr, pmb_raddr;
  logic [GENE_W-1:0] pma_rdata, pmb_rdata;
  logic fm_we;
  logic [CHR_W-1:0] fm_waddr;
  logic [COST_W-1:0] fm_wdata;

  logic [MOD_W:0] im [MAX_PINS];
  logic [GENE_W-1:0] pm [2**AW];
  int fm_got [MAX_CHROM];
  int fm_writes [MAX_CHROM];
  int checks = 0, failures = 0;

  cirpart_fem #(.MAX_CHROM(MAX_CHROM), .MAX_MODULES(MAX_MODULES),
                .MAX_PINS(MAX_PINS), .MAX_PARTS(MAX_PARTS)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    im_rdata  <= im[im_raddr];
    pma_rdata <= pm[pma_raddr];
    pmb_rdata <= pm[pmb_raddr];
    if (fm_we) begin
      fm_got[fm_waddr] <= int'(fm_wdata);
      fm_writes[fm_waddr] <= fm_writes[fm_waddr] + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned pins[$];
    int genes[MAX_CHROM][$];
    int nm, nc, np, cycles, expect_cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      nm = (trial == 0) ? MAX_MODULES : 2 + int'($urandom_range(MAX_MODULES - 2));
      nc = (trial == 0) ? MAX_CHROM : 1 + int'($urandom_range(MAX_CHROM - 1));
      np = 2 + int'($urandom_range(MAX_PARTS - 2));
      // trial 1: fewer pins than modules, so the gene walk sets the pace
      make_netlist(pins, nm, (trial == 1) ? 2 : 1 + int'($urandom_range(20)), 5);
      while (pins.size() > MAX_PINS) void'(pins.pop_back());
      pins[pins.size() - 1] |= 32'h8000_0000;
      bank = $urandom_range(1);
      foreach (pins[i]) im[i] = {pins[i][31], MOD_W'(pins[i])};
      for (int c = 0; c < nc; c++) begin
        genes[c] = {};
        for (int g = 0; g < nm; g++) begin
          // trial 2: everything in partition 0
          int v;
          v = (trial == 2) ? 0 : int'($urandom_range(np - 1));
          genes[c].push_back(v);
          pm[{bank, CHR_W'(c), MOD_W'(g)}] = GENE_W'(v);
        end
      end
      foreach (fm_writes[c]) fm_writes[c] = 0;
      num_modules = 16'(nm); num_pins = 16'(pins.size());
      num_chrom = 16'(nc); num_parts = 16'(np);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      @(negedge clk);
      expect_cycles = nc * (((nm > pins.size() + 1) ? nm : pins.size() + 1) + 3) + 1;
      check(cycles == expect_cycles,
            $sformatf("trial %0d cycles %0d expected %0d", trial, cycles, expect_cycles));
      for (int c = 0; c < nc; c++) begin
        int exp_c;
        exp_c = int'(ref_cost(pins, genes[c], np));
        check(fm_writes[c] == 1, $sformatf("trial %0d chrom %0d written %0d times",
                                          trial, c, fm_writes[c]));
        check(fm_got[c] == exp_c, $sformatf("trial %0d chrom %0d cost %0d expected %0d",
                                           trial, c, fm_got[c], exp_c));
      end
      for (int c = nc; c < MAX_CHROM; c++)
        check(fm_writes[c] == 0, "write beyond num_chrom");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
