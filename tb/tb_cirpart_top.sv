// tb_cirpart_top: end-to-end run of CIRPART at reduced memory sizes
// (64 modules, 256 pins, 16 chromosomes, 4 partitions) on a random
// 48-module, 56-net netlist, 3-way, 16 chromosomes, 12 generations, with
// raised crossover-off and mutation rates so every operator path is taken.
//
// tb_cirpart_driver checks every fitness value, the final population and
// the completion codes. This testbench also counts, and requires at least
// once, each mechanism of the design: netlist loading, random
// initialisation, the two walkers of the fitness evaluator running in the
// same cycle, a cut net, both outcomes of a tournament, a pair copied
// without crossover, a pair crossed over with swapped genes, a mutation,
// evaluation of both population banks, and the final output stream.
module tb_cirpart_top;
  import cirpart_pkg::*;

  localparam int MAX_CHROM = 16, MAX_MODULES = 64, MAX_PINS = 256, MAX_PARTS = 4;
  localparam int CHR_W = $clog2(MAX_CHROM), MOD_W = $clog2(MAX_MODULES);
  localparam int GENE_W = $clog2(MAX_PARTS);

  logic clk = 0, rst_n = 0;
  logic cpu_we, start_ga, ga_comp, busy, net_valid, net_ready, out_valid, evt_valid;
  logic [3:0] cpu_addr;
  logic [REG_W-1:0] cpu_wdata, gen_count;
  logic [MOD_W:0] net_data;
  logic [CHR_W-1:0] out_chrom;
  logic [MOD_W-1:0] out_gene_idx;
  logic [GENE_W-1:0] out_gene;
  logic [COST_W-1:0] out_fitness;
  cpm_state_e state;
  done_code_e evt_code;
  start_code_e start_code;
  logic finished;

  cirpart_top #(.MAX_CHROM(MAX_CHROM), .MAX_MODULES(MAX_MODULES),
                .MAX_PINS(MAX_PINS), .MAX_PARTS(MAX_PARTS)) dut (.*);

  tb_cirpart_driver #(.MAX_CHROM(MAX_CHROM), .MAX_MODULES(MAX_MODULES),
                      .MAX_PARTS(MAX_PARTS), .NM(48), .NNETS(56), .NC(15),
                      .NK(3), .NG(12), .XOVER(52000), .MUT(3000)) drv (
    .clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .start_ga, .ga_comp,
    .net_valid, .net_data, .net_ready, .out_valid, .out_chrom, .out_gene_idx,
    .out_gene, .out_fitness, .evt_valid, .evt_code, .gen_count,
    .mon_bank(dut.bank), .mon_pm_we(dut.pm_we), .mon_pm_waddr(dut.pm_waddr),
    .mon_pm_wdata(dut.pm_wdata), .mon_fm_we(dut.fem_fm_we),
    .mon_fm_waddr(dut.fem_fm_waddr), .mon_fm_wdata(dut.fem_fm_wdata), .finished
  );

  always #5 clk = ~clk;

  // mechanism counters
  int n_load = 0, n_init = 0, n_parallel = 0, n_cut = 0, n_r1 = 0, n_r2 = 0;
  int n_copy = 0, n_cross = 0, n_swap = 0, n_mut = 0, n_bank0 = 0, n_bank1 = 0;
  int n_out = 0;
  int cycles = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.u_cpm.im_we) n_load++;
    if (state == ST_S2_INIT) n_init++;
    if (dut.u_fem.g_v && dut.u_fem.p_v2) n_parallel++;
    if (dut.u_fem.p_v2 && dut.u_fem.p_last2 && dut.u_fem.net_cut) n_cut++;
    if (int'(dut.u_psm.state) == 3) begin
      if (dut.u_psm.fm_rdata < dut.u_psm.f1) n_r2++;
      else n_r1++;
    end
    if (int'(dut.u_gom.state) == 2) begin
      if (dut.u_gom.do_x) n_cross++;
      else n_copy++;
    end
    if (int'(dut.u_gom.state) == 5) begin
      if (dut.u_gom.swap) n_swap++;
      if (dut.u_gom.mut_a) n_mut++;
    end
    if (dut.eval_comp) begin
      if (dut.bank) n_bank1++;
      else n_bank0++;
    end
    if (out_valid) n_out++;
  end

  task automatic need(input int n, input string what);
    drv.checks++;
    if (n == 0) begin
      drv.failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge finished);
    need(n_load, "netlist load");
    need(n_init, "random initial population");
    need(n_parallel, "imbalance and net-cut walkers in the same cycle");
    need(n_cut, "cut net");
    need(n_r1, "tournament won by the first contestant");
    need(n_r2, "tournament won by the second contestant");
    need(n_copy, "pair copied without crossover");
    need(n_cross, "pair with uniform crossover");
    need(n_swap, "gene swapped by crossover");
    need(n_mut, "mutation");
    need(n_bank0, "evaluation of the low bank");
    need(n_bank1, "evaluation of the high bank");
    need(n_out, "final output");
    $display("cycles=%0d load=%0d init=%0d parallel=%0d cut=%0d r1=%0d r2=%0d copy=%0d cross=%0d swap=%0d mut=%0d bank0=%0d bank1=%0d out=%0d",
             cycles, n_load, n_init, n_parallel, n_cut, n_r1, n_r2, n_copy, n_cross,
             n_swap, n_mut, n_bank0, n_bank1, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures);
    $finish;
  end
endmodule
