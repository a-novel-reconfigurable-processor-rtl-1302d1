// tb_cirpart_workloads: the evaluation's workload shapes on CIRPART at its
// default sizes. Four processors run side by side, each with random
// netlists of a benchmark's module and net counts (2..5 pins per net),
// 4-way partitioning:
//   0  2844 modules, 3282 nets (largest net count), 20 chromosomes, 20 generations
//   1  3014 modules, 3029 nets (largest module count), 20 chromosomes, 20 generations
//   2   125 modules,  147 nets, 100 chromosomes, 20 generations (largest population)
//   3   125 modules,  147 nets, 20 chromosomes, 100 generations (most generations)
// Each run is checked by tb_cirpart_driver (every fitness value, the final
// population, the completion codes, falling mean cost). The busy cycles of
// each run are converted to time at the 117 MHz clock the design was built
// for and must not exceed the hardware time published for a circuit of that
// size and GA setting: 85.34, 77.27, 18.38 and 16.96 ms.
module tb_cirpart_workloads;
  import cirpart_pkg::*;

  localparam int CHR_W = 7, MOD_W = 12, GENE_W = 3;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] cpu_we, start_ga, ga_comp, busy, net_valid, net_ready, out_valid, evt_valid;
  logic [N-1:0] finished;
  logic [3:0] cpu_addr [N];
  logic [REG_W-1:0] cpu_wdata [N], gen_count [N];
  logic [MOD_W:0] net_data [N];
  logic [CHR_W-1:0] out_chrom [N];
  logic [MOD_W-1:0] out_gene_idx [N];
  logic [GENE_W-1:0] out_gene [N];
  logic [COST_W-1:0] out_fitness [N];
  cpm_state_e state [N];
  done_code_e evt_code [N];
  start_code_e start_code [N];
  int cycles [N];
  int n_checks = 0, n_fail = 0;

  localparam int NM [N] = '{2844, 3014, 125, 125};
  localparam int NN [N] = '{3282, 3029, 147, 147};
  localparam int NC [N] = '{20, 20, 100, 20};
  localparam int NG [N] = '{20, 20, 20, 100};
  localparam real MS [N] = '{85.34, 77.27, 18.38, 16.96};

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_run
    cirpart_top dut (
      .clk, .rst_n, .cpu_we(cpu_we[i]), .cpu_addr(cpu_addr[i]), .cpu_wdata(cpu_wdata[i]),
      .start_ga(start_ga[i]), .ga_comp(ga_comp[i]), .busy(busy[i]),
      .net_valid(net_valid[i]), .net_data(net_data[i]), .net_ready(net_ready[i]),
      .out_valid(out_valid[i]), .out_chrom(out_chrom[i]), .out_gene_idx(out_gene_idx[i]),
      .out_gene(out_gene[i]), .out_fitness(out_fitness[i]), .state(state[i]),
      .evt_valid(evt_valid[i]), .evt_code(evt_code[i]), .start_code(start_code[i]),
      .gen_count(gen_count[i])
    );
    tb_cirpart_driver #(.NM(NM[i]), .NNETS(NN[i]), .NC(NC[i]), .NK(4), .NG(NG[i])) drv (
      .clk, .rst_n, .cpu_we(cpu_we[i]), .cpu_addr(cpu_addr[i]), .cpu_wdata(cpu_wdata[i]),
      .start_ga(start_ga[i]), .ga_comp(ga_comp[i]),
      .net_valid(net_valid[i]), .net_data(net_data[i]), .net_ready(net_ready[i]),
      .out_valid(out_valid[i]), .out_chrom(out_chrom[i]), .out_gene_idx(out_gene_idx[i]),
      .out_gene(out_gene[i]), .out_fitness(out_fitness[i]),
      .evt_valid(evt_valid[i]), .evt_code(evt_code[i]), .gen_count(gen_count[i]),
      .mon_bank(dut.bank), .mon_pm_we(dut.pm_we), .mon_pm_waddr(dut.pm_waddr),
      .mon_pm_wdata(dut.pm_wdata), .mon_fm_we(dut.fem_fm_we),
      .mon_fm_waddr(dut.fem_fm_waddr), .mon_fm_wdata(dut.fem_fm_wdata),
      .finished(finished[i])
    );
    always @(posedge clk) if (busy[i]) cycles[i]++;
    initial cycles[i] = 0;
  end

  function automatic int total_checks();
    return g_run[0].drv.checks + g_run[1].drv.checks + g_run[2].drv.checks + g_run[3].drv.checks;
  endfunction
  function automatic int total_failures();
    return g_run[0].drv.failures + g_run[1].drv.failures + g_run[2].drv.failures + g_run[3].drv.failures;
  endfunction

  initial begin
    repeat (30000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&finished);
    for (int i = 0; i < N; i++) begin
      real ms;
      ms = real'(cycles[i]) / 117.0e3;
      $display("run %0d: %0d modules %0d nets C=%0d G=%0d: %0d cycles, %0.2f ms at 117 MHz (published %0.2f ms)",
               i, NM[i], NN[i], NC[i], NG[i], cycles[i], ms, MS[i]);
      n_checks++;
      if (ms > MS[i]) begin
        n_fail++;
        $display("FAIL run %0d slower than the published time", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks() + n_checks,
             total_failures() + n_fail);
    $finish;
  end
endmodule
