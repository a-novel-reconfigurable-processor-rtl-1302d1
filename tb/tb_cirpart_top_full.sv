// tb_cirpart_top_full: one complete GA run of CIRPART with every memory
// size at its default (4096 modules, 16384 pins, 128 chromosomes,
// 8 partitions), on a random netlist the size of the smallest benchmark
// circuit of the evaluation (125 modules, 147 nets), 4-way, with the
// default GA parameters: 20 chromosomes, 20 generations, crossover rate
// 0.99, mutation rate 0.01. tb_cirpart_driver checks every fitness value,
// the final population and the completion codes. The run's busy cycles,
// at the 117 MHz clock the design was built for, must not exceed the
// 4.18 ms published for a circuit of this size with these GA parameters.
module tb_cirpart_top_full;
  import cirpart_pkg::*;

  localparam int CHR_W = 7, MOD_W = 12, GENE_W = 3;

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
  int cycles = 0;

  cirpart_top dut (.*);

  tb_cirpart_driver #(.NM(125), .NNETS(147), .NC(20), .NK(4), .NG(20)) drv (
    .clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .start_ga, .ga_comp,
    .net_valid, .net_data, .net_ready, .out_valid, .out_chrom, .out_gene_idx,
    .out_gene, .out_fitness, .evt_valid, .evt_code, .gen_count,
    .mon_bank(dut.bank), .mon_pm_we(dut.pm_we), .mon_pm_waddr(dut.pm_waddr),
    .mon_pm_wdata(dut.pm_wdata), .mon_fm_we(dut.fem_fm_we),
    .mon_fm_waddr(dut.fem_fm_waddr), .mon_fm_wdata(dut.fem_fm_wdata), .finished
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (busy) cycles++;

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge finished);
    $display("busy cycles=%0d  (%0.2f ms at 117 MHz, published 4.18 ms)",
             cycles, real'(cycles) / 117.0e3);
    if (real'(cycles) / 117.0e3 > 4.18) begin
      drv.failures++;
      $display("FAIL slower than the published time");
    end
    drv.checks++;
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures);
    $finish;
  end
endmodule
