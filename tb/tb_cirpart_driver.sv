// tb_cirpart_driver: drives one complete GA run on a CIRPART top and checks
// it against reference models.
//
// It programs the control registers, pulses start_ga, streams a random
// netlist of NNETS nets (2..5 pins each) over NM modules, and then checks:
//  * every fitness-memory write, against the reference cost of the genes
//    that a mirror of the population memory holds for that chromosome in
//    the bank being evaluated;
//  * every gene of the final output stream is legal, matches the mirror,
//    and each chromosome's output fitness equals its reference cost;
//  * the completion codes: Ready, InitComp, (EvalComp, SelComp, MatComp)
//    per generation, a last EvalComp, GAComp;
//  * the generation counter and the population's mean cost, which must fall
//    from the initial to the final population.
// `finished` rises when all checks are done; checks and failures are read by
// the testbench that instantiates it.
module tb_cirpart_driver
  import cirpart_pkg::*;
  import tb_cirpart_ref_pkg::*;
#(
  parameter int MAX_CHROM = 128, MAX_MODULES = 4096, MAX_PARTS = 8,
  parameter int NM = 125, NNETS = 147, NC = 20, NK = 4, NG = 20,
  parameter int XOVER = 64881, MUT = 655,
  localparam int CHR_W = $clog2(MAX_CHROM), MOD_W = $clog2(MAX_MODULES),
  localparam int GENE_W = $clog2(MAX_PARTS), AW = 1 + CHR_W + MOD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              cpu_we,
  output logic [3:0]        cpu_addr,
  output logic [REG_W-1:0]  cpu_wdata,
  output logic              start_ga,
  input  logic              ga_comp,
  output logic              net_valid,
  output logic [MOD_W:0]    net_data,
  input  logic              net_ready,
  input  logic              out_valid,
  input  logic [CHR_W-1:0]  out_chrom,
  input  logic [MOD_W-1:0]  out_gene_idx,
  input  logic [GENE_W-1:0] out_gene,
  input  logic [COST_W-1:0] out_fitness,
  input  logic              evt_valid,
  input  done_code_e        evt_code,
  input  logic [REG_W-1:0]  gen_count,
  // monitors inside the top
  input  logic              mon_bank,
  input  logic              mon_pm_we,
  input  logic [AW-1:0]     mon_pm_waddr,
  input  logic [GENE_W-1:0] mon_pm_wdata,
  input  logic              mon_fm_we,
  input  logic [CHR_W-1:0]  mon_fm_waddr,
  input  logic [COST_W-1:0] mon_fm_wdata,
  output logic              finished
);

  int checks = 0, failures = 0;
  int unsigned pins[$];
  logic [GENE_W-1:0] mirror [2][MAX_CHROM][NM];
  done_code_e evts[$];
  int n_fm_writes = 0, n_evals_seen = 0;
  longint first_sum = 0, last_sum = 0;
  int first_best = 1 << 30, last_best = 1 << 30;
  int out_count = 0;
  int out_genes[MAX_CHROM][$];
  int out_fit[MAX_CHROM];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int mirror_cost(input logic b, input int c);
    int genes[$];
    for (int g = 0; g < NM; g++) genes.push_back(int'(mirror[b][c][g]));
    return int'(ref_cost(pins, genes, NK));
  endfunction

  // mirror of the population memory and on-line fitness check
  always @(posedge clk) if (rst_n) begin
    if (mon_pm_we) begin
      logic b;
      int c, g;
      b = mon_pm_waddr[AW-1];
      c = int'(mon_pm_waddr[AW-2 -: CHR_W]);
      g = int'(mon_pm_waddr[MOD_W-1:0]);
      if (c < NC && g < NM) mirror[b][c][g] <= mon_pm_wdata;
      else check(0, "population write outside the problem");
    end
    if (mon_fm_we) begin
      int exp_c;
      exp_c = mirror_cost(mon_bank, int'(mon_fm_waddr));
      check(int'(mon_fm_wdata) == exp_c,
            $sformatf("fitness write chrom %0d: %0d expected %0d", mon_fm_waddr, mon_fm_wdata, exp_c));
      if (n_fm_writes < NC) begin
        first_sum += exp_c;
        if (exp_c < first_best) first_best = exp_c;
      end
      n_fm_writes++;
    end
    if (evt_valid) evts.push_back(evt_code);
    if (out_valid) begin
      out_genes[out_chrom].push_back(int'(out_gene));
      out_fit[out_chrom] = int'(out_fitness);
      check(int'(out_gene) < NK, "output gene out of range");
      check(out_gene == mirror[mon_bank][out_chrom][out_gene_idx], "output gene matches memory");
      check(int'(out_chrom) == out_count / NM && int'(out_gene_idx) == out_count % NM,
            "output order");
      out_count++;
    end
  end

  task automatic wr(input reg_addr_e a, input int v);
    @(negedge clk);
    cpu_we = 1; cpu_addr = a; cpu_wdata = REG_W'(v);
    @(negedge clk);
    cpu_we = 0;
  endtask

  initial begin
    done_code_e exp_evts[$];
    int ne;
    cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; start_ga = 0;
    net_valid = 0; net_data = 0; finished = 0;
    make_netlist(pins, NM, NNETS, 5);
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    wr(REG_NUM_MODULES, NM); wr(REG_NUM_PINS, pins.size());
    wr(REG_NUM_CHROM, NC);   wr(REG_NUM_PARTS, NK);
    wr(REG_NUM_GEN, NG);     wr(REG_XOVER_THR, XOVER); wr(REG_MUT_THR, MUT);
    wr(REG_SEED_LO, 16'h1D2B); wr(REG_SEED_HI, 16'h0007);
    @(negedge clk); start_ga = 1;
    @(negedge clk); start_ga = 0;
    foreach (pins[i]) begin
      net_valid = 1;
      net_data = {pins[i][31], MOD_W'(pins[i])};
      @(posedge clk);
      while (!net_ready) @(posedge clk);
      @(negedge clk);
    end
    net_valid = 0;
    @(posedge ga_comp);
    repeat (2) @(negedge clk);
    // final population
    check(out_count == NC * NM, $sformatf("output genes %0d expected %0d", out_count, NC * NM));
    for (int c = 0; c < NC; c++) begin
      int exp_c;
      exp_c = int'(ref_cost(pins, out_genes[c], NK));
      check(out_fit[c] == exp_c, $sformatf("final fitness chrom %0d: %0d expected %0d",
                                           c, out_fit[c], exp_c));
      last_sum += exp_c;
      if (exp_c < last_best) last_best = exp_c;
    end
    check(n_fm_writes == NC * (NG + 1), $sformatf("fitness writes %0d expected %0d",
                                                  n_fm_writes, NC * (NG + 1)));
    check(gen_count == REG_W'(NG), "generation count");
    exp_evts = {DONE_READY, INIT_COMP};
    for (int i = 0; i < NG; i++) exp_evts = {exp_evts, EVAL_COMP, SEL_COMP, MAT_COMP};
    exp_evts = {exp_evts, EVAL_COMP, GA_COMP};
    check(evts.size() == exp_evts.size(), "number of completion events");
    ne = (evts.size() < exp_evts.size()) ? evts.size() : exp_evts.size();
    for (int i = 0; i < ne; i++) check(evts[i] == exp_evts[i], $sformatf("event %0d", i));
    if (NG > 0)
      check(last_sum < first_sum, $sformatf("mean cost falls: initial total %0d final total %0d",
                                            first_sum, last_sum));
    $display("pins=%0d initial: total %0d best %0d  final: total %0d best %0d",
             pins.size(), first_sum, first_best, last_sum, last_best);
    finished = 1;
  end

endmodule
