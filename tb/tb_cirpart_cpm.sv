// tb_cirpart_cpm: the central controller with the other three modules
// replaced by responders that answer each start pulse with a completion
// pulse after a random delay, and with behavioural memories.
//
// Checks: control registers written over the CPU interface reach `ctrl`;
// the netlist stream (with gaps in net_valid) lands in the input memory and
// net_ready drops after num_pins words; the initial population fills
// chromosomes 0..num_chrom-1, genes 0..num_modules-1 of the low bank
// exactly once with legal partition numbers in num_chrom*num_modules
// cycles; the completion codes follow Ready, InitComp, then
// (EvalComp, SelComp, MatComp) per generation, a last EvalComp and GAComp;
// the start pulses come only in their states with the right bus owner; the
// bank swaps and the generation counter counts at each MatComp; the final
// output stream carries every gene of the final bank with its fitness.
module tb_cirpart_cpm;
  import cirpart_pkg::*;

  localparam int MAX_CHROM = 8, MAX_MODULES = 16, MAX_PINS = 32, MAX_PARTS = 4;
  localparam int CHR_W = $clog2(MAX_CHROM), MOD_W = $clog2(MAX_MODULES);
  localparam int PIN_W = $clog2(MAX_PINS), GENE_W = $clog2(MAX_PARTS);
  localparam int AW = 1 + CHR_W + MOD_W;

  logic clk = 0, rst_n = 0;
  logic cpu_we = 0;
  logic [3:0] cpu_addr = 0;
  logic [REG_W-1:0] cpu_wdata = 0;
  logic start_ga = 0, ga_comp, busy;
  logic net_valid = 0, net_ready;
  logic [MOD_W:0] net_data = 0;
  logic out_valid;
  logic [CHR_W-1:0] out_chrom;
  logic [MOD_W-1:0] out_gene_idx;
  logic [GENE_W-1:0] out_gene;
  logic [COST_W-1:0] out_fitness;
  cpm_state_e state;
  logic evt_valid;
  done_code_e evt_code;
  start_code_e start_code;
  logic [REG_W-1:0] gen_count;
  ctrl_t ctrl;
  logic seed_load, bank;
  bus_owner_e owner;
  logic start_eval, start_sel, start_mat;
  logic eval_comp = 0, sel_comp = 0, mat_comp = 0;
  logic im_we;
  logic [PIN_W-1:0] im_waddr;
  logic [MOD_W:0] im_wdata;
  logic pm_we;
  logic [AW-1:0] pm_waddr, pm_raddr;
  logic [GENE_W-1:0] pm_wdata, pm_rdata;
  logic [CHR_W-1:0] fm_raddr;
  logic [COST_W-1:0] fm_rdata;

  logic [MOD_W:0] im [MAX_PINS];
  logic [GENE_W-1:0] pm [2**AW];
  logic [COST_W-1:0] fm [MAX_CHROM];
  int pm_wcount [2**AW];
  int checks = 0, failures = 0;
  done_code_e evts[$];
  int init_cycles = 0, out_count = 0, ga_pulses = 0;
  logic bank_at_mat;

  cirpart_cpm #(.MAX_CHROM(MAX_CHROM), .MAX_MODULES(MAX_MODULES),
                .MAX_PINS(MAX_PINS), .MAX_PARTS(MAX_PARTS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // behavioural memories
  always_ff @(posedge clk) begin
    pm_rdata <= pm[pm_raddr];
    fm_rdata <= fm[fm_raddr];
    if (im_we) im[im_waddr] <= im_wdata;
    if (pm_we) begin
      pm[pm_waddr] <= pm_wdata;
      pm_wcount[pm_waddr] <= pm_wcount[pm_waddr] + 1;
    end
  end

  // responders for FEM, PSM and GOM
  task automatic respond(ref logic comp);
    repeat ($urandom_range(1, 6)) @(negedge clk);
    comp = 1;
    @(negedge clk);
    comp = 0;
  endtask
  always @(posedge clk) begin
    if (rst_n && start_eval) begin
      checks++;
      if (state != ST_S3_EVAL || owner != OWN_FEM) begin failures++; $display("FAIL eval start state=%s owner=%s t=%0t", state.name(), owner.name(), $time); end
      fork respond(eval_comp); join_none
    end
    if (rst_n && start_sel) begin
      checks++;
      if (state != ST_S4_SEL || owner != OWN_PSM) begin failures++; $display("FAIL sel start state=%s t=%0t", state.name(), $time); end
      fork respond(sel_comp); join_none
    end
    if (rst_n && start_mat) begin
      checks++;
      if (state != ST_S5_MAT || owner != OWN_GOM) begin failures++; $display("FAIL mat start"); end
      bank_at_mat = bank;
      fork respond(mat_comp); join_none
    end
    if (evt_valid) evts.push_back(evt_code);
    if (state == ST_S2_INIT) init_cycles++;
    if (ga_comp) ga_pulses++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input reg_addr_e a, input int v);
    @(negedge clk);
    cpu_we = 1; cpu_addr = a; cpu_wdata = REG_W'(v);
    @(negedge clk);
    cpu_we = 0;
  endtask

  task automatic run(input int nm, input int np_in, input int nc, input int nk, input int ng);
    logic [MOD_W:0] words[$];
    int e, seen_part;
    done_code_e exp_evts[$];
    wr(REG_NUM_MODULES, nm); wr(REG_NUM_PINS, np_in); wr(REG_NUM_CHROM, nc);
    wr(REG_NUM_PARTS, nk);   wr(REG_NUM_GEN, ng);
    wr(REG_XOVER_THR, 1234); wr(REG_MUT_THR, 77);
    wr(REG_SEED_LO, 16'hBEEF); wr(REG_SEED_HI, 16'h0042);
    check(ctrl.num_modules == 16'(nm) && ctrl.num_pins == 16'(np_in) &&
          ctrl.num_chrom == 16'(nc) && ctrl.num_parts == 16'(nk) &&
          ctrl.num_gen == 16'(ng) && ctrl.xover_thr == 16'd1234 &&
          ctrl.mut_thr == 16'd77 && ctrl.seed == 32'h0042_BEEF, "control registers");
    foreach (pm_wcount[i]) pm_wcount[i] = 0;
    for (int i = 0; i < MAX_CHROM; i++) fm[i] = COST_W'($urandom);
    evts = {};
    init_cycles = 0; out_count = 0; ga_pulses = 0;
    @(negedge clk); start_ga = 1;
    @(negedge clk); start_ga = 0;
    check(busy && state == ST_S1_LOAD, "loading after start_ga");
    // netlist stream with gaps
    for (int i = 0; i < np_in; i++) words.push_back({1'(i % 3 == 2), MOD_W'($urandom_range(nm - 1))});
    for (int i = 0; i < np_in; ) begin
      net_valid = ($urandom_range(2) != 0);
      net_data = words[i];
      @(posedge clk);
      if (net_valid && net_ready) i++;
      @(negedge clk);
    end
    net_valid = 0;
    @(negedge clk);
    check(!net_ready, "net_ready low after num_pins words");
    // wait for the end
    while (!ga_comp) begin
      @(posedge clk);
      if (out_valid) begin
        int c, g;
        c = out_count / nm;
        g = out_count % nm;
        check(int'(out_chrom) == c && int'(out_gene_idx) == g, "output order");
        check(out_gene == pm[{bank, out_chrom, out_gene_idx}], "output gene");
        check(out_fitness == fm[out_chrom], "output fitness");
        out_count++;
      end
    end
    @(negedge clk); @(negedge clk);
    check(!busy && state == ST_S1_IDLE && ga_pulses == 1, "back to idle after GAComp");
    for (int i = 0; i < np_in; i++) check(im[i] == words[i], $sformatf("netlist word %0d", i));
    seen_part = 0;
    for (int c = 0; c < MAX_CHROM; c++)
      for (int g = 0; g < MAX_MODULES; g++) begin
        if (c < nc && g < nm) seen_part |= 1 << pm[{1'b0, CHR_W'(c), MOD_W'(g)}];
        // only the initial population is written here (responders write nothing)
        check(pm_wcount[{1'b0, CHR_W'(c), MOD_W'(g)}] == ((c < nc && g < nm) ? 1 : 0) &&
              pm_wcount[{1'b1, CHR_W'(c), MOD_W'(g)}] == 0, "initial population writes");
      end
    check(seen_part == (1 << nk) - 1, $sformatf("initial genes cover all partitions, %b", seen_part));
    check(init_cycles == nc * nm, $sformatf("init cycles %0d expected %0d", init_cycles, nc * nm));
    check(out_count == nc * nm, "output count");
    check(gen_count == 16'(ng), "generation counter");
    check(bank == 1'(ng % 2), "bank after the last generation");
    exp_evts = {DONE_READY, INIT_COMP};
    for (int i = 0; i < ng; i++) exp_evts = {exp_evts, EVAL_COMP, SEL_COMP, MAT_COMP};
    exp_evts = {exp_evts, EVAL_COMP, GA_COMP};
    check(evts.size() == exp_evts.size(), $sformatf("event count %0d expected %0d",
                                                    evts.size(), exp_evts.size()));
    e = (evts.size() < exp_evts.size()) ? evts.size() : exp_evts.size();
    for (int i = 0; i < e; i++) check(evts[i] == exp_evts[i], $sformatf("event %0d", i));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ctrl.num_chrom == DEF_NUM_CHROM && ctrl.num_gen == DEF_NUM_GEN &&
          ctrl.xover_thr == DEF_XOVER_THR && ctrl.mut_thr == DEF_MUT_THR,
          "reset values are the default GA parameters");
    run(12, 20, 6, 3, 3);
    run(MAX_MODULES, MAX_PINS, MAX_CHROM, MAX_PARTS, 4);
    run(5, 0, 2, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
