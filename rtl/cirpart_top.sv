// cirpart_top: CIRPART, a genetic-algorithm processor for multiway circuit
// partitioning.
//
// Four modules share three memories:
//   CPM  cirpart_cpm        controller, control registers, netlist input,
//                           random initial population, final output
//   FEM  cirpart_fem        fitness (net-cut + imbalance cost) evaluation
//   PSM  cirpart_psm        tournament parent selection
//   GOM  cirpart_gom        uniform crossover and mutation
//   IM   cirpart_input_mem  netlist (pin list)
//   PM   cirpart_pop_mem    population, two banks, one gene per word
//   FM   cirpart_fit_mem    fitness of each chromosome
// Each module has its own address/data bus (AB1/DB1 for the CPM, AB2/DB2
// for the FEM, AB3/DB3 for the PSM, AB4/DB4 for the GOM). Only one of
// FEM, PSM and GOM runs at a time, so the shared memory ports are
// multiplexed by the controller's `owner` output: PM read port A goes to
// the FEM in S3, to the GOM in S5 and to the CPM otherwise; the PM write
// port to the GOM in S5 and to the CPM otherwise; the FM read port to the
// PSM in S4 and to the CPM otherwise. PM read port B, the IM read port and
// the FM write port belong to the FEM alone, the IM write port to the CPM.
//
// Usage: write the control registers, pulse start_ga, stream num_pins
// netlist words while net_ready is high, then wait for ga_comp; the final
// population and fitnesses appear on out_* just before it. The module set,
// memories and bus structure follow the document's block diagram; the
// multiplexing of the memory ports is this design's.
module cirpart_top
  import cirpart_pkg::*;
#(
  parameter int MAX_CHROM   = 128,
  parameter int MAX_MODULES = 4096,
  parameter int MAX_PINS    = 16384,
  parameter int MAX_PARTS   = 8,
  localparam int CHR_W  = $clog2(MAX_CHROM),
  localparam int MOD_W  = $clog2(MAX_MODULES),
  localparam int PIN_W  = $clog2(MAX_PINS),
  localparam int GENE_W = $clog2(MAX_PARTS),
  localparam int AW     = 1 + CHR_W + MOD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cpu_we,
  input  logic [3:0]        cpu_addr,
  input  logic [REG_W-1:0]  cpu_wdata,
  input  logic              start_ga,
  output logic              ga_comp,
  output logic              busy,
  input  logic              net_valid,
  input  logic [MOD_W:0]    net_data,
  output logic              net_ready,
  output logic              out_valid,
  output logic [CHR_W-1:0]  out_chrom,
  output logic [MOD_W-1:0]  out_gene_idx,
  output logic [GENE_W-1:0] out_gene,
  output logic [COST_W-1:0] out_fitness,
  output cpm_state_e        state,
  output logic              evt_valid,
  output done_code_e        evt_code,
  output start_code_e       start_code,
  output logic [REG_W-1:0]  gen_count
);

  ctrl_t      ctrl;
  logic       seed_load, bank;
  bus_owner_e owner;
  logic       start_eval, start_sel, start_mat;
  logic       eval_comp, sel_comp, mat_comp;

  // AB1/DB1: CPM
  logic              cpm_im_we;
  logic [PIN_W-1:0]  cpm_im_waddr;
  logic [MOD_W:0]    cpm_im_wdata;
  logic              cpm_pm_we;
  logic [AW-1:0]     cpm_pm_waddr, cpm_pm_raddr;
  logic [GENE_W-1:0] cpm_pm_wdata;
  logic [CHR_W-1:0]  cpm_fm_raddr;
  // AB2/DB2: FEM
  logic [PIN_W-1:0]  fem_im_raddr;
  logic [AW-1:0]     fem_pma_raddr, fem_pmb_raddr;
  logic              fem_fm_we;
  logic [CHR_W-1:0]  fem_fm_waddr;
  logic [COST_W-1:0] fem_fm_wdata;
  // AB3/DB3: PSM
  logic [CHR_W-1:0]  psm_fm_raddr;
  logic [CHR_W-1:0]  sel_raddr, sel_rdata;
  // AB4/DB4: GOM
  logic [AW-1:0]     gom_pm_raddr, gom_pm_waddr;
  logic              gom_pm_we;
  logic [GENE_W-1:0] gom_pm_wdata;

  // memory ports
  logic [MOD_W:0]    im_rdata;
  logic              pm_we;
  logic [AW-1:0]     pm_waddr, pm_raddr_a;
  logic [GENE_W-1:0] pm_wdata, pm_rdata_a, pm_rdata_b;
  logic [CHR_W-1:0]  fm_raddr;
  logic [COST_W-1:0] fm_rdata;

  always_comb begin
    unique case (owner)
      OWN_FEM: pm_raddr_a = fem_pma_raddr;
      OWN_GOM: pm_raddr_a = gom_pm_raddr;
      default: pm_raddr_a = cpm_pm_raddr;
    endcase
    if (owner == OWN_GOM) begin
      pm_we    = gom_pm_we;
      pm_waddr = gom_pm_waddr;
      pm_wdata = gom_pm_wdata;
    end else begin
      pm_we    = cpm_pm_we;
      pm_waddr = cpm_pm_waddr;
      pm_wdata = cpm_pm_wdata;
    end
    fm_raddr = (owner == OWN_PSM) ? psm_fm_raddr : cpm_fm_raddr;
  end

  cirpart_cpm #(
    .MAX_CHROM(MAX_CHROM), .MAX_MODULES(MAX_MODULES),
    .MAX_PINS(MAX_PINS), .MAX_PARTS(MAX_PARTS)
  ) u_cpm (
    .clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata,
    .start_ga, .ga_comp, .busy,
    .net_valid, .net_data, .net_ready,
    .out_valid, .out_chrom, .out_gene_idx, .out_gene, .out_fitness,
    .state, .evt_valid, .evt_code, .start_code, .gen_count,
    .ctrl, .seed_load, .bank, .owner,
    .start_eval, .start_sel, .start_mat, .eval_comp, .sel_comp, .mat_comp,
    .im_we(cpm_im_we), .im_waddr(cpm_im_waddr), .im_wdata(cpm_im_wdata),
    .pm_we(cpm_pm_we), .pm_waddr(cpm_pm_waddr), .pm_wdata(cpm_pm_wdata),
    .pm_raddr(cpm_pm_raddr), .pm_rdata(pm_rdata_a),
    .fm_raddr(cpm_fm_raddr), .fm_rdata
  );

  cirpart_fem #(
    .MAX_CHROM(MAX_CHROM), .MAX_MODULES(MAX_MODULES),
    .MAX_PINS(MAX_PINS), .MAX_PARTS(MAX_PARTS)
  ) u_fem (
    .clk, .rst_n, .start(start_eval), .done(eval_comp), .bank,
    .num_modules(ctrl.num_modules), .num_pins(ctrl.num_pins),
    .num_chrom(ctrl.num_chrom), .num_parts(ctrl.num_parts),
    .im_raddr(fem_im_raddr), .im_rdata,
    .pma_raddr(fem_pma_raddr), .pma_rdata(pm_rdata_a),
    .pmb_raddr(fem_pmb_raddr), .pmb_rdata(pm_rdata_b),
    .fm_we(fem_fm_we), .fm_waddr(fem_fm_waddr), .fm_wdata(fem_fm_wdata)
  );

  cirpart_psm #(.MAX_CHROM(MAX_CHROM)) u_psm (
    .clk, .rst_n, .seed_load, .seed(ctrl.seed),
    .start(start_sel), .done(sel_comp), .num_chrom(ctrl.num_chrom),
    .fm_raddr(psm_fm_raddr), .fm_rdata, .sel_raddr, .sel_rdata
  );

  cirpart_gom #(
    .MAX_CHROM(MAX_CHROM), .MAX_MODULES(MAX_MODULES), .MAX_PARTS(MAX_PARTS)
  ) u_gom (
    .clk, .rst_n, .seed_load, .seed(ctrl.seed),
    .start(start_mat), .done(mat_comp), .bank,
    .num_modules(ctrl.num_modules), .num_chrom(ctrl.num_chrom),
    .num_parts(ctrl.num_parts), .xover_thr(ctrl.xover_thr),
    .mut_thr(ctrl.mut_thr),
    .sel_raddr, .sel_rdata,
    .pm_raddr(gom_pm_raddr), .pm_rdata(pm_rdata_a),
    .pm_we(gom_pm_we), .pm_waddr(gom_pm_waddr), .pm_wdata(gom_pm_wdata)
  );

  cirpart_input_mem #(.MAX_PINS(MAX_PINS), .MAX_MODULES(MAX_MODULES)) u_im (
    .clk, .we(cpm_im_we), .waddr(cpm_im_waddr), .wdata(cpm_im_wdata),
    .raddr(fem_im_raddr), .rdata(im_rdata)
  );

  cirpart_pop_mem #(
    .MAX_CHROM(MAX_CHROM), .MAX_MODULES(MAX_MODULES), .MAX_PARTS(MAX_PARTS)
  ) u_pm (
    .clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .raddr_a(pm_raddr_a), .rdata_a(pm_rdata_a),
    .raddr_b(fem_pmb_raddr), .rdata_b(pm_rdata_b)
  );

  cirpart_fit_mem #(.MAX_CHROM(MAX_CHROM), .COST_W(COST_W)) u_fm (
    .clk, .we(fem_fm_we), .waddr(fem_fm_waddr), .wdata(fem_fm_wdata),
    .raddr(fm_raddr), .rdata(fm_rdata)
  );

endmodule
