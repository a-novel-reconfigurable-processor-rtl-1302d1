// cirpart_cpm: Central Processing Module (CPM) of CIRPART.
//
// The controller of the GA processor. While idle it takes control-register
// writes from the CPU interface (cpu_we/cpu_addr/cpu_wdata, register map in
// cirpart_pkg; reset values are the default GA parameters). A one-cycle
// `start_ga` pulse then runs the whole algorithm through the five states of
// its state diagram:
//   S1  take in num_pins netlist words on net_valid/net_data (net_ready is
//       high while words are accepted) and write them to the input memory,
//       then signal Ready;
//   S2  write a random population into the low bank of the population
//       memory, one gene per cycle, then InitComp;
//   S3  StartEval to the fitness evaluator, wait for EvalComp;
//   S4  StartSel to the parent selector, wait for SelComp;
//   S5  StartMat to the genetic-operation module, wait for MatComp, swap
//       the roles of the two population banks, count the generation and
//       return to S3.
// When EvalComp arrives in S3 and the generation counter equals num_gen,
// the controller streams the final population out, one gene per cycle
// (out_valid with chromosome, gene index, gene and that chromosome's
// fitness), then signals GAComp and goes back to S1.
// Each start and completion appears on evt_valid/evt_code with the 3-bit
// completion codes of the diagram; `start_code` shows the last start code.
//
// Control flow, state order, codes, the generation loop and the final
// output follow the document. The register map, the netlist stream
// handshake and the one-gene-per-cycle output stream are this design's.
module cirpart_cpm
  import cirpart_pkg::*;
#(
  parameter int MAX_CHROM   = 128,
  parameter int MAX_MODULES = 4096,
  parameter int MAX_PINS    = 16384,
  parameter int MAX_PARTS   = 8,
  parameter logic [31:0] SALT = 32'h2545_F491,
  localparam int CHR_W  = $clog2(MAX_CHROM),
  localparam int MOD_W  = $clog2(MAX_MODULES),
  localparam int PIN_W  = $clog2(MAX_PINS),
  localparam int GENE_W = $clog2(MAX_PARTS),
  localparam int AW     = 1 + CHR_W + MOD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU interface
  input  logic              cpu_we,
  input  logic [3:0]        cpu_addr,
  input  logic [REG_W-1:0]  cpu_wdata,
  // GA control
  input  logic              start_ga,
  output logic              ga_comp,
  output logic              busy,
  // netlist input stream
  input  logic              net_valid,
  input  logic [MOD_W:0]    net_data,
  output logic              net_ready,
  // final population output stream
  output logic              out_valid,
  output logic [CHR_W-1:0]  out_chrom,
  output logic [MOD_W-1:0]  out_gene_idx,
  output logic [GENE_W-1:0] out_gene,
  output logic [COST_W-1:0] out_fitness,
  // status
  output cpm_state_e        state,
  output logic              evt_valid,
  output done_code_e        evt_code,
  output start_code_e       start_code,
  output logic [REG_W-1:0]  gen_count,
  // to the other modules
  output ctrl_t             ctrl,
  output logic              seed_load,
  output logic              bank,
  output bus_owner_e        owner,
  output logic              start_eval,
  output logic              start_sel,
  output logic              start_mat,
  input  logic              eval_comp,
  input  logic              sel_comp,
  input  logic              mat_comp,
  // input memory write
  output logic              im_we,
  output logic [PIN_W-1:0]  im_waddr,
  output logic [MOD_W:0]    im_wdata,
  // population memory (initial write, final read)
  output logic              pm_we,
  output logic [AW-1:0]     pm_waddr,
  output logic [GENE_W-1:0] pm_wdata,
  output logic [AW-1:0]     pm_raddr,
  input  logic [GENE_W-1:0] pm_rdata,
  // fitness memory (final read)
  output logic [CHR_W-1:0]  fm_raddr,
  input  logic [COST_W-1:0] fm_rdata
);

  logic [31:0]     rnd;
  logic            advance;
  logic [PIN_W:0]  pin_cnt;
  logic [CHR_W:0]  c_cnt;      // chromosome counter (init and output)
  logic [MOD_W:0]  g_cnt;      // gene counter (init and output)
  logic            o_v;        // output read in flight
  logic [CHR_W-1:0] o_c;
  logic [MOD_W-1:0] o_g;
  logic            legal;
  logic            c_last_g, c_last_c;

  cirpart_rng #(.SALT(SALT)) u_rng (
    .clk, .rst_n, .seed_load, .seed(ctrl.seed), .advance, .rnd
  );

  assign legal = (ctrl.num_modules >= 1) && (32'(ctrl.num_modules) <= MAX_MODULES) &&
                 (32'(ctrl.num_pins) <= MAX_PINS) &&
                 (ctrl.num_chrom >= 2) && (32'(ctrl.num_chrom) <= MAX_CHROM) &&
                 (ctrl.num_parts >= 2) && (32'(ctrl.num_parts) <= MAX_PARTS) &&
                 (ctrl.seed != 32'd0);

  assign busy      = (state != ST_S1_IDLE);
  assign net_ready = (state == ST_S1_LOAD) && (pin_cnt < (PIN_W+1)'(ctrl.num_pins));
  assign advance   = (state == ST_S2_INIT);
  assign c_last_g  = (g_cnt + 1'b1 >= (MOD_W+1)'(ctrl.num_modules));
  assign c_last_c  = (c_cnt + 1'b1 >= (CHR_W+1)'(ctrl.num_chrom));

  always_comb begin
    unique case (state)
      ST_S3_EVAL: owner = OWN_FEM;
      ST_S4_SEL:  owner = OWN_PSM;
      ST_S5_MAT:  owner = OWN_GOM;
      default:    owner = OWN_CPM;
    endcase
  end

  // Input memory write straight from the netlist stream.
  assign im_we    = net_valid && net_ready;
  assign im_waddr = pin_cnt[PIN_W-1:0];
  assign im_wdata = net_data;

  // Initial population write: gene g_cnt of chromosome c_cnt, low bank.
  assign pm_we    = (state == ST_S2_INIT);
  assign pm_waddr = {1'b0, c_cnt[CHR_W-1:0], g_cnt[MOD_W-1:0]};
  assign pm_wdata = GENE_W'(scale_rand(rnd[31:16], ctrl.num_parts));

  // Final read-out addresses.
  assign pm_raddr = {bank, c_cnt[CHR_W-1:0], g_cnt[MOD_W-1:0]};
  assign fm_raddr = c_cnt[CHR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_S1_IDLE;
      ctrl       <= '{num_modules: '0, num_pins: '0, num_chrom: DEF_NUM_CHROM,
                      num_parts: 16'd2, num_gen: DEF_NUM_GEN,
                      xover_thr: DEF_XOVER_THR, mut_thr: DEF_MUT_THR,
                      seed: 32'd1};
      seed_load  <= 1'b0;
      pin_cnt    <= '0;
      c_cnt      <= '0;
      g_cnt      <= '0;
      bank       <= 1'b0;
      gen_count  <= '0;
      start_eval <= 1'b0;
      start_sel  <= 1'b0;
      start_mat  <= 1'b0;
      start_code <= START_GA;
      evt_valid  <= 1'b0;
      evt_code   <= DONE_READY;
      ga_comp    <= 1'b0;
      o_v        <= 1'b0;
      o_c        <= '0;
      o_g        <= '0;
    end else begin
      seed_load  <= 1'b0;
      start_eval <= 1'b0;
      start_sel  <= 1'b0;
      start_mat  <= 1'b0;
      evt_valid  <= 1'b0;
      ga_comp    <= 1'b0;
      o_v        <= 1'b0;
      case (state)
        ST_S1_IDLE: begin
          if (cpu_we) begin
            case (cpu_addr)
              REG_NUM_MODULES: ctrl.num_modules <= cpu_wdata;
              REG_NUM_PINS:    ctrl.num_pins    <= cpu_wdata;
              REG_NUM_CHROM:   ctrl.num_chrom   <= cpu_wdata;
              REG_NUM_PARTS:   ctrl.num_parts   <= cpu_wdata;
              REG_NUM_GEN:     ctrl.num_gen     <= cpu_wdata;
              REG_XOVER_THR:   ctrl.xover_thr   <= cpu_wdata;
              REG_MUT_THR:     ctrl.mut_thr     <= cpu_wdata;
              REG_SEED_LO:     ctrl.seed[15:0]  <= cpu_wdata;
              REG_SEED_HI:     ctrl.seed[31:16] <= cpu_wdata;
              default: ;
            endcase
          end else if (start_ga && legal) begin
            state      <= ST_S1_LOAD;
            start_code <= START_GA;
            seed_load  <= 1'b1;
            pin_cnt    <= '0;
            gen_count  <= '0;
            bank       <= 1'b0;
          end
        end
        ST_S1_LOAD: begin
          if (im_we) pin_cnt <= pin_cnt + 1'b1;
          if (!net_ready || (im_we && pin_cnt + 1'b1 >= (PIN_W+1)'(ctrl.num_pins))) begin
            state      <= ST_S2_INIT;
            start_code <= START_INIT;
            evt_valid  <= 1'b1;
            evt_code   <= DONE_READY;
            c_cnt      <= '0;
            g_cnt      <= '0;
          end
        end
        ST_S2_INIT: begin
          g_cnt <= g_cnt + 1'b1;
          if (c_last_g) begin
            g_cnt <= '0;
            c_cnt <= c_cnt + 1'b1;
            if (c_last_c) begin
              state      <= ST_S3_EVAL;
              start_code <= START_EVAL;
              start_eval <= 1'b1;
              evt_valid  <= 1'b1;
              evt_code   <= INIT_COMP;
            end
          end
        end
        ST_S3_EVAL: begin
          if (eval_comp) begin
            evt_valid <= 1'b1;
            evt_code  <= EVAL_COMP;
            if (gen_count >= ctrl.num_gen) begin
              state <= ST_OUT;
              c_cnt <= '0;
              g_cnt <= '0;
            end else begin
              state      <= ST_S4_SEL;
              start_code <= START_SEL;
              start_sel  <= 1'b1;
            end
          end
        end
        ST_S4_SEL: begin
          if (sel_comp) begin
            state      <= ST_S5_MAT;
            start_code <= START_MAT;
            start_mat  <= 1'b1;
            evt_valid  <= 1'b1;
            evt_code   <= SEL_COMP;
          end
        end
        ST_S5_MAT: begin
          if (mat_comp) begin
            state      <= ST_S3_EVAL;
            start_code <= START_EVAL;
            start_eval <= 1'b1;
            evt_valid  <= 1'b1;
            evt_code   <= MAT_COMP;
            bank       <= ~bank;
            gen_count  <= gen_count + 1'b1;
          end
        end
        ST_OUT: begin
          // read gene (c_cnt, g_cnt); data is presented the next cycle
          if (c_cnt < (CHR_W+1)'(ctrl.num_chrom)) begin
            o_v   <= 1'b1;
            o_c   <= c_cnt[CHR_W-1:0];
            o_g   <= g_cnt[MOD_W-1:0];
            g_cnt <= g_cnt + 1'b1;
            if (c_last_g) begin
              g_cnt <= '0;
              c_cnt <= c_cnt + 1'b1;
            end
          end else if (!o_v) begin
            state     <= ST_S1_IDLE;
            ga_comp   <= 1'b1;
            evt_valid <= 1'b1;
            evt_code  <= GA_COMP;
          end
        end
        default: state <= ST_S1_IDLE;
      endcase
    end
  end

  assign out_valid    = o_v;
  assign out_chrom    = o_c;
  assign out_gene_idx = o_g;
  assign out_gene     = pm_rdata;
  assign out_fitness  = fm_rdata;

  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == ST_S1_IDLE && start_ga && !cpu_we) |-> legal)
    else $error("start_ga with illegal control registers");
  assert property (@(posedge clk) disable iff (!rst_n)
                   im_we |-> net_data[MOD_W-1:0] < ctrl.num_modules[MOD_W-1:0] ||
                             32'(ctrl.num_modules) == MAX_MODULES)
    else $error("netlist word names a module beyond num_modules");

endmodule
