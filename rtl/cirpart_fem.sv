// cirpart_fem: Fitness Evaluation Module (FEM) of CIRPART.
//
// On a one-cycle `start` pulse it evaluates every chromosome 0..num_chrom-1
// of population bank `bank`, one after the other, and writes its total cost
// to the fitness memory; then it pulses `done` (EvalComp).
//
// For each chromosome the two costs are computed at the same time by two
// walkers that each handle one word per cycle:
//  * imbalance walker: reads gene 0..num_modules-1 through population read
//    port A and counts the modules placed in each partition. The
//    imbalance cost is (largest partition) - (smallest partition) over
//    partitions 0..num_parts-1.
//  * net-cut walker: reads the pin list from the input memory, looks up the
//    gene of each pin's module through population read port B and ORs a
//    one-hot of it into a partition mask. At the last pin of a net the net
//    counts as cut if the mask has more than one bit set.
// Total cost = net cut + imbalance, saturated to COST_W bits.
//
// Timing: both memories have one cycle of read latency. A chromosome takes
// max(num_modules, num_pins + 1) + 3 cycles (walk, pipeline drain, store);
// `done` rises num_chrom * (max(num_modules, num_pins + 1) + 3) + 1 clock
// edges after the edge that samples `start`, together with the last
// fitness-memory write.
// Computing both costs concurrently follows the document; the cost formulas
// and the walker arrangement are this design's own (the document does not
// define them).
module cirpart_fem
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
  input  logic              start,
  output logic              done,
  input  logic              bank,
  input  logic [REG_W-1:0]  num_modules,
  input  logic [REG_W-1:0]  num_pins,
  input  logic [REG_W-1:0]  num_chrom,
  input  logic [REG_W-1:0]  num_parts,
  // input memory read (netlist)
  output logic [PIN_W-1:0]  im_raddr,
  input  logic [MOD_W:0]    im_rdata,
  // population memory read ports
  output logic [AW-1:0]     pma_raddr,
  input  logic [GENE_W-1:0] pma_rdata,
  output logic [AW-1:0]     pmb_raddr,
  input  logic [GENE_W-1:0] pmb_rdata,
  // fitness memory write
  output logic              fm_we,
  output logic [CHR_W-1:0]  fm_waddr,
  output logic [COST_W-1:0] fm_wdata
);

  typedef enum logic [1:0] {F_IDLE, F_RUN, F_STORE} fem_state_e;
  fem_state_e state;

  logic [CHR_W:0]   chrom;      // chromosome being evaluated
  logic [MOD_W:0]   g_issue;    // next gene to read
  logic             g_v;        // gene read in flight
  logic [PIN_W:0]   p_issue;    // next pin to read
  logic             p_v1;       // pin word arrives this cycle
  logic             p_v2;       // gene of that pin arrives this cycle
  logic             p_last2;    // ... and it was the last pin of its net
  logic [MAX_PARTS-1:0] mask;   // partitions touched by the current net
  logic [MOD_W:0]   cnt [MAX_PARTS];
  logic [COST_W:0]  cut;

  logic g_more, p_more, walk_done;
  assign g_more    = (g_issue < (MOD_W+1)'(num_modules));
  assign p_more    = (p_issue < (PIN_W+1)'(num_pins));
  assign walk_done = !g_more && !p_more && !g_v && !p_v1 && !p_v2;

  assign pma_raddr = {bank, chrom[CHR_W-1:0], g_issue[MOD_W-1:0]};
  assign im_raddr  = p_issue[PIN_W-1:0];
  assign pmb_raddr = {bank, chrom[CHR_W-1:0], im_rdata[MOD_W-1:0]};

  // Net-cut update for the gene arriving on port B.
  logic [MAX_PARTS-1:0] mask_new;
  logic                 net_cut;
  always_comb begin
    mask_new = mask | (MAX_PARTS'(1) << pmb_rdata);
    net_cut  = (mask_new & (mask_new - MAX_PARTS'(1))) != '0;
  end

  // Imbalance = max - min of the partition sizes.
  logic [MOD_W:0]  cmax, cmin;
  logic [COST_W:0] total;
  always_comb begin
    cmax = '0;
    cmin = '1;
    for (int p = 0; p < MAX_PARTS; p++) begin
      if (p < int'(num_parts)) begin
        if (cnt[p] > cmax) cmax = cnt[p];
        if (cnt[p] < cmin) cmin = cnt[p];
      end
    end
    total = cut + (COST_W+1)'(cmax - cmin);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= F_IDLE;
      chrom   <= '0;
      g_issue <= '0;
      p_issue <= '0;
      g_v     <= 1'b0;
      p_v1    <= 1'b0;
      p_v2    <= 1'b0;
      p_last2 <= 1'b0;
      mask    <= '0;
      cut     <= '0;
      for (int p = 0; p < MAX_PARTS; p++) cnt[p] <= '0;
      fm_we    <= 1'b0;
      fm_waddr <= '0;
      fm_wdata <= '0;
      done     <= 1'b0;
    end else begin
      fm_we <= 1'b0;
      done  <= 1'b0;
      case (state)
        F_IDLE: begin
          if (start) begin
            state <= F_RUN;
            chrom <= '0;
          end
        end
        F_RUN: begin
          // imbalance walker
          g_v <= g_more;
          if (g_more) g_issue <= g_issue + 1'b1;
          if (g_v) cnt[pma_rdata] <= cnt[pma_rdata] + 1'b1;
          // net-cut walker
          p_v1 <= p_more;
          if (p_more) p_issue <= p_issue + 1'b1;
          p_v2    <= p_v1;
          p_last2 <= im_rdata[MOD_W];
          if (p_v2) begin
            if (p_last2) begin
              mask <= '0;
              if (net_cut) cut <= cut + 1'b1;
            end else begin
              mask <= mask_new;
            end
          end
          if (walk_done) state <= F_STORE;
        end
        F_STORE: begin
          fm_we    <= 1'b1;
          fm_waddr <= chrom[CHR_W-1:0];
          fm_wdata <= total[COST_W] ? '1 : total[COST_W-1:0];
          g_issue  <= '0;
          p_issue  <= '0;
          mask     <= '0;
          cut      <= '0;
          for (int p = 0; p < MAX_PARTS; p++) cnt[p] <= '0;
          if (chrom + 1'b1 >= (CHR_W+1)'(num_chrom)) begin
            state <= F_IDLE;
            done  <= 1'b1;
          end else begin
            chrom <= chrom + 1'b1;
            state <= F_RUN;
          end
        end
        default: state <= F_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == F_IDLE)
    else $error("FEM started while busy");

endmodule
