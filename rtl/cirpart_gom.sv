// cirpart_gom: Genetic Operation Module (GOM) of CIRPART.
//
// On a one-cycle `start` pulse it builds the complete child population in
// bank !bank of the population memory from the parents in bank `bank`.
// For pair j it takes parents A = table[2j] and B = table[2j+1] from the
// selection module and writes children 2j and 2j+1 (the second only if
// 2j+1 < num_chrom). Per pair a random draw below xover_thr enables
// uniform crossover; with it, each gene position independently swaps the
// parents' genes between the two children with probability 1/2, without it
// the children copy their parents. Each child gene then mutates, with
// probability mut_thr/65536, into a random partition number in
// [0, num_parts). `done` (MatComp) pulses when the last gene is written.
//
// Timing: two cycles per pair to fetch the parent indices, then four per
// gene (read A, read B, write child A, write child B): with M modules and
// C chromosomes `done` rises ceil(C/2) * (4M + 2) + 1 clock edges after the
// edge that samples `start`, with the last write. Uniform crossover,
// the crossover and mutation rates and the two-bank scheme follow the
// document; the per-gene schedule and the use of the rates as 16-bit
// thresholds are this design's.
module cirpart_gom
  import cirpart_pkg::*;
#(
  parameter int MAX_CHROM   = 128,
  parameter int MAX_MODULES = 4096,
  parameter int MAX_PARTS   = 8,
  parameter logic [31:0] SALT = 32'hB529_7A4D,
  localparam int CHR_W  = $clog2(MAX_CHROM),
  localparam int MOD_W  = $clog2(MAX_MODULES),
  localparam int GENE_W = $clog2(MAX_PARTS),
  localparam int AW     = 1 + CHR_W + MOD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              seed_load,
  input  logic [31:0]       seed,
  input  logic              start,
  output logic              done,
  input  logic              bank,       // parent bank; children go to !bank
  input  logic [REG_W-1:0]  num_modules,
  input  logic [REG_W-1:0]  num_chrom,
  input  logic [REG_W-1:0]  num_parts,
  input  logic [REG_W-1:0]  xover_thr,
  input  logic [REG_W-1:0]  mut_thr,
  // parent table
  output logic [CHR_W-1:0]  sel_raddr,
  input  logic [CHR_W-1:0]  sel_rdata,
  // population memory
  output logic [AW-1:0]     pm_raddr,
  input  logic [GENE_W-1:0] pm_rdata,
  output logic              pm_we,
  output logic [AW-1:0]     pm_waddr,
  output logic [GENE_W-1:0] pm_wdata
);

  typedef enum logic [2:0] {G_IDLE, G_PA, G_PB, G_RDA, G_RDB, G_WRA, G_WRB} gom_state_e;
  gom_state_e state;

  logic [31:0]       rnd;
  logic              advance;
  logic [CHR_W:0]    pair2;      // 2j, index of the first child
  logic [CHR_W-1:0]  pa, pb;
  logic              do_x;       // crossover enabled for this pair
  logic [MOD_W:0]    gene;
  logic              swap;
  logic [GENE_W-1:0] ga;
  logic              mut_a;
  logic [GENE_W-1:0] mval_a;
  logic [GENE_W-1:0] cb;
  logic              last_gene, last_pair, has_b;

  cirpart_rng #(.SALT(SALT)) u_rng (
    .clk, .rst_n, .seed_load, .seed, .advance, .rnd
  );

  assign advance   = (state != G_IDLE) && (state != G_WRB);
  assign sel_raddr = (state == G_PB) ? CHR_W'(pair2 + 1'b1) : pair2[CHR_W-1:0];
  assign pm_raddr  = {bank, (state == G_RDA) ? pa : pb, gene[MOD_W-1:0]};
  assign last_gene = (gene + 1'b1 >= (MOD_W+1)'(num_modules));
  assign last_pair = (pair2 + (CHR_W+1)'(2) >= (CHR_W+1)'(num_chrom));
  assign has_b     = (pair2 + 1'b1 < (CHR_W+1)'(num_chrom));

  // Child genes, formed in G_WRA when parent B's gene is on pm_rdata.
  logic [GENE_W-1:0] xa, xb, mval_b;
  logic              mut_b;
  always_comb begin
    xa     = swap ? pm_rdata : ga;
    xb     = swap ? ga : pm_rdata;
    mut_b  = rnd[31:16] < mut_thr;
    mval_b = GENE_W'(scale_rand(rnd[15:0], num_parts));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= G_IDLE;
      pair2    <= '0;
      pa       <= '0;
      pb       <= '0;
      do_x     <= 1'b0;
      gene     <= '0;
      swap     <= 1'b0;
      ga       <= '0;
      mut_a    <= 1'b0;
      mval_a   <= '0;
      cb       <= '0;
      pm_we    <= 1'b0;
      pm_waddr <= '0;
      pm_wdata <= '0;
      done     <= 1'b0;
    end else begin
      pm_we <= 1'b0;
      done  <= 1'b0;
      case (state)
        G_IDLE: if (start) begin
          pair2 <= '0;
          state <= G_PA;
        end
        G_PA: begin
          pa    <= sel_rdata;
          do_x  <= rnd[31:16] < xover_thr;
          state <= G_PB;
        end
        G_PB: begin
          pb    <= sel_rdata;
          gene  <= '0;
          state <= G_RDA;
        end
        G_RDA: begin
          swap  <= do_x & rnd[0];
          state <= G_RDB;
        end
        G_RDB: begin
          ga     <= pm_rdata;
          mut_a  <= rnd[31:16] < mut_thr;
          mval_a <= GENE_W'(scale_rand(rnd[15:0], num_parts));
          state  <= G_WRA;
        end
        G_WRA: begin
          pm_we    <= 1'b1;
          pm_waddr <= {~bank, pair2[CHR_W-1:0], gene[MOD_W-1:0]};
          pm_wdata <= mut_a ? mval_a : xa;
          cb       <= mut_b ? mval_b : xb;
          state    <= G_WRB;
        end
        G_WRB: begin
          pm_we    <= has_b;
          pm_waddr <= {~bank, CHR_W'(pair2 + 1'b1), gene[MOD_W-1:0]};
          pm_wdata <= cb;
          gene     <= gene + 1'b1;
          if (!last_gene) begin
            state <= G_RDA;
          end else if (!last_pair) begin
            pair2 <= pair2 + (CHR_W+1)'(2);
            state <= G_PA;
          end else begin
            state <= G_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= G_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == G_IDLE)
    else $error("GOM started while busy");

endmodule
