// cirpart_psm: Parent Selection Module (PSM) of CIRPART.
//
// Binary tournament selection. On a one-cycle `start` pulse it fills a
// table of NSEL parent indices, NSEL being num_chrom rounded up to an even
// number, so that entries 2j and 2j+1 are the parents of the j-th pair of
// children. Each entry is one tournament: two random chromosome indices are
// drawn and latched, their fitnesses are read from the fitness memory, an
// unsigned comparator keeps the one with the lower cost (the first on a
// tie). A pair of parents therefore reads four random fitnesses. When the
// table is full `done` (SelComp) pulses for one cycle.
//
// Timing: three cycles per tournament (draw/read first, draw/read second,
// compare/store); `done` rises 3*NSEL + 1 clock edges after the edge that
// samples `start`.
// The genetic-operation module reads the table through sel_raddr/sel_rdata
// (combinational read).
//
// The random number generator, the comparator, the latched random
// addresses, the control state machine and the four fitness reads per pair
// follow the document; the tournament size of two and the table are this
// design's reading of it.
module cirpart_psm
  import cirpart_pkg::*;
#(
  parameter int MAX_CHROM = 128,
  parameter logic [31:0] SALT = 32'h5851_F42D,
  localparam int CHR_W = $clog2(MAX_CHROM)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              seed_load,
  input  logic [31:0]       seed,
  input  logic              start,
  output logic              done,
  input  logic [REG_W-1:0]  num_chrom,
  // fitness memory read
  output logic [CHR_W-1:0]  fm_raddr,
  input  logic [COST_W-1:0] fm_rdata,
  // parent table read (by the genetic-operation module)
  input  logic [CHR_W-1:0]  sel_raddr,
  output logic [CHR_W-1:0]  sel_rdata
);

  typedef enum logic [1:0] {P_IDLE, P_RD1, P_RD2, P_CMP} psm_state_e;
  psm_state_e state;

  logic [31:0]      rnd;
  logic             advance;
  logic [CHR_W-1:0] r1, r2;     // latched random addresses
  logic [COST_W-1:0] f1;        // fitness of r1
  logic [CHR_W:0]   idx;        // table entry being filled
  logic [CHR_W:0]   nsel;
  logic [CHR_W-1:0] pick;
  logic [CHR_W-1:0] table_q [MAX_CHROM];

  cirpart_rng #(.SALT(SALT)) u_rng (
    .clk, .rst_n, .seed_load, .seed, .advance, .rnd
  );

  assign nsel     = (CHR_W+1)'(num_chrom) + (CHR_W+1)'(num_chrom[0]);
  assign pick     = CHR_W'(scale_rand(rnd[31:16], num_chrom));
  assign advance  = (state == P_RD1) || (state == P_RD2);
  assign fm_raddr = pick;
  assign sel_rdata = table_q[sel_raddr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE;
      r1    <= '0;
      r2    <= '0;
      f1    <= '0;
      idx   <= '0;
      done  <= 1'b0;
      for (int i = 0; i < MAX_CHROM; i++) table_q[i] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        P_IDLE: if (start) begin
          idx   <= '0;
          state <= P_RD1;
        end
        P_RD1: begin
          r1    <= pick;
          state <= P_RD2;
        end
        P_RD2: begin
          r2    <= pick;
          f1    <= fm_rdata;
          state <= P_CMP;
        end
        P_CMP: begin
          // comparator: fm_rdata is the fitness of r2
          table_q[idx[CHR_W-1:0]] <= (fm_rdata < f1) ? r2 : r1;
          idx <= idx + 1'b1;
          if (idx + 1'b1 >= nsel) begin
            state <= P_IDLE;
            done  <= 1'b1;
          end else begin
            state <= P_RD1;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == P_IDLE)
    else $error("PSM started while busy");

endmodule
