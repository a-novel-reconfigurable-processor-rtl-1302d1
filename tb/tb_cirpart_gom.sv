// tb_cirpart_gom: crossover and mutation checks.
//
// Behavioural population memory (one cycle of read latency) and parent
// table. Four kinds of trial, with odd and even population sizes and both
// banks:
//   copy      crossover and mutation off: each child equals its parent;
//   crossover crossover always, no mutation: at each gene the two children
//             hold the two parents' genes, swapped or not, and both happen;
//   mutation  mutation always: every gene is a legal partition number and
//             many genes change;
//   default   rates 0.99 / 0.01: genes stay legal, some mutations occur.
// Every trial also checks that each child gene 0..num_chrom-1 is written
// exactly once, only into the other bank, and the cycle count
// ceil(C/2) * (4M + 2) + 1 edges from the edge that samples start to done.
module tb_cirpart_gom;
  import cirpart_pkg::*;

  localparam int MAX_CHROM = 8, MAX_MODULES = 16, MAX_PARTS = 4;
  localparam int CHR_W = $clog2(MAX_CHROM), MOD_W = $clog2(MAX_MODULES);
  localparam int GENE_W = $clog2(MAX_PARTS), AW = 1 + CHR_W + MOD_W;

  logic clk = 0, rst_n = 0, seed_load = 0, start = 0, done, bank = 0;
  logic [31:0] seed = 32'h1357_9BDF;
  logic [REG_W-1:0] num_modules = 0, num_chrom = 0, num_parts = 0;
  logic [REG_W-1:0] xover_thr = 0, mut_thr = 0;
  logic [CHR_W-1:0] sel_raddr, sel_rdata;
  logic [AW-1:0] pm_raddr, pm_waddr;
  logic [GENE_W-1:0] pm_rdata, pm_wdata;
  logic pm_we;

  logic [GENE_W-1:0] pm [2**AW];
  logic [CHR_W-1:0] tbl [MAX_CHROM];
  int wcount [2**AW];
  int checks = 0, failures = 0;
  int n_swap = 0, n_keep = 0, n_mut = 0;

  cirpart_gom #(.MAX_CHROM(MAX_CHROM), .MAX_MODULES(MAX_MODULES),
                .MAX_PARTS(MAX_PARTS)) dut (.*);

  always #5 clk = ~clk;
  assign sel_rdata = tbl[sel_raddr];
  always_ff @(posedge clk) begin
    pm_rdata <= pm[pm_raddr];
    if (pm_we) begin
      pm[pm_waddr] <= pm_wdata;
      wcount[pm_waddr] <= wcount[pm_waddr] + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] adr(input logic b, input int c, input int g);
    return {b, CHR_W'(c), MOD_W'(g)};
  endfunction

  initial begin
    int nm, nc, np, kind, cycles, npairs, pa, pb, ga, gb, ca, cb;
    int mut_this;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed_load = 1;
    @(negedge clk); seed_load = 0;
    for (int trial = 0; trial < 24; trial++) begin
      kind = trial % 4;
      nm = 1 + int'($urandom_range(MAX_MODULES - 1));
      nc = (trial < 4) ? MAX_CHROM : 2 + int'($urandom_range(MAX_CHROM - 2));
      if (trial == 5) nc = 3;
      np = 2 + int'($urandom_range(MAX_PARTS - 2));
      bank = trial[0] ^ trial[2];
      for (int i = 0; i < 2**AW; i++) begin
        pm[i] = GENE_W'($urandom_range(np - 1));
        wcount[i] = 0;
      end
      for (int i = 0; i < MAX_CHROM; i++) tbl[i] = CHR_W'($urandom_range(nc - 1));
      num_modules = 16'(nm); num_chrom = 16'(nc); num_parts = 16'(np);
      case (kind)
        0: begin xover_thr = 0;      mut_thr = 0;      end
        1: begin xover_thr = 16'hFFFF; mut_thr = 0;    end
        2: begin xover_thr = 0;      mut_thr = 16'hFFFF; end
        default: begin xover_thr = DEF_XOVER_THR; mut_thr = DEF_MUT_THR; end
      endcase
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      @(negedge clk);
      npairs = (nc + 1) / 2;
      check(cycles == npairs * (4 * nm + 2) + 1,
            $sformatf("trial %0d cycles %0d expected %0d", trial, cycles,
                      npairs * (4 * nm + 2) + 1));
      mut_this = 0;
      for (int c = 0; c < MAX_CHROM; c++)
        for (int g = 0; g < MAX_MODULES; g++) begin
          bit inside_pop;
          inside_pop = (c < nc) && (g < nm);
          check(wcount[adr(bank, c, g)] == 0, "write into the parent bank");
          check(wcount[adr(~bank, c, g)] == (inside_pop ? 1 : 0),
                $sformatf("trial %0d child %0d gene %0d written %0d times",
                          trial, c, g, wcount[adr(~bank, c, g)]));
        end
      for (int j = 0; j < npairs; j++) begin
        pa = int'(tbl[2*j]);
        pb = int'(tbl[2*j+1]);
        for (int g = 0; g < nm; g++) begin
          ga = int'(pm[adr(bank, pa, g)]);
          gb = int'(pm[adr(bank, pb, g)]);
          ca = int'(pm[adr(~bank, 2*j, g)]);
          cb = (2*j+1 < nc) ? int'(pm[adr(~bank, 2*j+1, g)]) : gb;
          check(ca < np && cb < np, "gene out of range");
          case (kind)
            0: check(ca == ga && cb == gb, $sformatf("copy trial %0d pair %0d gene %0d", trial, j, g));
            1: begin
              check((2*j+1 < nc) ? ((ca == ga && cb == gb) || (ca == gb && cb == ga))
                                 : (ca == ga || ca == gb),
                    $sformatf("crossover trial %0d pair %0d gene %0d", trial, j, g));
              if (ga != gb && 2*j+1 < nc) begin
                if (ca == gb) n_swap++;
                else n_keep++;
              end
            end
            default: begin
              if (ca != ga && ca != gb) mut_this++;
            end
          endcase
        end
      end
      if (kind == 2) check(mut_this > 0, "mutation changed genes");
      n_mut += mut_this;
    end
    check(n_swap > 0 && n_keep > 0, "uniform crossover swaps some genes and keeps others");
    check(n_mut > 0, "mutations seen");
    $display("swaps=%0d keeps=%0d mutations=%0d", n_swap, n_keep, n_mut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
