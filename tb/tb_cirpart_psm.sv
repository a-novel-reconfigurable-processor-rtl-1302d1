// tb_cirpart_psm: tournament selection against a reference model.
//
// A behavioural fitness memory (one cycle of read latency) holds random
// costs, with many ties. The reference replays the generator from the same
// seed: each table entry draws r1 then r2 as floor(rand16 * num_chrom /
// 65536) from the upper half of successive generator states and keeps r2
// only if its cost is strictly lower. The test checks every table entry,
// that the table has num_chrom rounded up to even entries, that each entry
// is no worse than both contestants, that both outcomes of the comparator
// occur, and that `done` rises 3 * entries + 1 clock edges after the edge that
// samples `start`.
module tb_cirpart_psm;
  import cirpart_pkg::*;
  import tb_cirpart_ref_pkg::*;

  localparam int MAX_CHROM = 128, CHR_W = $clog2(MAX_CHROM);
  localparam logic [31:0] SALT = 32'h0F0F_3C3C;

  logic clk = 0, rst_n = 0, seed_load = 0, start = 0, done;
  logic [31:0] seed = 0;
  logic [REG_W-1:0] num_chrom = 0;
  logic [CHR_W-1:0] fm_raddr, sel_raddr = 0, sel_rdata;
  logic [COST_W-1:0] fm_rdata;
  logic [COST_W-1:0] fm [MAX_CHROM];
  int checks = 0, failures = 0;
  int r2_wins = 0, r1_wins = 0;

  cirpart_psm #(.MAX_CHROM(MAX_CHROM), .SALT(SALT)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) fm_rdata <= fm[fm_raddr];

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

  initial begin
    int unsigned st;
    int nc, nsel, cycles, r1, r2, w;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 12; trial++) begin
      nc = (trial == 0) ? MAX_CHROM : (trial == 1) ? 3 : 2 + int'($urandom_range(60));
      for (int i = 0; i < MAX_CHROM; i++) fm[i] = COST_W'($urandom_range(15));
      num_chrom = 16'(nc);
      @(negedge clk);
      seed = $urandom | 1; seed_load = 1;
      @(negedge clk); seed_load = 0;
      st = seed ^ SALT;
      if (st == 0) st = SALT;
      start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      nsel = nc + (nc % 2);
      check(cycles == 3 * nsel + 1, $sformatf("trial %0d cycles %0d expected %0d",
                                          trial, cycles, 3 * nsel + 1));
      for (int i = 0; i < nsel; i++) begin
        r1 = int'(ref_scale(st >> 16, nc)); st = ref_xorshift(st);
        r2 = int'(ref_scale(st >> 16, nc)); st = ref_xorshift(st);
        w = (fm[r2] < fm[r1]) ? r2 : r1;
        if (fm[r2] < fm[r1]) r2_wins++;
        else if (fm[r1] < fm[r2]) r1_wins++;
        sel_raddr = CHR_W'(i);
        #1;
        check(int'(sel_rdata) == w, $sformatf("trial %0d entry %0d got %0d expected %0d",
                                              trial, i, sel_rdata, w));
        check(fm[sel_rdata] <= fm[r1] && fm[sel_rdata] <= fm[r2] && int'(sel_rdata) < nc,
              "winner no worse than both contestants");
      end
    end
    check(r1_wins > 0 && r2_wins > 0, "both comparator outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
