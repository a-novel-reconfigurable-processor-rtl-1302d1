// tb_cirpart_pop_mem: writes random genes across both banks of the
// population memory and reads them back through both read ports at once,
// checking each against a shadow copy; also checks that the two ports read
// independent addresses in the same cycle.
module tb_cirpart_pop_mem;
  localparam int MAX_CHROM = 128, MAX_MODULES = 4096, MAX_PARTS = 8;
  localparam int AW = 1 + $clog2(MAX_CHROM) + $clog2(MAX_MODULES);
  localparam int GENE_W = $clog2(MAX_PARTS);
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr_a = 0, raddr_b = 0;
  logic [GENE_W-1:0] wdata = 0, rdata_a, rdata_b;
  logic [GENE_W-1:0] shadow [int];
  int keys[$];
  int checks = 0, failures = 0;

  cirpart_pop_mem #(.MAX_CHROM(MAX_CHROM), .MAX_MODULES(MAX_MODULES),
                    .MAX_PARTS(MAX_PARTS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [GENE_W-1:0] ea, eb;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1;
      waddr = (i == 0) ? '0 : (i == 1) ? '1 : AW'($urandom);
      wdata = GENE_W'($urandom);
      shadow[int'(waddr)] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (shadow[k]) keys.push_back(k);
    for (int i = 0; i < keys.size(); i++) begin
      raddr_a = AW'(keys[i]);
      raddr_b = AW'(keys[keys.size() - 1 - i]);
      ea = shadow[keys[i]];
      eb = shadow[keys[keys.size() - 1 - i]];
      @(negedge clk);
      checks += 2;
      if (rdata_a !== ea) begin failures++; $display("FAIL port A %0d", keys[i]); end
      if (rdata_b !== eb) begin failures++; $display("FAIL port B"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
