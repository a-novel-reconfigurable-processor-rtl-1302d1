// tb_cirpart_fit_mem: fills the fitness memory with random costs and reads
// every word back (one cycle of latency), comparing with a shadow copy.
module tb_cirpart_fit_mem;
  localparam int MAX_CHROM = 128, COST_W = 16, CHR_W = $clog2(MAX_CHROM);
  logic clk = 0, we = 0;
  logic [CHR_W-1:0] waddr = 0, raddr = 0;
  logic [COST_W-1:0] wdata = 0, rdata;
  logic [COST_W-1:0] shadow [MAX_CHROM];
  int checks = 0, failures = 0;

  cirpart_fit_mem #(.MAX_CHROM(MAX_CHROM), .COST_W(COST_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < MAX_CHROM; i++) begin
        @(negedge clk);
        we = 1; waddr = CHR_W'(i); wdata = COST_W'($urandom);
        shadow[i] = wdata;
      end
      @(negedge clk); we = 0;
      for (int i = MAX_CHROM - 1; i >= 0; i--) begin
        raddr = CHR_W'(i);
        @(negedge clk);
        checks++;
        if (rdata !== shadow[i]) begin
          failures++;
          $display("FAIL addr %0d: got %h exp %h", i, rdata, shadow[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
