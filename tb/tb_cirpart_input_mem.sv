// tb_cirpart_input_mem: writes random pin words at random addresses of the
// netlist memory and checks every read (one cycle of latency) against a
// shadow copy, including a read of the word being written in that cycle
// (the old word is returned).
module tb_cirpart_input_mem;
  localparam int MAX_PINS = 16384, MAX_MODULES = 4096;
  localparam int PIN_W = $clog2(MAX_PINS), MOD_W = $clog2(MAX_MODULES);
  logic clk = 0, we = 0;
  logic [PIN_W-1:0] waddr = 0, raddr = 0;
  logic [MOD_W:0] wdata = 0, rdata;
  logic [MOD_W:0] shadow [int];
  int checks = 0, failures = 0;

  cirpart_input_mem #(.MAX_PINS(MAX_PINS), .MAX_MODULES(MAX_MODULES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MOD_W:0] exp_d;
    // fill 512 random words, plus both ends of the address range
    for (int i = 0; i < 514; i++) begin
      @(negedge clk);
      we = 1;
      waddr = (i == 512) ? '0 : (i == 513) ? '1 : PIN_W'($urandom);
      wdata = (MOD_W+1)'($urandom);
      shadow[int'(waddr)] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (shadow[k]) begin
      raddr = PIN_W'(k);
      exp_d = shadow[k];
      @(negedge clk);
      checks++;
      if (rdata !== exp_d) begin
        failures++;
        $display("FAIL addr %0d: got %h exp %h", k, rdata, exp_d);
      end
    end
    // read-during-write at one address
    @(negedge clk); we = 1; waddr = PIN_W'(5); wdata = 'h15; raddr = PIN_W'(5);
    @(negedge clk); wdata = 'h2A;
    @(negedge clk); we = 0;
    checks++;
    if (rdata !== 'h15) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk);
    checks++;
    if (rdata !== 'h2A) begin failures++; $display("FAIL read after write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
