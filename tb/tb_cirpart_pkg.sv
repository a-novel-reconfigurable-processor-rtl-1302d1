// tb_cirpart_pkg: checks the shared package: the 3-bit start and
// completion codes of the controller's state diagram, the control-register
// addresses and default GA parameters, the xorshift step against the
// reference model, and the range scaling floor(r * n / 65536) (always
// below n, covering 0..n-1 for small n).
module tb_cirpart_pkg;
  import cirpart_pkg::*;
  import tb_cirpart_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned s;
    int seen;
    check(START_GA == 3'b000 && START_INIT == 3'b001 && START_EVAL == 3'b010 &&
          START_SEL == 3'b011 && START_MAT == 3'b100, "start codes");
    check(DONE_READY == 3'b000 && INIT_COMP == 3'b001 && EVAL_COMP == 3'b010 &&
          SEL_COMP == 3'b011 && MAT_COMP == 3'b100 && GA_COMP == 3'b101, "completion codes");
    check(DEF_NUM_CHROM == 20 && DEF_NUM_GEN == 20, "default population and generations");
    check(DEF_XOVER_THR == 16'(int'(0.99 * 65536.0)) &&
          DEF_MUT_THR == 16'(int'(0.01 * 65536.0)), "default rates");
    check(REG_NUM_MODULES == 0 && REG_SEED_HI == 8, "register map ends");
    s = 32'h1;
    for (int i = 0; i < 200; i++) begin
      check(xorshift32(s) == ref_xorshift(s), $sformatf("xorshift step %0d", i));
      s = ref_xorshift(s);
    end
    for (int n = 1; n <= 9; n++) begin
      seen = 0;
      for (int r = 0; r < 65536; r += 97) begin
        int v;
        v = int'(scale_rand(16'(r), 16'(n)));
        if (v >= n) check(0, $sformatf("scale_rand(%0d,%0d)=%0d", r, n, v));
        if (v != int'(ref_scale(r, n))) check(0, "scale_rand against reference");
        seen |= 1 << v;
      end
      check(seen == (1 << n) - 1, $sformatf("scale_rand covers 0..%0d", n - 1));
    end
    check(scale_rand(16'hFFFF, 16'd128) == 127 && scale_rand(16'h0, 16'd128) == 0,
          "scale_rand ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
