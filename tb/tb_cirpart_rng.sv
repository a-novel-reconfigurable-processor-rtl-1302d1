// tb_cirpart_rng: checks the xorshift generator against a reference model:
// seeding (including the zero-state guard), stepping only on `advance`,
// and a long run of values.
module tb_cirpart_rng;
  import tb_cirpart_ref_pkg::*;

  localparam logic [31:0] SALT = 32'h1234_5678;
  logic clk = 0, rst_n = 0, seed_load = 0, advance = 0;
  logic [31:0] seed = 0, rnd;
  int checks = 0, failures = 0;
  int unsigned model;

  cirpart_rng #(.SALT(SALT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: rnd=%h model=%h", what, rnd, model);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    model = SALT;
    check(rnd == model, "reset state");
    // seed equal to SALT would give zero: replaced by SALT
    seed = SALT; seed_load = 1;
    @(negedge clk); seed_load = 0;
    check(rnd == SALT, "zero guard");
    seed = 32'hCAFE_F00D; seed_load = 1;
    @(negedge clk); seed_load = 0;
    model = 32'hCAFE_F00D ^ SALT;
    check(rnd == model, "seed load");
    repeat (3) @(negedge clk);
    check(rnd == model, "hold without advance");
    for (int i = 0; i < 300; i++) begin
      advance = ($urandom_range(3) != 0);
      @(negedge clk);
      if (advance) model = ref_xorshift(model);
      check(rnd == model, "sequence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
