// cirpart_rng: pseudo-random number source of the CIRPART modules.
//
// A 32-bit xorshift generator (shifts 13, 17, 5). `seed_load` loads
// `seed ^ SALT` (a zero result is replaced by SALT so the state never
// sticks at zero); `advance` steps the state once per clock. `rnd` is the
// current state, valid in the same cycle. The document only says that the
// selection module contains a random number generator and that the initial
// population is random; the generator type and seeding are this design's.
module cirpart_rng #(
  parameter logic [31:0] SALT = 32'h9E37_79B9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_load,
  input  logic [31:0] seed,
  input  logic        advance,
  output logic [31:0] rnd
);
  import cirpart_pkg::*;

  logic [31:0] state;
  logic [31:0] seeded;

  assign seeded = ((seed ^ SALT) == 32'd0) ? SALT : (seed ^ SALT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= SALT;
    else if (seed_load) state <= seeded;
    else if (advance)   state <= xorshift32(state);
  end

  assign rnd = state;

  always_comb assert (state != 32'd0 || !rst_n) else $error("rng state is zero");

endmodule
