// cirpart_pkg: types and constants shared by the CIRPART genetic-algorithm
// circuit partitioner.
//
// The 3-bit start and completion codes are the encodings printed with the
// central controller's state diagram: the controller issues a start code to
// a module and receives the matching completion code back. The control
// register map, the register bundle and the random-number helpers are this
// design's own choices; the reset values of the registers are the default
// GA parameters (population 20, 20 generations, crossover rate 0.99,
// mutation rate 0.01).
package cirpart_pkg;

  // Start signals issued by the central controller (state-diagram inputs).
  typedef enum logic [2:0] {
    START_GA   = 3'b000,
    START_INIT = 3'b001,
    START_EVAL = 3'b010,
    START_SEL  = 3'b011,
    START_MAT  = 3'b100
  } start_code_e;

  // Completion signals (state-diagram outputs).
  typedef enum logic [2:0] {
    DONE_READY = 3'b000,
    INIT_COMP  = 3'b001,
    EVAL_COMP  = 3'b010,
    SEL_COMP   = 3'b011,
    MAT_COMP   = 3'b100,
    GA_COMP    = 3'b101
  } done_code_e;

  // Controller states. S1..S5 are the five states of the diagram; S1 is
  // split into waiting (IDLE) and taking in the netlist (LOAD), and the
  // final output phase that follows the last S3 is OUT.
  typedef enum logic [2:0] {
    ST_S1_IDLE = 3'd0,
    ST_S1_LOAD = 3'd1,
    ST_S2_INIT = 3'd2,
    ST_S3_EVAL = 3'd3,
    ST_S4_SEL  = 3'd4,
    ST_S5_MAT  = 3'd5,
    ST_OUT     = 3'd6
  } cpm_state_e;

  // Which module owns the shared memory ports.
  typedef enum logic [1:0] {
    OWN_CPM = 2'd0,
    OWN_FEM = 2'd1,
    OWN_PSM = 2'd2,
    OWN_GOM = 2'd3
  } bus_owner_e;

  localparam int REG_W  = 16;  // control register and CPU data width
  localparam int COST_W = 16;  // fitness (total cost) width

  // Control register addresses on the CPU interface.
  typedef enum logic [3:0] {
    REG_NUM_MODULES = 4'd0,
    REG_NUM_PINS    = 4'd1,
    REG_NUM_CHROM   = 4'd2,
    REG_NUM_PARTS   = 4'd3,
    REG_NUM_GEN     = 4'd4,
    REG_XOVER_THR   = 4'd5,
    REG_MUT_THR     = 4'd6,
    REG_SEED_LO     = 4'd7,
    REG_SEED_HI     = 4'd8
  } reg_addr_e;

  typedef struct packed {
    logic [REG_W-1:0] num_modules;  // modules in the netlist (genes per chromosome)
    logic [REG_W-1:0] num_pins;     // words of the pin list in the input memory
    logic [REG_W-1:0] num_chrom;    // population size
    logic [REG_W-1:0] num_parts;    // k, number of partitions
    logic [REG_W-1:0] num_gen;      // generation count
    logic [REG_W-1:0] xover_thr;    // crossover when rand16 <  xover_thr
    logic [REG_W-1:0] mut_thr;      // gene mutates when rand16 < mut_thr
    logic [31:0]      seed;         // random seed (nonzero)
  } ctrl_t;

  // Table 2 defaults: rate r is stored as round(r * 65536).
  localparam logic [REG_W-1:0] DEF_NUM_CHROM = 16'd20;
  localparam logic [REG_W-1:0] DEF_NUM_GEN   = 16'd20;
  localparam logic [REG_W-1:0] DEF_XOVER_THR = 16'd64881;  // 0.99
  localparam logic [REG_W-1:0] DEF_MUT_THR   = 16'd655;    // 0.01

  // One step of a 32-bit xorshift generator (shifts 13, 17, 5).
  function automatic logic [31:0] xorshift32(input logic [31:0] s);
    logic [31:0] x;
    x = s;
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  // Map a 16-bit random number onto [0, n): floor(r * n / 65536).
  function automatic logic [REG_W-1:0] scale_rand(input logic [15:0] r,
                                                  input logic [REG_W-1:0] n);
    logic [31:0] p;
    p = 32'(r) * 32'(n);
    return p[31:16];
  endfunction

endpackage
