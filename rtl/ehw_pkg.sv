// ehw_pkg -- types and constants shared by the evolvable-hardware system.
//
// Holds the command and status codes of the individual interface (the
// byte-wide CONTROL and STATE registers of each evolvable individual), the
// test-vector triplet used by the testing module, the phase encoding of the
// compact-GA core and the word addresses of the host register map.
//
// The CONTROL codes (EMPTY 0x00, START 0x01, RESET 0x02) and the WAIT (0x02)
// and COMPLETE (0x03) status codes follow the individual-interface
// definition. The RUNNING code is this design's choice: 0x00, so that bit 0
// of STATE alone means "execution completed". The register map is this
// design's own; only the set of registers (control, update step, margin,
// seeds, fitness, chromosome / probabilistic-vector read-back, test memory,
// per-test results, debug) comes from the system description.
package ehw_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W      = 8;    // individual data path
  localparam int unsigned CELL_GENES  = 32;   // LUT-F (16) + LUT-G (16)
  localparam int unsigned NUM_CELLS   = 32;   // cells per individual
  localparam int unsigned GENOME_BITS = NUM_CELLS * CELL_GENES; // 1024
  localparam int unsigned PV_W        = 16;   // probabilistic-vector precision
  localparam int unsigned FIT_W       = 16;   // fitness accumulator width

  // ------------------------------------------- individual interface codes
  typedef enum logic [7:0] {
    CTRL_EMPTY = 8'h00,
    CTRL_START = 8'h01,
    CTRL_RESET = 8'h02
  } ehw_ctrl_e;

  typedef enum logic [7:0] {
    STAT_RUNNING  = 8'h00,
    STAT_WAIT     = 8'h02,
    STAT_COMPLETE = 8'h03
  } ehw_stat_e;

  // --------------------------------------------------------- test vectors
  // One entry of the test set: input word, expected output, don't-care mask.
  typedef struct packed {
    logic [DATA_W-1:0] d;   // 1 = output bit is irrelevant
    logic [DATA_W-1:0] o;   // expected output
    logic [DATA_W-1:0] i;   // input word
  } test_vec_t;

  // ------------------------------------------------------ CGA core phases
  typedef enum logic [3:0] {
    PH_IDLE  = 4'd0,   // waiting for the start command
    PH_INIT  = 4'd1,   // seeding RNGs, filling the PV with 0.5
    PH_GEN   = 4'd2,   // LUTFG generator producing the two chromosomes
    PH_WREC  = 4'd3,   // stalled: waiting for the individuals' deployment
    PH_FEV   = 4'd4,   // testing module evaluating both individuals
    PH_CMP   = 4'd5,   // comparing the two fitness values
    PH_UPD   = 4'd6    // moving the PV toward the winner
  } cga_phase_e;

  // ------------------------------------------------- host register map
  // Word addresses on the host bus.
  localparam logic [7:0] REG_CTRL      = 8'h00; // W: b0 start, b1 deployed, b2 reseed RNGs
  localparam logic [7:0] REG_CONFIG    = 8'h01; // RW: b0 elitism, b1 additional mutation
  localparam logic [7:0] REG_STATUS    = 8'h02; // R: phase, fitness-ready flag, winner
  localparam logic [7:0] REG_STEP      = 8'h03; // RW: update step (PV units)
  localparam logic [7:0] REG_MARGIN    = 8'h04; // RW: threshold d (PV units)
  localparam logic [7:0] REG_MUTPROB   = 8'h05; // RW: LUT-mutation probability (1/65536)
  localparam logic [7:0] REG_NTESTS    = 8'h06; // RW: number of test vectors
  localparam logic [7:0] REG_GENCOUNT  = 8'h07; // R: generations completed
  localparam logic [7:0] REG_SEED0     = 8'h08; // RW: seed of RNG 0 (chromosome A)
  localparam logic [7:0] REG_SEED1     = 8'h09; // RW: seed of RNG 1 (chromosome B)
  localparam logic [7:0] REG_SEED2     = 8'h0A; // RW: seed of RNG 2 (mutation of A)
  localparam logic [7:0] REG_SEED3     = 8'h0B; // RW: seed of RNG 3 (mutation of B)
  localparam logic [7:0] REG_FIT_A     = 8'h10; // R: fitness of individual A
  localparam logic [7:0] REG_FIT_B     = 8'h11; // R: fitness of individual B
  localparam logic [7:0] REG_DBG_MUT   = 8'h12; // R: LUT mutations applied so far
  localparam logic [7:0] REG_DBG_CLAMP = 8'h13; // R: PV updates stopped by the margin
  localparam logic [7:0] REG_CHROM_IDX = 8'h20; // W: {sel B, cell index} for read-back
  localparam logic [7:0] REG_CHROM_DAT = 8'h21; // R: chromosome word
  localparam logic [7:0] REG_PV_IDX    = 8'h22; // W: PV element index for read-back
  localparam logic [7:0] REG_PV_DAT    = 8'h23; // R: PV element
  localparam logic [7:0] REG_TEST_IDX  = 8'h24; // W: test-memory index
  localparam logic [7:0] REG_TEST_DAT  = 8'h25; // W: test vector {d,o,i}, writes memory
  localparam logic [7:0] REG_RES_IDX   = 8'h26; // W: per-test result index
  localparam logic [7:0] REG_RES_DAT   = 8'h27; // R: per-test pass bits, one per individual

endpackage
