// testing_module -- parallel fitness evaluation of K individuals.
//
// The test set is held in a block RAM of triplets (I, O, D): input word,
// expected output and don't-care mask (a 1 in D makes that output bit
// irrelevant). For every test the same input word I is sent to all K
// individuals through their interface automata; after their four
// evaluation clocks each individual's output R passes when
// (R | D) == (O | D), and each pass adds one to that individual's fitness
// accumulator (all-or-nothing score per test). The outputs and pass bits
// of every test are also stored in a result memory that the host can read
// back. With an 8-bit data path there are at most 256 tests.
//
// The per-test command sequence on the individuals' CONTROL register is
// RESET, EMPTY, START (INPUT = I), EMPTY, then a wait for STATE = COMPLETE;
// the RESET of the next test is issued in the cycle COMPLETE is seen.
//
// Interface: the host writes the test memory (`tm_we/tm_addr/tm_wdata`)
// and reads the result memory (`res_addr` -> `res_rdata` one clock later)
// while the module is idle. Pulse `start` with `num_tests` (1..256) set;
// `busy` stays high and `done` pulses when `fitness` holds the new scores.
// The configuration ports of the K individuals are passed through.
//
// Timing: 10 clocks per test (3 of resetting, 3 of input/output handling,
// 4 of evaluation) plus 1 for the first RESET: `done` is high
// 10*num_tests + 1 clocks after the clock edge that samples `start`. The test-set layout, the don't-care compare and the
// accumulation follow the testing-module description; the result-memory
// layout and the command sequencing are this design's choices.
module testing_module
  import ehw_pkg::*;
#(
  parameter int unsigned K         = 2,
  parameter int unsigned MAX_TESTS = 1 << DATA_W
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic [$clog2(MAX_TESTS):0]  num_tests,
  output logic                        busy,
  output logic                        done,
  output logic [FIT_W-1:0]            fitness [K],
  // test-set memory, host side
  input  logic                        tm_we,
  input  logic [$clog2(MAX_TESTS)-1:0] tm_addr,
  input  test_vec_t                   tm_wdata,
  // per-test result memory, host side: {pass[K-1:0], out[K-1] .. out[0]}
  input  logic [$clog2(MAX_TESTS)-1:0] res_addr,
  output logic [K*(DATA_W+1)-1:0]     res_rdata,
  // deployment ports of the individuals
  input  logic [K-1:0]                cfg_we,
  input  logic [$clog2(NUM_CELLS)-1:0] cfg_cell,
  input  logic [31:0]                 cfg_data
);

  localparam int unsigned TAW = $clog2(MAX_TESTS);
  localparam int unsigned RW  = K * (DATA_W + 1);

  typedef enum logic [2:0] {T_IDLE, T_RST, T_E1, T_START, T_E2, T_WAIT} tstate_e;

  tstate_e           st;
  logic [TAW:0]      idx;
  logic [7:0]        ctrl_q;
  logic [DATA_W-1:0] in_q;
  test_vec_t         tv;          // memory output
  test_vec_t         tv_q;        // triplet of the test in flight
  logic [DATA_W-1:0] out_w   [K];
  logic [7:0]        state_w [K];
  logic [K-1:0]      pass;
  logic [RW-1:0]     res_word;
  logic              complete;

  // test-set memory: host writes while idle, the sequencer reads while busy
  bram_sp #(.DEPTH(MAX_TESTS), .WIDTH($bits(test_vec_t))) u_tests (
    .clk   (clk),
    .we    (tm_we && !busy),
    .addr  (busy ? idx[TAW-1:0] : tm_addr),
    .wdata (tm_wdata),
    .rdata (tv)
  );

  // result memory: written in the cycle a test completes
  bram_sp #(.DEPTH(MAX_TESTS), .WIDTH(RW)) u_results (
    .clk   (clk),
    .we    (st == T_WAIT && complete),
    .addr  (busy ? idx[TAW-1:0] : res_addr),
    .wdata (res_word),
    .rdata (res_rdata)
  );

  for (genvar k = 0; k < K; k++) begin : g_ind
    ehw_wrapper u_wrap (
      .clk       (clk),
      .rst       (rst),
      .input_i   (in_q),
      .control_i (ctrl_q),
      .output_o  (out_w[k]),
      .state_o   (state_w[k]),
      .cfg_we    (cfg_we[k]),
      .cfg_cell  (cfg_cell),
      .cfg_data  (cfg_data)
    );
    assign pass[k] = ((out_w[k] | tv_q.d) == (tv_q.o | tv_q.d));
    assign res_word[DATA_W*k +: DATA_W] = out_w[k];
  end
  assign res_word[RW-1 -: K] = pass;

  // the individuals run in lock step; the first one's STATE paces the sequence
  assign complete = (state_w[0] == STAT_COMPLETE);

  assign busy = (st != T_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= T_IDLE;
      idx    <= '0;
      ctrl_q <= CTRL_EMPTY;
      in_q   <= '0;
      tv_q   <= '0;
      done   <= 1'b0;
      for (int k = 0; k < K; k++) fitness[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        T_IDLE: if (start) begin
          idx    <= '0;
          for (int k = 0; k < K; k++) fitness[k] <= '0;
          st     <= T_RST;
        end
        T_RST: begin
          ctrl_q <= CTRL_RESET;
          st     <= T_E1;
        end
        T_E1: begin
          ctrl_q <= CTRL_EMPTY;
          st     <= T_START;
        end
        T_START: begin
          ctrl_q <= CTRL_START;
          in_q   <= tv.i;
          tv_q   <= tv;
          st     <= T_E2;
        end
        T_E2: begin
          ctrl_q <= CTRL_EMPTY;
          st     <= T_WAIT;
        end
        T_WAIT: if (complete) begin
          for (int k = 0; k < K; k++) fitness[k] <= fitness[k] + FIT_W'(pass[k]);
          if (idx + 1'b1 >= num_tests) begin
            st   <= T_IDLE;
            done <= 1'b1;
          end else begin
            idx    <= idx + 1'b1;
            ctrl_q <= CTRL_RESET;
            st     <= T_E1;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  // all individuals must step through the interface protocol together
  a_lockstep: assert property (@(posedge clk) disable iff (rst)
    state_w[0] == state_w[K-1]);

endmodule
