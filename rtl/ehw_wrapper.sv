// ehw_wrapper -- interface automaton around one evolvable individual.
//
// The wrapper lets a controller run the individual on one input word at a
// time through four byte registers: INPUT and CONTROL (written by the
// controller), OUTPUT and STATE (read by it). CONTROL takes the commands
// EMPTY (0x00), START (0x01) and RESET (0x02); an EMPTY word must be written
// between two commands, and a command is taken only once after each EMPTY.
// STATE reads WAIT (0x02) while idle, RUNNING (0x00) while busy and
// COMPLETE (0x03) when a result is in OUTPUT.
//
// Automaton: WAIT_DATA -RESET-> RESET_FF -> WAIT_DATA (cell states and
// OUTPUT cleared); WAIT_DATA -START-> ASSERT_CE (INPUT latched) -> CLOCK_1
// .. CLOCK_4 (one enabled clock of the individual each) -> DEASSERT_ALL
// (OUTPUT captured, STATE = COMPLETE) -EMPTY-> WAIT_DATA. The state names
// and the four evaluation clocks follow the individual-interface
// description; the RUNNING code, the command re-arming rule and the
// one-cycle RESET_FF step are this design's choices.
//
// Timing: START seen in WAIT_DATA -> COMPLETE visible on `state_o` six
// cycles later (ASSERT_CE, CLOCK_1..4, DEASSERT_ALL, registered STATE).
module ehw_wrapper
  import ehw_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] input_i,    // INPUT register
  input  logic [7:0]        control_i,  // CONTROL register
  output logic [DATA_W-1:0] output_o,   // OUTPUT register
  output logic [7:0]        state_o,    // STATE register
  // configuration (deployment) port of the wrapped individual
  input  logic              cfg_we,
  input  logic [$clog2(NUM_CELLS)-1:0] cfg_cell,
  input  logic [31:0]       cfg_data
);

  typedef enum logic [2:0] {
    WAIT_DATA, RESET_FF, ASSERT_CE, CLOCK_1, CLOCK_2, CLOCK_3, CLOCK_4,
    DEASSERT_ALL
  } wstate_e;

  wstate_e           st;
  logic              armed;     // an EMPTY word has been seen since the last command
  logic [DATA_W-1:0] in_q;
  logic [DATA_W-1:0] ind_out;
  logic              ind_ce, ind_clr;

  assign ind_ce  = (st == CLOCK_1) || (st == CLOCK_2) ||
                   (st == CLOCK_3) || (st == CLOCK_4);
  assign ind_clr = (st == RESET_FF);

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= WAIT_DATA;
      armed    <= 1'b0;
      in_q     <= '0;
      output_o <= '0;
      state_o  <= STAT_WAIT;
    end else begin
      if (control_i == CTRL_EMPTY) armed <= 1'b1;
      unique case (st)
        WAIT_DATA: begin
          if (armed && control_i == CTRL_RESET) begin
            st    <= RESET_FF;
            armed <= 1'b0;
          end else if (armed && control_i == CTRL_START) begin
            st    <= ASSERT_CE;
            armed <= 1'b0;
          end
        end
        RESET_FF: begin
          output_o <= '0;
          st       <= WAIT_DATA;
        end
        ASSERT_CE: begin
          in_q <= input_i;
          st   <= CLOCK_1;
        end
        CLOCK_1: st <= CLOCK_2;
        CLOCK_2: st <= CLOCK_3;
        CLOCK_3: st <= CLOCK_4;
        CLOCK_4: st <= DEASSERT_ALL;
        DEASSERT_ALL: begin
          output_o <= ind_out;
          if (control_i == CTRL_EMPTY) st <= WAIT_DATA;
        end
        default: st <= WAIT_DATA;
      endcase
      // STATE register mirrors the automaton one cycle later
      unique case (st)
        WAIT_DATA:    state_o <= STAT_WAIT;
        DEASSERT_ALL: state_o <= STAT_COMPLETE;
        default:      state_o <= STAT_RUNNING;
      endcase
    end
  end

  ehw_individual u_ind (
    .clk      (clk),
    .rst      (rst),
    .clr      (ind_clr),
    .ce       (ind_ce),
    .din      (in_q),
    .dout     (ind_out),
    .cfg_we   (cfg_we),
    .cfg_cell (cfg_cell),
    .cfg_data (cfg_data)
  );

endmodule
