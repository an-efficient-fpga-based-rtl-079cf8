// cga_core -- hardware compact genetic algorithm (the evolutionary core).
//
// The population is not stored as individuals but as a probabilistic
// vector (PV): one 16-bit probability per gene, 1024 genes for the 32-cell
// individual, kept in a block RAM. Each generation the core
//   GEN  - samples two chromosomes from the PV, one cell (32 genes) at a
//          time, with the LUTFG generator; a memory pointer selects the
//          cell's slice of the PV and the chromosome word to write;
//   WREC - stalls with both chromosome memories connected to the host port,
//          so the host can read them, build the partial bitstreams and
//          deploy the two individuals; the host then sets `cmd_deployed`;
//   FEV  - starts the testing module and waits for the two fitness values;
//   CMP  - picks the winner (the higher fitness; A on a tie);
//   UPD  - moves the PV toward the winner with the update automaton,
//          then counts the generation and starts the next GEN.
// INIT, entered on `cmd_start` from any phase (an update pass still running
// is aborted), reloads the seeds of the random number generators and writes
// 0.5 (16'h8000) into every PV element.
//
// Options: with `elitism_en` the generation phase does not overwrite the
// memory that holds the last winner (switching the flag at run time gives
// persistent or non-persistent elitism); with `mut_en` the LUTFG generator
// applies the LUT-wide additional mutation with probability `mut_prob`.
// In WREC the host may also read the PV (`pv_idx` -> `host_pv`) and pulse
// `cmd_reseed` to restart the RNGs from new seeds. Host reads return data
// one clock after the index is presented; they are meaningful in WREC and
// IDLE, when no phase uses the memories.
//
// The phases, memory sizes, PV precision and the options follow the
// description of the hardware CGA; the tie rule, the phase encoding and the
// debug counters (`mut_count`, `clamp_count`) are this design's choices.
// Timing per generation: GEN 32 * 611 clocks, UPD 2048 + 4 * (differing
// genes) clocks, FEV as taken by the testing module, WREC as long as the
// host needs.
module cga_core
  import ehw_pkg::*;
#(
  parameter int unsigned NCELLS = NUM_CELLS
) (
  input  logic                        clk,
  input  logic                        rst,
  // commands and settings from the host
  input  logic                        cmd_start,
  input  logic                        cmd_deployed,
  input  logic                        cmd_reseed,
  input  logic                        elitism_en,
  input  logic                        mut_en,
  input  logic [15:0]                 mut_prob,
  input  logic [PV_W-1:0]             step,
  input  logic [PV_W-1:0]             margin,
  input  logic [31:0]                 seed [4],
  // testing module
  output logic                        fev_start,
  input  logic                        fev_done,
  input  logic [FIT_W-1:0]            fit_a,
  input  logic [FIT_W-1:0]            fit_b,
  // host read-back
  input  logic                        chrom_sel,   // 0 = A, 1 = B
  input  logic [$clog2(NCELLS)-1:0]   chrom_idx,
  output logic [31:0]                 host_chrom,
  input  logic [$clog2(NCELLS)+4:0]   pv_idx,
  output logic [PV_W-1:0]             host_pv,
  // status
  output cga_phase_e                  phase,
  output logic                        fitness_ready,
  output logic                        winner_b,
  output logic [31:0]                 gen_count,
  output logic [31:0]                 mut_count,
  output logic [31:0]                 clamp_count
);

  localparam int unsigned NG  = NCELLS * CELL_GENES;
  localparam int unsigned PAW = $clog2(NG);
  localparam int unsigned CAW = $clog2(NCELLS);

  typedef enum logic [1:0] {S_A, S_B, S_C} sub_e;   // sub-steps of a phase

  sub_e            sub;
  logic [PAW-1:0]  init_addr;
  logic [CAW-1:0]  memptr;
  logic            has_winner;

  // PV memory port
  logic [PAW-1:0]  pv_addr;
  logic            pv_we;
  logic [PV_W-1:0] pv_wdata, pv_rdata;
  // chromosome memory ports
  logic [CAW-1:0]  ch_addr;
  logic            ch_we_a, ch_we_b;
  logic [31:0]     ch_rd_a, ch_rd_b;
  logic            host_sel_q;

  // LUTFG generator
  logic            g_en, g_ready, g_rng_avail, g_hit_a, g_hit_b;
  logic [4:0]      g_addr;
  logic [31:0]     g_genes_a, g_genes_b;
  logic            rng_reinit;

  // update automaton
  logic            u_start, u_busy, u_done, u_clamp;
  logic [PAW-1:0]  u_pv_addr;
  logic            u_pv_we;
  logic [PV_W-1:0] u_pv_wdata;
  logic [CAW-1:0]  u_ch_addr;

  bram_sp #(.DEPTH(NG), .WIDTH(PV_W)) u_pv (
    .clk(clk), .we(pv_we), .addr(pv_addr), .wdata(pv_wdata), .rdata(pv_rdata));

  bram_sp #(.DEPTH(NCELLS), .WIDTH(32)) u_chrom_a (
    .clk(clk), .we(ch_we_a), .addr(ch_addr), .wdata(g_genes_a), .rdata(ch_rd_a));

  bram_sp #(.DEPTH(NCELLS), .WIDTH(32)) u_chrom_b (
    .clk(clk), .we(ch_we_b), .addr(ch_addr), .wdata(g_genes_b), .rdata(ch_rd_b));

  lutfg_generator u_gen (
    .clk(clk), .rst(rst), .en(g_en),
    .pv_addr(g_addr), .pv_rdata(pv_rdata),
    .rng_reinit(rng_reinit), .seed(seed), .rng_available(g_rng_avail),
    .mut_en(mut_en), .mut_prob(mut_prob),
    .mut_hit_a(g_hit_a), .mut_hit_b(g_hit_b),
    .genes_a(g_genes_a), .genes_b(g_genes_b), .ready(g_ready));

  // a restart also aborts an update pass that is still running
  pv_update #(.NGENES(NG)) u_upd (
    .clk(clk), .rst(rst || cmd_start), .start(u_start), .winner_b(winner_b),
    .step(step), .margin(margin),
    .busy(u_busy), .done(u_done), .clamp_hit(u_clamp),
    .pv_addr(u_pv_addr), .pv_we(u_pv_we), .pv_wdata(u_pv_wdata), .pv_rdata(pv_rdata),
    .chrom_addr(u_ch_addr), .chrom_a(ch_rd_a), .chrom_b(ch_rd_b));

  // ------------------------------------------------ memory multiplexers
  always_comb begin
    pv_addr  = pv_idx[PAW-1:0];
    pv_we    = 1'b0;
    pv_wdata = u_pv_wdata;
    ch_addr  = chrom_idx;
    ch_we_a  = 1'b0;
    ch_we_b  = 1'b0;
    unique case (phase)
      PH_INIT: begin
        pv_addr  = init_addr;
        pv_we    = (sub == S_B);
        pv_wdata = 16'h8000;
      end
      PH_GEN: begin
        pv_addr = {memptr, g_addr};
        ch_addr = memptr;
        // elitism: the memory holding the last winner is not overwritten
        ch_we_a = (sub == S_B) && !(elitism_en && has_winner && !winner_b);
        ch_we_b = (sub == S_B) && !(elitism_en && has_winner &&  winner_b);
      end
      PH_UPD: begin
        pv_addr = u_pv_addr;
        pv_we   = u_pv_we;
        ch_addr = u_ch_addr;
      end
      default: ;
    endcase
  end

  assign host_chrom = host_sel_q ? ch_rd_b : ch_rd_a;
  assign host_pv    = pv_rdata;
  assign g_en       = (phase == PH_GEN) && (sub == S_A);
  assign rng_reinit = ((phase == PH_INIT) && (sub == S_A)) ||
                      ((phase == PH_WREC) && cmd_reseed);

  // ---------------------------------------------------- phase sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      phase         <= PH_IDLE;
      sub           <= S_A;
      init_addr     <= '0;
      memptr        <= '0;
      has_winner    <= 1'b0;
      winner_b      <= 1'b0;
      fitness_ready <= 1'b0;
      fev_start     <= 1'b0;
      u_start       <= 1'b0;
      gen_count     <= '0;
      mut_count     <= '0;
      clamp_count   <= '0;
      host_sel_q    <= 1'b0;
    end else begin
      fev_start  <= 1'b0;
      u_start    <= 1'b0;
      host_sel_q <= chrom_sel;
      mut_count  <= mut_count + 32'(g_hit_a) + 32'(g_hit_b);
      if (u_clamp) clamp_count <= clamp_count + 1'b1;

      if (cmd_start) begin
        phase         <= PH_INIT;
        sub           <= S_A;
        init_addr     <= '0;
        has_winner    <= 1'b0;
        winner_b      <= 1'b0;
        fitness_ready <= 1'b0;
        gen_count     <= '0;
        mut_count     <= '0;
        clamp_count   <= '0;
      end else begin
        unique case (phase)
          PH_IDLE: ;
          PH_INIT: begin
            unique case (sub)
              S_A: sub <= S_C;                      // RNG seeds loading
              S_C: if (g_rng_avail) sub <= S_B;     // wait for the RNGs
              S_B: begin                            // PV <= 0.5, one per clock
                init_addr <= init_addr + 1'b1;
                if (init_addr == PAW'(NG - 1)) begin
                  phase  <= PH_GEN;
                  sub    <= S_A;
                  memptr <= '0;
                end
              end
              default: sub <= S_A;
            endcase
          end
          PH_GEN: begin
            unique case (sub)
              S_A: if (g_ready) sub <= S_B;         // cell generated
              S_B: begin                            // chromosome words written
                sub <= S_A;
                memptr <= memptr + 1'b1;
                if (memptr == CAW'(NCELLS - 1)) phase <= PH_WREC;
              end
              default: sub <= S_A;
            endcase
          end
          PH_WREC: if (cmd_deployed) begin
            phase         <= PH_FEV;
            fitness_ready <= 1'b0;
            fev_start     <= 1'b1;
          end
          PH_FEV: if (fev_done) phase <= PH_CMP;
          PH_CMP: begin
            winner_b      <= (fit_b > fit_a);
            has_winner    <= 1'b1;
            fitness_ready <= 1'b1;
            u_start       <= 1'b1;
            phase         <= PH_UPD;
          end
          PH_UPD: if (u_done) begin
            gen_count <= gen_count + 1'b1;
            phase     <= PH_GEN;
            sub       <= S_A;
            memptr    <= '0;
          end
          default: phase <= PH_IDLE;
        endcase
      end
    end
  end

  // the update automaton only runs inside its phase
  a_upd_in_phase: assert property (@(posedge clk) disable iff (rst)
    u_busy |-> phase == PH_UPD);

endmodule
