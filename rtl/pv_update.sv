// pv_update -- update automaton of the probabilistic vector.
//
// After the two individuals have been compared, every element P[i] of the
// probabilistic vector is moved one step toward the winner: where the
// winner's gene is 1 and the loser's 0, P[i] is increased by `step`; where
// the winner's gene is 0 and the loser's 1, it is decreased; where both
// genes agree it is left alone. The margin d (`margin`) keeps P[i] inside
// [d, 65535 - d]: an update is carried out only if the current value is
// still inside the margin, and its result is limited to the margin, so the
// vector never converges to 0 or 1 and a minimum mutation probability is
// kept.
//
// The memories are single-ported, so one gene is processed at a time by a
// two-level automaton. READONE (two clocks) presents the address and
// latches P[i], gene i of chromosome A and gene i of chromosome B. If the
// genes differ, UPDATE follows with four one-clock micro phases: STA sets
// the add/subtract and enable controls of the add-subtract unit, RFA takes
// its result, WRT writes it to the PV memory and CMP waits for the write.
// These phases follow the update description; the exact margin rule is
// this design's reading of it.
//
// Interface: pulse `start` with `winner_b` (1 = chromosome B won) stable;
// `busy` is high until the pass ends and `done` pulses once. Chromosome
// gene i is bit i%32 of word i/32. `clamp_hit` pulses when the margin
// stopped an update.
//
// Timing: 2 clocks per gene where the genes agree, 6 where they differ:
// 2*NGENES + 4*(number of differing genes) clocks per pass.
module pv_update
  import ehw_pkg::*;
#(
  parameter int unsigned NGENES = GENOME_BITS
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic                      winner_b,
  input  logic [PV_W-1:0]           step,
  input  logic [PV_W-1:0]           margin,
  output logic                      busy,
  output logic                      done,
  output logic                      clamp_hit,
  // probabilistic-vector memory
  output logic [$clog2(NGENES)-1:0] pv_addr,
  output logic                      pv_we,
  output logic [PV_W-1:0]           pv_wdata,
  input  logic [PV_W-1:0]           pv_rdata,
  // chromosome memories (read only)
  output logic [$clog2(NGENES)-6:0] chrom_addr,
  input  logic [31:0]               chrom_a,
  input  logic [31:0]               chrom_b
);

  localparam int unsigned AW = $clog2(NGENES);

  typedef enum logic [2:0] {
    U_IDLE, U_READ, U_LATCH, U_STA, U_RFA, U_WRT, U_CMP
  } ustate_e;

  ustate_e          st;
  logic [AW-1:0]    idx;
  logic [PV_W-1:0]  pv_q, res_q;
  logic             ga_q, gb_q;       // latched genes of A and B
  logic             add_q, en_q;      // add-subtract unit controls
  logic             win_g, los_g;
  logic [PV_W-1:0]  hi, lo;
  logic [PV_W:0]    sum;
  logic [PV_W-1:0]  addsub;

  assign hi = {PV_W{1'b1}} - margin;
  assign lo = margin;

  // add-subtract unit with margin limiting
  always_comb begin
    if (add_q) begin
      sum    = {1'b0, pv_q} + {1'b0, step};
      addsub = (sum > {1'b0, hi}) ? hi : sum[PV_W-1:0];
    end else begin
      sum    = {1'b0, pv_q} - {1'b0, step};
      addsub = (sum[PV_W] || sum[PV_W-1:0] < lo) ? lo : sum[PV_W-1:0];
    end
  end

  assign win_g      = winner_b ? gb_q : ga_q;
  assign los_g      = winner_b ? ga_q : gb_q;
  assign pv_addr    = idx;
  assign chrom_addr = idx[AW-1:5];
  assign pv_we      = (st == U_WRT) && en_q;
  assign pv_wdata   = res_q;
  assign busy       = (st != U_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= U_IDLE;
      idx       <= '0;
      pv_q      <= '0;
      res_q     <= '0;
      ga_q      <= 1'b0;
      gb_q      <= 1'b0;
      add_q     <= 1'b0;
      en_q      <= 1'b0;
      done      <= 1'b0;
      clamp_hit <= 1'b0;
    end else begin
      done      <= 1'b0;
      clamp_hit <= 1'b0;
      unique case (st)
        U_IDLE: if (start) begin
          idx <= '0;
          st  <= U_READ;
        end
        U_READ:  st <= U_LATCH;                  // READONE: address presented
        U_LATCH: begin                           // READONE: values buffered
          pv_q <= pv_rdata;
          ga_q <= chrom_a[idx[4:0]];
          gb_q <= chrom_b[idx[4:0]];
          if (chrom_a[idx[4:0]] != chrom_b[idx[4:0]]) st <= U_STA;
          else if (idx == AW'(NGENES - 1)) begin
            st   <= U_IDLE;
            done <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
            st  <= U_READ;
          end
        end
        U_STA: begin                             // set add flag and enable
          add_q     <= win_g & ~los_g;
          en_q      <= (win_g & ~los_g) ? (pv_q < hi) : (pv_q > lo);
          clamp_hit <= (win_g & ~los_g) ? (pv_q >= hi) : (pv_q <= lo);
          st        <= U_RFA;
        end
        U_RFA: begin                             // read from adder
          res_q <= addsub;
          st    <= U_WRT;
        end
        U_WRT: st <= U_CMP;                      // write
        U_CMP: begin                             // write complete
          en_q <= 1'b0;
          if (idx == AW'(NGENES - 1)) begin
            st   <= U_IDLE;
            done <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
            st  <= U_READ;
          end
        end
        default: st <= U_IDLE;
      endcase
    end
  end

endmodule
