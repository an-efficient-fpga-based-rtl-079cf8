// lutfg_generator -- genes of one evolvable cell for two chromosomes.
//
// Generates the 32 genes (LUT-F and LUT-G contents) of one cell for both
// individuals of a generation at once. For gene k = 0..31 it reads the
// probabilistic-vector value P[k] of the current cell (the caller adds the
// cell base address), lets two random number generators draw one 16-bit
// number each, and sets gene k of chromosome A (B) to 1 when the number of
// RNG A (B) is smaller than P[k]. The results fill two 32-bit buffers.
//
// Additional mutation: when `mut_en` is set, two more generators decide,
// at the first gene of each 16-gene LUT, whether that whole LUT of
// chromosome A (B) is mutated (their number is below `mut_prob`); the genes
// of a mutated LUT are then taken from bit 0 of those generators' numbers
// instead of from the probabilistic vector. Drawing the mutation numbers in
// parallel with the population numbers keeps the feature free in time.
//
// Handshake: raise `en` to start; `ready` goes high when both 32-bit words
// are in `genes_a/genes_b` and stays high until `en` is dropped, which
// returns the generator to idle. `pv_addr` holds the gene index, and
// `pv_rdata` must carry P[pv_addr] one clock later (block-RAM latency).
//
// Timing: 19 clocks per gene (one to request, 16 for the RNGs, one to see
// `ready`, one to compare), 608 clocks per cell. The counter, the
// two-RNG comparison and the `en/ready` behaviour follow the generator
// description; how the LUT mutation draws its decision and its bits is this
// design's choice.
module lutfg_generator
  import ehw_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  output logic [4:0]        pv_addr,
  input  logic [PV_W-1:0]   pv_rdata,
  // random number generators
  input  logic              rng_reinit,
  input  logic [31:0]       seed [4],   // A, B, mutation A, mutation B
  output logic              rng_available,
  // additional mutation
  input  logic              mut_en,
  input  logic [15:0]       mut_prob,
  output logic              mut_hit_a,   // pulse: a LUT of A was mutated
  output logic              mut_hit_b,   // pulse: a LUT of B was mutated
  // result
  output logic [31:0]       genes_a,
  output logic [31:0]       genes_b,
  output logic              ready
);

  typedef enum logic [2:0] {G_IDLE, G_REQ, G_WAIT, G_CMP, G_DONE} gstate_e;

  gstate_e      st;
  logic [4:0]   count;
  logic [15:0]  rnd   [4];
  logic [3:0]   rdy, avl;
  logic         req;
  logic         mact_a, mact_b;        // current LUT of A / B is mutated
  logic         dec_a, dec_b;          // mutation decision at a LUT boundary
  logic         gene_a, gene_b;
  logic         lut_start;

  assign req           = (st == G_REQ);
  assign pv_addr       = count;
  assign rng_available = &avl;

  for (genvar g = 0; g < 4; g++) begin : g_rng
    rng #(.WIDTH(16)) u_rng (
      .clk(clk), .rst(rst), .request(req), .reinit(rng_reinit),
      .seed(seed[g]), .value(rnd[g]), .ready(rdy[g]), .available(avl[g]));
  end

  always_comb begin
    lut_start = (count[3:0] == 4'd0);
    dec_a  = mut_en && (rnd[2] < mut_prob);
    dec_b  = mut_en && (rnd[3] < mut_prob);
    gene_a = (rnd[0] < pv_rdata);
    gene_b = (rnd[1] < pv_rdata);
    if (lut_start ? dec_a : mact_a) gene_a = rnd[2][0];
    if (lut_start ? dec_b : mact_b) gene_b = rnd[3][0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= G_IDLE;
      count     <= '0;
      genes_a   <= '0;
      genes_b   <= '0;
      ready     <= 1'b0;
      mact_a    <= 1'b0;
      mact_b    <= 1'b0;
      mut_hit_a <= 1'b0;
      mut_hit_b <= 1'b0;
    end else begin
      mut_hit_a <= 1'b0;
      mut_hit_b <= 1'b0;
      unique case (st)
        G_IDLE: begin
          count <= '0;
          ready <= 1'b0;
          if (en) st <= G_REQ;
        end
        G_REQ:  st <= G_WAIT;
        G_WAIT: if (&rdy) st <= G_CMP;
        G_CMP: begin
          genes_a[count] <= gene_a;
          genes_b[count] <= gene_b;
          if (lut_start) begin
            mact_a    <= dec_a;
            mact_b    <= dec_b;
            mut_hit_a <= dec_a;
            mut_hit_b <= dec_b;
          end
          if (count == 5'd31) begin
            st    <= G_DONE;
            ready <= 1'b1;
          end else begin
            count <= count + 1'b1;
            st    <= G_REQ;
          end
        end
        G_DONE: if (!en) begin
          st    <= G_IDLE;
          ready <= 1'b0;
        end
        default: st <= G_IDLE;
      endcase
      if (!en && st != G_DONE) st <= G_IDLE;
    end
  end

endmodule
