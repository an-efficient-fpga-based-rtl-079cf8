// ehw_soc -- static part of the complete evolvable-hardware system.
//
// Evolution runs entirely in hardware: the compact-GA core (cga_core)
// samples two 1024-gene chromosomes from its probabilistic vector, the two
// individuals are deployed, the testing module (testing_module, K = 2
// individuals with the 8-bit data path) scores them on the test set, and
// the core moves the vector toward the winner. The only outside help is the
// deployment of each new pair of chromosomes, done in the real system by
// software on an embedded processor through the configuration port.
//
// Ports:
//  * Host register bus (`bus_*`): single-cycle word writes, reads return
//    `bus_rdata` one clock after `bus_re`. Addresses and fields are those
//    of ehw_pkg (REG_*). Read-back registers (chromosome, PV, results) need
//    two clocks after their index register is written before they are read.
//  * Deployment port (`cfg_*`): writes the 32 LUT bits of one cell of
//    individual A (`cfg_we[0]`) or B (`cfg_we[1]`). It stands where the
//    internal configuration access port and the bitstream builder of the
//    FPGA system connect; those are not part of this RTL.
//  * `irq_wrec` is high while the core waits for deployment and
//    `irq_fit` while fresh fitness values can be read; both are also in
//    REG_STATUS.
//
// The register map, the reset values of the settings (update step 1/64,
// margin 3%, all 256 tests, fixed seeds) and the two status lines are this
// design's choices; the division into core, testing module, individuals and
// host-driven deployment follows the system description.
module ehw_soc
  import ehw_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // host register bus
  input  logic [7:0]   bus_addr,
  input  logic         bus_we,
  input  logic         bus_re,
  input  logic [31:0]  bus_wdata,
  output logic [31:0]  bus_rdata,
  // deployment (configuration) port of the individuals
  input  logic [1:0]   cfg_we,
  input  logic [4:0]   cfg_cell,
  input  logic [31:0]  cfg_data,
  // status lines
  output logic         irq_wrec,
  output logic         irq_fit
);

  localparam int unsigned K = 2;   // binary tournament: two individuals

  // ---------------------------------------------------------- registers
  logic            r_elit, r_mut;
  logic [15:0]     r_step, r_margin, r_mutprob;
  logic [8:0]      r_ntests;
  logic [31:0]     r_seed [4];
  logic            r_chsel;
  logic [4:0]      r_chidx;
  logic [9:0]      r_pvidx;
  logic [7:0]      r_testidx, r_residx;
  logic            c_start, c_deployed, c_reseed, tm_we;

  // core <-> testing module
  logic            fev_start, fev_busy, fev_done;
  logic [FIT_W-1:0] fitness [K];
  logic [31:0]     host_chrom;
  logic [PV_W-1:0] host_pv;
  logic [K*(DATA_W+1)-1:0] res_rdata;
  cga_phase_e      phase;
  logic            fit_ready, winner_b;
  logic [31:0]     gen_count, mut_count, clamp_count;

  always_ff @(posedge clk) begin
    if (rst) begin
      r_elit    <= 1'b0;
      r_mut     <= 1'b0;
      r_step    <= 16'h0400;      // 1/64 = 1.56 %
      r_margin  <= 16'h07AE;      // 3 %
      r_mutprob <= 16'h0000;
      r_ntests  <= 9'd256;
      r_seed[0] <= 32'h1D87_2B41;
      r_seed[1] <= 32'h93C4_6E15;
      r_seed[2] <= 32'h5A3F_C902;
      r_seed[3] <= 32'hE61B_0477;
      r_chsel   <= 1'b0;
      r_chidx   <= '0;
      r_pvidx   <= '0;
      r_testidx <= '0;
      r_residx  <= '0;
    end else if (bus_we) begin
      unique case (bus_addr)
        REG_CONFIG:    {r_mut, r_elit} <= bus_wdata[1:0];
        REG_STEP:      r_step    <= bus_wdata[15:0];
        REG_MARGIN:    r_margin  <= bus_wdata[15:0];
        REG_MUTPROB:   r_mutprob <= bus_wdata[15:0];
        REG_NTESTS:    r_ntests  <= bus_wdata[8:0];
        REG_SEED0:     r_seed[0] <= bus_wdata;
        REG_SEED1:     r_seed[1] <= bus_wdata;
        REG_SEED2:     r_seed[2] <= bus_wdata;
        REG_SEED3:     r_seed[3] <= bus_wdata;
        REG_CHROM_IDX: {r_chsel, r_chidx} <= bus_wdata[5:0];
        REG_PV_IDX:    r_pvidx   <= bus_wdata[9:0];
        REG_TEST_IDX:  r_testidx <= bus_wdata[7:0];
        REG_RES_IDX:   r_residx  <= bus_wdata[7:0];
        default: ;
      endcase
    end
  end

  assign c_start    = bus_we && bus_addr == REG_CTRL && bus_wdata[0];
  assign c_deployed = bus_we && bus_addr == REG_CTRL && bus_wdata[1];
  assign c_reseed   = bus_we && bus_addr == REG_CTRL && bus_wdata[2];
  assign tm_we      = bus_we && bus_addr == REG_TEST_DAT;

  always_ff @(posedge clk) begin
    if (rst) bus_rdata <= '0;
    else if (bus_re) begin
      unique case (bus_addr)
        REG_CONFIG:    bus_rdata <= {30'd0, r_mut, r_elit};
        REG_STATUS:    bus_rdata <= {24'd0, winner_b, fit_ready, fev_busy, 1'b0, phase};
        REG_STEP:      bus_rdata <= {16'd0, r_step};
        REG_MARGIN:    bus_rdata <= {16'd0, r_margin};
        REG_MUTPROB:   bus_rdata <= {16'd0, r_mutprob};
        REG_NTESTS:    bus_rdata <= {23'd0, r_ntests};
        REG_GENCOUNT:  bus_rdata <= gen_count;
        REG_SEED0:     bus_rdata <= r_seed[0];
        REG_SEED1:     bus_rdata <= r_seed[1];
        REG_SEED2:     bus_rdata <= r_seed[2];
        REG_SEED3:     bus_rdata <= r_seed[3];
        REG_FIT_A:     bus_rdata <= {16'd0, fitness[0]};
        REG_FIT_B:     bus_rdata <= {16'd0, fitness[1]};
        REG_DBG_MUT:   bus_rdata <= mut_count;
        REG_DBG_CLAMP: bus_rdata <= clamp_count;
        REG_CHROM_DAT: bus_rdata <= host_chrom;
        REG_PV_DAT:    bus_rdata <= {16'd0, host_pv};
        REG_RES_DAT:   bus_rdata <= 32'(res_rdata);
        default:       bus_rdata <= '0;
      endcase
    end
  end

  assign irq_wrec = (phase == PH_WREC);
  assign irq_fit  = fit_ready;

  // ------------------------------------------------------ the two parts
  cga_core u_core (
    .clk(clk), .rst(rst),
    .cmd_start(c_start), .cmd_deployed(c_deployed), .cmd_reseed(c_reseed),
    .elitism_en(r_elit), .mut_en(r_mut), .mut_prob(r_mutprob),
    .step(r_step), .margin(r_margin), .seed(r_seed),
    .fev_start(fev_start), .fev_done(fev_done),
    .fit_a(fitness[0]), .fit_b(fitness[1]),
    .chrom_sel(r_chsel), .chrom_idx(r_chidx), .host_chrom(host_chrom),
    .pv_idx(r_pvidx), .host_pv(host_pv),
    .phase(phase), .fitness_ready(fit_ready), .winner_b(winner_b),
    .gen_count(gen_count), .mut_count(mut_count), .clamp_count(clamp_count));

  testing_module #(.K(K)) u_test (
    .clk(clk), .rst(rst),
    .start(fev_start), .num_tests(r_ntests),
    .busy(fev_busy), .done(fev_done), .fitness(fitness),
    .tm_we(tm_we), .tm_addr(r_testidx), .tm_wdata(test_vec_t'(bus_wdata[23:0])),
    .res_addr(r_residx), .res_rdata(res_rdata),
    .cfg_we(cfg_we), .cfg_cell(cfg_cell), .cfg_data(cfg_data));

endmodule
