// tb_ehw_soc -- end-to-end test of the complete evolvable-hardware system.
//
// The testbench plays the embedded software: it loads a 4-input parity
// test set (16 triplets, only output bit 0 relevant), starts the core and
// then, generation after generation, waits for the deployment stall, reads
// both chromosomes over the register bus, deploys them through the
// configuration port (where the bitstream path would write the LUTs),
// reports the deployment, waits for the fitness values and reads them.
// Every generation it checks, against reference models of its own: both
// fitness values (individual model + don't-care compare), a sample of the
// per-test result record, every one of the 1024 probabilistic-vector
// elements (update rule applied to the previous vector), the generation
// counter, and, while elitism is on, that the winner's chromosome is kept.
// The settings are switched along the run so that every mechanism occurs:
// elitism, additional mutation, the margin stopping an update, an RNG
// reseed, winners on both sides, and a restart issued while the vector is
// being updated; each is counted and a mechanism that
// never occurred counts as a failure. All parameters are at their defaults.
module tb_ehw_soc;
  import ehw_pkg::*;
  import ehw_ref_pkg::*;
  localparam int NGEN = 24;
  logic        clk = 1'b0, rst;
  logic [7:0]  bus_addr;
  logic        bus_we, bus_re;
  logic [31:0] bus_wdata, bus_rdata;
  logic [1:0]  cfg_we;
  logic [4:0]  cfg_cell;
  logic [31:0] cfg_data;
  logic        irq_wrec, irq_fit;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_gen = 0, n_elite = 0, n_mut = 0, n_clamp = 0, n_reseed = 0, n_win_a = 0, n_win_b = 0, n_restart = 0;

  ehw_soc dut (.clk, .rst, .bus_addr, .bus_we, .bus_re, .bus_wdata, .bus_rdata,
               .cfg_we, .cfg_cell, .cfg_data, .irq_wrec, .irq_fit);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1; @(negedge clk);
    bus_we = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    bus_addr = a; bus_re = 1; @(negedge clk);
    bus_re = 0; d = bus_rdata;
  endtask

  // indexed read-back: index write, one idle clock, data read
  task automatic rd_idx(input logic [7:0] ia, input logic [31:0] idx,
                        input logic [7:0] da, output logic [31:0] d);
    wr(ia, idx); @(negedge clk); rd(da, d);
  endtask

  initial begin
    test_vec_t   tv [16];
    logic [31:0] ch [2][32], prev_ch [2][32];
    logic [15:0] pv [1024], prev_pv [1024];
    logic [31:0] d, step, margin;
    logic        prev_wb, elit;
    int          ef [2], gf [2], hi, lo;

    rst = 1; bus_addr = 0; bus_we = 0; bus_re = 0; bus_wdata = 0;
    cfg_we = 0; cfg_cell = 0; cfg_data = 0;
    repeat (3) @(negedge clk); rst = 0;

    // task definition: 4-input parity, output bit 0, other bits don't care
    for (int t = 0; t < 16; t++) begin
      tv[t].i = 8'(t);
      tv[t].o = {7'd0, ^t[3:0]};
      tv[t].d = 8'hFE;
      wr(REG_TEST_IDX, t);
      wr(REG_TEST_DAT, 32'(tv[t]));
    end
    wr(REG_NTESTS, 16);
    rd(REG_STEP, step);   check(int'(step), 16'h0400, "default step");
    rd(REG_MARGIN, margin); check(int'(margin), 16'h07AE, "default margin");
    wr(REG_CTRL, 32'h1);                       // start: seed RNGs, PV = 0.5
    prev_wb = 0; elit = 0;

    for (int g = 0; g < NGEN; g++) begin
      // 1. wait for the deployment stall and read both chromosomes
      while (!irq_wrec) @(negedge clk);
      for (int k = 0; k < 2; k++)
        for (int c = 0; c < 32; c++) begin
          rd_idx(REG_CHROM_IDX, {26'd0, 1'(k), 5'(c)}, REG_CHROM_DAT, d);
          ch[k][c] = d;
        end
      for (int i = 0; i < 1024; i++) begin
        rd_idx(REG_PV_IDX, i, REG_PV_DAT, d);
        pv[i] = d[15:0];
      end
      rd(REG_GENCOUNT, d); check(int'(d), g, "generation counter");
      if (g == 0) begin
        for (int i = 0; i < 1024; i++) check(int'(pv[i]), 16'h8000, "initial PV");
      end else begin
        rd(REG_MARGIN, margin);
        hi = 16'hFFFF - int'(margin[15:0]); lo = int'(margin[15:0]);
        for (int i = 0; i < 1024; i++) begin
          logic w, l;
          int   e;
          w = prev_ch[prev_wb][i/32][i%32];
          l = prev_ch[!prev_wb][i/32][i%32];
          e = prev_pv[i];
          if (w && !l && prev_pv[i] < hi) e = (prev_pv[i] + step > hi) ? hi : prev_pv[i] + step;
          if (!w && l && prev_pv[i] > lo) e = (prev_pv[i] < lo + step) ? lo : prev_pv[i] - step;
          check(int'(pv[i]), e, $sformatf("gen %0d PV[%0d]", g, i));
        end
        if (elit) begin
          check(int'(ch[prev_wb] == prev_ch[prev_wb]), 1, "elitism keeps the winner");
          n_elite++;
        end
      end
      // settings for this generation (they act on the next sampling / update)
      elit = (g >= 6 && g < 10);
      wr(REG_CONFIG, {30'd0, (g >= 12 && g < 16), elit});
      wr(REG_MUTPROB, 32'h4000);
      step = (g >= 16) ? 32'h3000 : 32'h0400;
      wr(REG_STEP, step);
      if (g == 18) begin wr(REG_CTRL, 32'h4); n_reseed++; end   // new RNG seeds
      // 2. deploy: stand-in for building and sending the partial bitstreams
      repeat ($urandom_range(0, 40)) @(negedge clk);
      for (int k = 0; k < 2; k++)
        for (int c = 0; c < 32; c++) begin
          cfg_we = 2'(1 << k); cfg_cell = 5'(c); cfg_data = ch[k][c];
          @(negedge clk);
        end
      cfg_we = 0;
      wr(REG_CTRL, 32'h2);                     // deployment done
      // 3. wait for the fitness values and check them
      while (!irq_fit) @(negedge clk);
      rd(REG_FIT_A, d); gf[0] = int'(d);
      rd(REG_FIT_B, d); gf[1] = int'(d);
      for (int k = 0; k < 2; k++) begin
        ef[k] = 0;
        for (int t = 0; t < 16; t++)
          ef[k] += int'(vec_pass(ind_eval(ch[k], tv[t].i), tv[t].o, tv[t].d));
        check(gf[k], ef[k], $sformatf("gen %0d fitness %s", g, k ? "B" : "A"));
      end
      rd(REG_STATUS, d);
      check(int'(d[7]), int'(ef[1] > ef[0]), "winner flag");
      prev_wb = d[7];
      if (prev_wb) n_win_b++; else n_win_a++;
      // wait until the update has finished before reading the result record
      while (!irq_wrec) @(negedge clk);
      for (int t = 0; t < 16; t += 5) begin
        rd_idx(REG_RES_IDX, t, REG_RES_DAT, d);
        for (int k = 0; k < 2; k++) begin
          logic [7:0] o;
          o = ind_eval(ch[k], tv[t].i);
          check(int'(d[8*k +: 8]), int'(o), "result record output");
          check(int'(d[16+k]), int'(vec_pass(o, tv[t].o, tv[t].d)), "result record pass bit");
        end
      end
      prev_ch = ch; prev_pv = pv;
      n_gen++;
    end
    // restart in the middle of an update pass: the pass is aborted and the
    // vector starts again from 0.5
    wr(REG_CTRL, 32'h2);
    while (!irq_fit) @(negedge clk);
    rd(REG_DBG_MUT, d);   n_mut = int'(d);
    rd(REG_DBG_CLAMP, d); n_clamp = int'(d);
    repeat (20) @(negedge clk);
    rd(REG_STATUS, d); check(int'(d[3:0]), PH_UPD, "restart issued during the update");
    wr(REG_CTRL, 32'h1);
    n_restart++;
    while (!irq_wrec) @(negedge clk);
    rd(REG_GENCOUNT, d); check(int'(d), 0, "generation counter after restart");
    for (int i = 0; i < 1024; i++) begin
      rd_idx(REG_PV_IDX, i, REG_PV_DAT, d);
      check(int'(d[15:0]), 16'h8000, "PV after restart");
    end
    $display("generations %0d, elitism %0d, LUT mutations %0d, margin stops %0d, reseeds %0d, winners A %0d B %0d",
             n_gen, n_elite, n_mut, n_clamp, n_reseed, n_win_a, n_win_b);
    check(int'(n_elite > 0), 1, "elitism occurred");
    check(int'(n_mut > 0), 1, "additional mutation occurred");
    check(int'(n_clamp > 0), 1, "margin stop occurred");
    check(int'(n_reseed > 0), 1, "reseed occurred");
    check(int'(n_win_a > 0 && n_win_b > 0), 1, "both winners occurred");
    check(int'(n_restart > 0), 1, "restart during update occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
