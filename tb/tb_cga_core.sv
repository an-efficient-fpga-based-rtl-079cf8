// tb_cga_core -- self-checking test of the compact-GA core on OneMax.
//
// The core runs with two cells (64 genes) and the testbench plays the
// testing module and the host: in every WREC stall it reads both
// chromosomes and the whole probabilistic vector, scores the chromosomes
// with OneMax (number of ones), answers `fev_start` with those fitness
// values, and in the next stall checks every PV element against the
// update rule applied to the previous vector (winner = higher fitness,
// A on a tie). Also checked: the initial vector is all 0.5, a restart with
// the same seeds reproduces the first pair of chromosomes, elitism keeps
// the winner's chromosome, the additional mutation is counted, the GEN
// phase lasts 611 clocks per cell, and OneMax is solved.
module tb_cga_core;
  import ehw_pkg::*;
  localparam int NC = 2, NG = NC * 32;
  logic clk = 1'b0, rst;
  logic cmd_start, cmd_deployed, cmd_reseed, elitism_en, mut_en;
  logic [15:0] mut_prob, step, margin;
  logic [31:0] seed [4];
  logic fev_start, fev_done;
  logic [15:0] fit_a, fit_b;
  logic chrom_sel;
  logic [0:0] chrom_idx;
  logic [31:0] host_chrom;
  logic [5:0] pv_idx;
  logic [15:0] host_pv;
  cga_phase_e phase;
  logic fitness_ready, winner_b;
  logic [31:0] gen_count, mut_count, clamp_count;
  int checks = 0, failures = 0;

  cga_core #(.NCELLS(NC)) dut (.clk, .rst, .cmd_start, .cmd_deployed, .cmd_reseed,
    .elitism_en, .mut_en, .mut_prob, .step, .margin, .seed, .fev_start, .fev_done,
    .fit_a, .fit_b, .chrom_sel, .chrom_idx, .host_chrom, .pv_idx, .host_pv,
    .phase, .fitness_ready, .winner_b, .gen_count, .mut_count, .clamp_count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic read_state(output logic [31:0] a [NC], output logic [31:0] b [NC],
                            output logic [15:0] p [NG]);
    for (int c = 0; c < NC; c++) begin
      chrom_sel = 0; chrom_idx = 1'(c); @(negedge clk); a[c] = host_chrom;
      chrom_sel = 1; chrom_idx = 1'(c); @(negedge clk); b[c] = host_chrom;
    end
    for (int i = 0; i < NG; i++) begin pv_idx = 6'(i); @(negedge clk); p[i] = host_pv; end
  endtask

  function automatic int ones(input logic [31:0] x [NC]);
    int n = 0;
    for (int c = 0; c < NC; c++) n += $countones(x[c]);
    return n;
  endfunction

  task automatic wait_wrec(output int gen_clocks);
    gen_clocks = 0;
    while (phase != PH_WREC) begin
      @(negedge clk);
      if (phase == PH_GEN) gen_clocks++;
    end
  endtask

  // fitness source: answers fev_start a few clocks later
  logic [15:0] next_fa, next_fb;
  initial begin
    fev_done = 0; fit_a = 0; fit_b = 0;
    forever begin
      @(negedge clk);
      if (fev_start) begin
        repeat (5) @(negedge clk);
        fit_a = next_fa; fit_b = next_fb; fev_done = 1;
        @(negedge clk); fev_done = 0;
      end
    end
  end

  initial begin
    logic [31:0] a [NC], b [NC], a0 [NC], b0 [NC], pa [NC], pb [NC];
    logic [15:0] p [NG], prev [NG];
    logic        prev_wb;
    int          fa, fb, gclk, solved, elite_checks, hi, lo;
    rst = 1; cmd_start = 0; cmd_deployed = 0; cmd_reseed = 0; elitism_en = 0;
    mut_en = 0; mut_prob = 0; step = 16'h0400; margin = 16'h07AE;
    seed = '{32'h1234_5678, 32'h9ABC_DEF0, 32'h0F1E_2D3C, 32'h4B5A_6978};
    chrom_sel = 0; chrom_idx = 0; pv_idx = 0; next_fa = 0; next_fb = 0;
    repeat (2) @(negedge clk); rst = 0;
    hi = 16'hFFFF - 16'h07AE; lo = 16'h07AE;

    // ---- start, first generation, then restart with the same seeds
    cmd_start = 1; @(negedge clk); cmd_start = 0;
    wait_wrec(gclk);
    check(gclk, NC * 611, "GEN phase clocks");
    read_state(a0, b0, p);
    for (int i = 0; i < NG; i++) check(int'(p[i]), 16'h8000, "initial PV is 0.5");
    cmd_start = 1; @(negedge clk); cmd_start = 0;
    wait_wrec(gclk);
    read_state(a, b, p);
    check(int'(a[0] == a0[0] && a[1] == a0[1] && b[0] == b0[0] && b[1] == b0[1]), 1,
          "restart reproduces the chromosomes");

    // ---- evolution loop
    solved = 0; elite_checks = 0; prev_wb = 0;
    for (int g = 0; g < 3000 && !solved; g++) begin
      if (g == 0) begin
        // first stall already read
      end else begin
        prev = p;
        pa = a; pb = b;
        wait_wrec(gclk);
        read_state(a, b, p);
        // reference PV update from the previous generation
        for (int i = 0; i < NG; i++) begin
          logic w, l;
          int   e;
          w = prev_wb ? pb[i/32][i%32] : pa[i/32][i%32];
          l = prev_wb ? pa[i/32][i%32] : pb[i/32][i%32];
          e = prev[i];
          if (w && !l && prev[i] < hi) e = (prev[i] + step > hi) ? hi : prev[i] + step;
          if (!w && l && prev[i] > lo) e = (prev[i] < lo + step) ? lo : prev[i] - step;
          check(int'(p[i]), e, $sformatf("gen %0d PV[%0d]", g, i));
        end
        check(int'(gen_count), g + 0, "generation counter");
        if (elitism_en) begin
          elite_checks++;
          if (prev_wb) check(int'(b[0] == pb[0] && b[1] == pb[1]), 1, "elite B kept");
          else         check(int'(a[0] == pa[0] && a[1] == pa[1]), 1, "elite A kept");
        end
      end
      fa = ones(a); fb = ones(b);
      if (fa == NG || fb == NG) solved = g + 1;
      next_fa = 16'(fa); next_fb = 16'(fb);
      prev_wb = (fb > fa);
      // phase-dependent options
      elitism_en = (g >= 30 && g < 60);
      mut_en     = (g >= 60 && g < 70);
      mut_prob   = 16'h2000;
      if (g == 80) begin cmd_reseed = 1; @(negedge clk); cmd_reseed = 0; end
      cmd_deployed = 1; @(negedge clk); cmd_deployed = 0;
      while (!fitness_ready) @(negedge clk);
      check(int'(winner_b), int'(fb > fa), "winner");
    end
    $display("OneMax %0d genes solved in %0d generations, %0d LUT mutations, %0d margin stops",
             NG, solved, mut_count, clamp_count);
    check(int'(solved > 0), 1, "OneMax solved");
    check(int'(elite_checks > 0), 1, "elitism exercised");
    check(int'(mut_count > 0), 1, "additional mutation exercised");
    check(int'(clamp_count > 0), 1, "margin reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
