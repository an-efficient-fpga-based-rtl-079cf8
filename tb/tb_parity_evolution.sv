// tb_parity_evolution -- evolves parity generators on the complete system.
//
// The benchmark workload of the system: the parity (number of ones modulo 2)
// of the low NB input bits, the remaining input bits held at 0, output bit 0 the only
// relevant one (the other seven are don't care), all 2^NB input words as
// tests. The testbench is the host: it loads the test set, starts the core
// with its default settings (step 1/64, margin 3%, no elitism, no additional
// mutation) and deploys every new pair of chromosomes, until one individual
// passes every test or a generation limit is reached. The winning
// chromosome is then re-scored with the reference model and must pass all
// tests too. The number of generations each size needed is printed;
// reaching a perfect individual is counted as a check, a run that hits the
// limit as a failure. Larger sizes (5 to 8 inputs) differ only in SIZES and
// the test count; 4 inputs is the size whose run fits a few minutes of
// simulation (about 4 600 generations, roughly 110 million clocks).
module tb_parity_evolution;
  import ehw_pkg::*;
  import ehw_ref_pkg::*;
  localparam int MAX_GEN = 9000;
  localparam int SIZES [1] = '{4};
  logic        clk = 1'b0, rst;
  logic [7:0]  bus_addr;
  logic        bus_we, bus_re;
  logic [31:0] bus_wdata, bus_rdata;
  logic [1:0]  cfg_we;
  logic [4:0]  cfg_cell;
  logic [31:0] cfg_data;
  logic        irq_wrec, irq_fit;
  int checks = 0, failures = 0;

  ehw_soc dut (.clk, .rst, .bus_addr, .bus_we, .bus_re, .bus_wdata, .bus_rdata,
               .cfg_we, .cfg_cell, .cfg_data, .irq_wrec, .irq_fit);

  always #5 clk = ~clk;

  initial begin
    repeat (600000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1; @(negedge clk);
    bus_we = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    bus_addr = a; bus_re = 1; @(negedge clk);
    bus_re = 0; d = bus_rdata;
  endtask

  initial begin
    test_vec_t   tv [256];
    logic [31:0] ch [2][32];
    logic [31:0] d;
    int          nt, fa, fb, ref_fit, gens, best;
    logic        solved;

    rst = 1; bus_addr = 0; bus_we = 0; bus_re = 0; bus_wdata = 0;
    cfg_we = 0; cfg_cell = 0; cfg_data = 0;
    repeat (3) @(negedge clk); rst = 0;

    foreach (SIZES[s]) begin
      nt = 1 << SIZES[s];
      for (int t = 0; t < nt; t++) begin
        logic [7:0] in;
        in = 8'(t);
        tv[t].i = in;
        tv[t].o = {7'd0, ^in};          // number of ones modulo 2
        tv[t].d = 8'hFE;
        wr(REG_TEST_IDX, t);
        wr(REG_TEST_DAT, 32'(tv[t]));
      end
      wr(REG_NTESTS, nt);
      wr(REG_CTRL, 32'h1);
      solved = 0; gens = 0; best = 0;
      while (!solved && gens < MAX_GEN) begin
        while (!irq_wrec) @(negedge clk);
        for (int k = 0; k < 2; k++)
          for (int c = 0; c < 32; c++) begin
            wr(REG_CHROM_IDX, {26'd0, 1'(k), 5'(c)}); @(negedge clk);
            rd(REG_CHROM_DAT, d);
            ch[k][c] = d;
            cfg_we = 2'(1 << k); cfg_cell = 5'(c); cfg_data = d;
            @(negedge clk);
            cfg_we = 0;
          end
        wr(REG_CTRL, 32'h2);
        while (!irq_fit) @(negedge clk);
        rd(REG_FIT_A, d); fa = int'(d);
        rd(REG_FIT_B, d); fb = int'(d);
        gens++;
        if (fa > best) best = fa;
        if (fb > best) best = fb;
        if (gens % 1000 == 0) $display("parity %0d: generation %0d, best fitness %0d of %0d", SIZES[s], gens, best, nt);
        if (fa == nt || fb == nt) begin
          solved = 1;
          ref_fit = 0;
          for (int t = 0; t < nt; t++)
            ref_fit += int'(vec_pass(ind_eval(ch[fa == nt ? 0 : 1], tv[t].i), tv[t].o, tv[t].d));
          checks++;
          if (ref_fit != nt) begin
            failures++;
            $display("FAIL parity %0d: reference scores the solution %0d of %0d", SIZES[s], ref_fit, nt);
          end
        end
      end
      checks++;
      if (!solved) begin
        failures++;
        $display("FAIL parity %0d: not solved in %0d generations (best %0d of %0d)", SIZES[s], gens, best, nt);
      end else
        $display("parity %0d solved in %0d generations", SIZES[s], gens);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
