// tb_testing_module -- self-checking test of the fitness evaluator.
//
// Deploys two random individuals, fills the test memory with triplets
// (I, O, D) where O is sometimes the reference output of one of the
// individuals (so that tests pass and fail), runs evaluations with 1, 16,
// 100 and 256 tests and checks both fitness values against the reference
// model, the per-test result memory (outputs and pass bits), and the run
// time of 10 clocks per test (plus one to take start and one for the
// first RESET).
module tb_testing_module;
  import ehw_pkg::*;
  import ehw_ref_pkg::*;
  logic clk = 1'b0, rst, start, busy, done, tm_we;
  logic [8:0]  num_tests;
  logic [15:0] fitness [2];
  logic [7:0]  tm_addr, res_addr;
  test_vec_t   tm_wdata;
  logic [17:0] res_rdata;
  logic [1:0]  cfg_we;
  logic [4:0]  cfg_cell;
  logic [31:0] cfg_data;
  logic [31:0] ch [2][32];
  test_vec_t   tests [256];
  int checks = 0, failures = 0;

  testing_module #(.K(2)) dut (.clk, .rst, .start, .num_tests, .busy, .done, .fitness,
    .tm_we, .tm_addr, .tm_wdata, .res_addr, .res_rdata, .cfg_we, .cfg_cell, .cfg_data);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    int nt [4] = '{1, 16, 100, 256};
    int ef [2];
    int lat, sel;
    logic [7:0] outs [2];
    rst = 1; start = 0; num_tests = 0; tm_we = 0; tm_addr = 0; tm_wdata = '0;
    res_addr = 0; cfg_we = 0; cfg_cell = 0; cfg_data = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int round = 0; round < 3; round++) begin
      for (int k = 0; k < 2; k++)
        for (int c = 0; c < 32; c++) begin
          ch[k][c] = $urandom();
          cfg_we = 2'(1 << k); cfg_cell = 5'(c); cfg_data = ch[k][c];
          @(negedge clk);
        end
      cfg_we = 0;
      for (int t = 0; t < 256; t++) begin
        tests[t].i = 8'(t);
        tests[t].d = ($urandom_range(0, 1) == 1) ? 8'hFE : 8'($urandom());
        sel = $urandom_range(0, 2);
        if (sel == 0)      tests[t].o = ind_eval(ch[0], tests[t].i);
        else if (sel == 1) tests[t].o = ind_eval(ch[1], tests[t].i);
        else               tests[t].o = 8'($urandom());
        tm_we = 1; tm_addr = 8'(t); tm_wdata = tests[t];
        @(negedge clk);
      end
      tm_we = 0;
      foreach (nt[j]) begin
        num_tests = 9'(nt[j]);
        ef = '{0, 0};
        for (int t = 0; t < nt[j]; t++)
          for (int k = 0; k < 2; k++)
            ef[k] += int'(vec_pass(ind_eval(ch[k], tests[t].i), tests[t].o, tests[t].d));
        start = 1; @(negedge clk); start = 0;
        lat = 1;
        while (!done && lat < 5000) begin @(negedge clk); lat++; end
        // one clock to take start, one for the first RESET, 10 per test
        check(lat, 10 * nt[j] + 2, "clocks per evaluation");
        check(int'(fitness[0]), ef[0], $sformatf("fitness A, %0d tests", nt[j]));
        check(int'(fitness[1]), ef[1], $sformatf("fitness B, %0d tests", nt[j]));
        // per-test result record
        for (int t = 0; t < nt[j]; t += 7) begin
          res_addr = 8'(t); @(negedge clk); @(negedge clk);
          for (int k = 0; k < 2; k++) begin
            outs[k] = ind_eval(ch[k], tests[t].i);
            check(int'(res_rdata[8*k +: 8]), int'(outs[k]), "recorded output");
            check(int'(res_rdata[16 + k]),
                  int'(vec_pass(outs[k], tests[t].o, tests[t].d)), "recorded pass bit");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
