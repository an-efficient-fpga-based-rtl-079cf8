// tb_lfsr16 -- self-checking test of the LFSR noise bit generator.
//
// Checks both tap sets ({6,0} and {9,5,4,0}) against the reference shift
// rule of ehw_ref_pkg for 3000 steps from several seeds, the zero-seed
// substitution, that the register holds when `step` is low, and the cycle
// length of the 4-tap register from seed 1 (57337 states).
module tb_lfsr16;
  import ehw_ref_pkg::*;
  logic clk = 1'b0, rst, load, step;
  logic [15:0] seed;
  logic n2, n4;
  logic [15:0] s2, s4, r2, r4;
  int checks = 0, failures = 0;

  lfsr16 #(.NTAPS(2), .TAPS('{6, 0, 0, 0}))  dut2 (.clk, .rst, .load, .seed, .step, .noise(n2), .state(s2));
  lfsr16 #(.NTAPS(4), .TAPS('{9, 5, 4, 0}))  dut4 (.clk, .rst, .load, .seed, .step, .noise(n4), .state(s4));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %04h expected %04h", what, got, exp);
    end
  endtask

  initial begin
    int period;
    logic b;
    rst = 1; load = 0; step = 0; seed = 0;
    @(negedge clk); rst = 0;
    for (int s = 0; s < 4; s++) begin
      seed = (s == 0) ? 16'h0000 : 16'($urandom());
      load = 1; @(negedge clk); load = 0;
      r2 = (seed == 0) ? 16'h0001 : seed;
      r4 = r2;
      check(s2, r2, "seed load 2-tap");
      check(s4, r4, "seed load 4-tap");
      for (int n = 0; n < 3000; n++) begin
        step = ($urandom_range(0, 4) != 0);
        checks++;
        if (n2 !== r2[0] || n4 !== r4[0]) begin
          failures++; $display("FAIL noise bit at step %0d", n);
        end
        if (step) begin
          b = lfsr_step(r2, '{6, 0});
          b = lfsr_step(r4, '{9, 5, 4, 0});
        end
        @(negedge clk);
        check(s2, r2, "2-tap state");
        check(s4, r4, "4-tap state");
      end
      step = 0;
    end
    // cycle length of the 4-tap register from seed 1
    seed = 16'h0001; load = 1; @(negedge clk); load = 0; step = 1;
    period = 0;
    do begin @(negedge clk); period++; end while (s4 != 16'h0001 && period < 70000);
    step = 0;
    check(16'(period), 16'(57337), "4-tap cycle length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
