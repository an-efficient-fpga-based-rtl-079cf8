// tb_rng -- self-checking test of the hybrid random number generator.
//
// Seeds the generator, requests numbers and compares each with the
// reference (noise = lfsr_i XOR lfsr_q, low seed half in lfsr_i, high half
// in lfsr_q, first noise bit ends up as the MSB). Checks the READY and
// AVAILABLE flags, that a number takes exactly WIDTH = 16 clocks after
// the request edge is sampled, that a
// request while busy is ignored, and that REINIT restarts the sequence.
module tb_rng;
  import ehw_ref_pkg::*;
  logic clk = 1'b0, rst, request, reinit, ready, available;
  logic [31:0] seed;
  logic [15:0] value, si, sq, expv;
  int checks = 0, failures = 0;

  rng #(.WIDTH(16)) dut (.clk, .rst, .request, .reinit, .seed, .value, .ready, .available);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic do_seed(input logic [31:0] s);
    seed = s; reinit = 1; @(negedge clk); reinit = 0;
    check(16'(available), 16'd0, "unavailable while seeding");
    @(negedge clk);
    check(16'(available), 16'd1, "available after seeding");
    si = (s[15:0]  == 0) ? 16'h0001 : s[15:0];
    sq = (s[31:16] == 0) ? 16'h0001 : s[31:16];
  endtask

  task automatic get_number(output int lat);
    request = 1; @(negedge clk);
    request = 0;
    lat = 1;
    check(16'(available), 16'd0, "busy while generating");
    while (!ready && lat < 100) begin @(negedge clk); lat++; end
  endtask

  initial begin
    int lat;
    logic [31:0] s0;
    rst = 1; request = 0; reinit = 0; seed = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int k = 0; k < 5; k++) begin
      s0 = (k == 0) ? 32'h0000_0000 : $urandom();
      do_seed(s0);
      for (int n = 0; n < 40; n++) begin
        get_number(lat);
        expv = rng_next(si, sq);
        // one clock samples the request edge, then one noise bit per clock
        check(16'(lat), 16'd17, "clocks per 16-bit number");
        check(value, expv, $sformatf("number %0d of seed %08h", n, s0));
        check(16'(available), 16'd1, "available when ready");
        if (n == 5) begin
          // request pulse while busy must not restart or disturb the number
          request = 1; @(negedge clk); request = 0; @(negedge clk);
          request = 1; @(negedge clk); request = 0;
          repeat (3) @(negedge clk);
          request = 1; @(negedge clk); request = 0;   // edge during generation
          while (!ready) @(negedge clk);
          expv = rng_next(si, sq);
          check(value, expv, "number after busy-time request");
        end
      end
    end
    // REINIT with the same seed restarts the very same sequence
    s0 = 32'hCAFE_1234;
    do_seed(s0); get_number(lat); expv = value;
    do_seed(s0); get_number(lat);
    check(value, expv, "REINIT repeats the sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
