// tb_ehw_cell -- self-checking test of one evolvable cell.
//
// Drives random LUT contents and inputs and compares the cell's state after
// every clock with a reference next-state computed here from the cell rule
// next = luts[31 - {state, in}]. Also checks that `ce` low holds the state
// and that `clr` clears it. A watchdog ends the run after 20000 cycles.
module tb_ehw_cell;
  logic clk = 1'b0, rst, clr, ce, q;
  logic [31:0] luts;
  logic [3:0]  in;
  int checks = 0, failures = 0;
  logic ref_q;

  ehw_cell dut (.clk, .rst, .clr, .ce, .luts, .in, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; clr = 0; ce = 0; luts = '0; in = '0; ref_q = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(q, 1'b0, "reset");
    for (int n = 0; n < 2000; n++) begin
      luts = $urandom();
      in   = 4'($urandom());
      ce   = ($urandom_range(0, 3) != 0);
      clr  = ($urandom_range(0, 15) == 0);
      // reference next state
      if (clr)      ref_q = 1'b0;
      else if (ce)  ref_q = luts[5'd31 - {ref_q, in}];
      @(negedge clk);
      check(q, ref_q, $sformatf("step %0d", n));
    end
    // directed: state 0 reads the upper half, state 1 the lower half
    clr = 1; @(negedge clk); clr = 0;
    luts = 32'h8000_0000; in = 4'h0; ce = 1;   // index 0 -> bit 31
    @(negedge clk); check(q, 1'b1, "state0 in0 -> bit31");
    luts = 32'h0000_8000; in = 4'h0;           // state 1, index 16 -> bit 15
    @(negedge clk); check(q, 1'b1, "state1 in0 -> bit15");
    ce = 0; luts = '0;
    @(negedge clk); check(q, 1'b1, "ce low holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
