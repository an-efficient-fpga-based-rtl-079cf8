// tb_ehw_wrapper -- self-checking test of the individual interface automaton.
//
// Deploys a random chromosome, then runs the command protocol
// (RESET, EMPTY, START, EMPTY) for many input words and checks: the STATE
// codes seen (WAIT, RUNNING, COMPLETE), the OUTPUT against the reference
// individual model, that RESET clears OUTPUT to 0x00, that a command not
// preceded by EMPTY is ignored, and that COMPLETE is visible seven clocks
// after START is presented: one to take the command, ASSERT_CE, the four
// evaluation clocks and DEASSERT_ALL.
module tb_ehw_wrapper;
  import ehw_pkg::*;
  import ehw_ref_pkg::*;
  logic clk = 1'b0, rst, cfg_we;
  logic [7:0]  input_i, control_i, output_o, state_o;
  logic [4:0]  cfg_cell;
  logic [31:0] cfg_data;
  logic [31:0] chrom [32];
  int checks = 0, failures = 0;

  ehw_wrapper dut (.clk, .rst, .input_i, .control_i, .output_o, .state_o,
                   .cfg_we, .cfg_cell, .cfg_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  task automatic cmd(input logic [7:0] c);
    control_i = c;       @(negedge clk);
    control_i = CTRL_EMPTY; @(negedge clk);
  endtask

  initial begin
    int lat;
    rst = 1; cfg_we = 0; cfg_cell = 0; cfg_data = 0; input_i = 0; control_i = CTRL_EMPTY;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 32; c++) chrom[c] = $urandom();
    for (int c = 0; c < 32; c++) begin
      cfg_we = 1; cfg_cell = 5'(c); cfg_data = chrom[c]; @(negedge clk);
    end
    cfg_we = 0;
    @(negedge clk);
    check(state_o, STAT_WAIT, "idle state");
    for (int v = 0; v < 200; v++) begin
      logic [7:0] x;
      x = 8'($urandom());
      cmd(CTRL_RESET);
      check(output_o, 8'h00, "RESET clears OUTPUT");
      @(negedge clk);                    // STATE is registered: one clock later
      check(state_o, STAT_WAIT, "WAIT after RESET");
      input_i   = x;
      control_i = CTRL_START;
      lat = 0;
      @(negedge clk); lat++;
      control_i = CTRL_EMPTY;
      @(negedge clk); lat++;
      if (state_o != STAT_RUNNING) begin
        // first cycle after START is accepted must show RUNNING
        checks++; failures++; $display("FAIL not RUNNING after START");
      end
      while (state_o != STAT_COMPLETE && lat < 50) begin @(negedge clk); lat++; end
      // one clock to take START, ASSERT_CE, CLOCK_1..4, DEASSERT_ALL
      check(8'(lat), 8'd7, "START to COMPLETE latency");
      check(output_o, ind_eval(chrom, x), $sformatf("output for %02h", x));
      @(negedge clk);
      check(state_o, STAT_WAIT, "back to WAIT after EMPTY");
    end
    // a START without a preceding EMPTY is ignored
    cmd(CTRL_RESET);
    control_i = CTRL_START; @(negedge clk);
    repeat (10) @(negedge clk);         // START held: only the first is taken
    control_i = CTRL_RESET;             // no EMPTY in between: must be ignored
    repeat (3) @(negedge clk);
    check(state_o, STAT_COMPLETE, "held command keeps COMPLETE");
    control_i = CTRL_EMPTY; repeat (2) @(negedge clk);
    check(state_o, STAT_WAIT, "EMPTY releases COMPLETE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
