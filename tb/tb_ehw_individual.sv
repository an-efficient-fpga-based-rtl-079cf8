// tb_ehw_individual -- self-checking test of the 32-cell individual.
//
// Loads random chromosomes through the configuration port, clears the cell
// states, applies an input word for four enabled clocks and compares the
// output word with the reference model of ehw_ref_pkg (four synchronous
// column updates with the fixed nibble routing). Also checks the output
// after 1..3 clocks, which exercises the column-by-column propagation.
module tb_ehw_individual;
  import ehw_ref_pkg::*;
  logic clk = 1'b0, rst, clr, ce, cfg_we;
  logic [7:0]  din, dout;
  logic [4:0]  cfg_cell;
  logic [31:0] cfg_data;
  logic [31:0] chrom [32];
  int checks = 0, failures = 0;

  ehw_individual dut (.clk, .rst, .clr, .ce, .din, .dout, .cfg_we, .cfg_cell, .cfg_data);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; ce = 0; din = '0; cfg_we = 0; cfg_cell = '0; cfg_data = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int trial = 0; trial < 40; trial++) begin
      for (int c = 0; c < 32; c++) chrom[c] = $urandom();
      for (int c = 0; c < 32; c++) begin
        cfg_we = 1; cfg_cell = 5'(c); cfg_data = chrom[c];
        @(negedge clk);
      end
      cfg_we = 0;
      for (int v = 0; v < 16; v++) begin
        int n;
        din = 8'($urandom());
        n   = (v < 12) ? 4 : 1 + (v % 3);
        clr = 1; @(negedge clk); clr = 0;
        ce = 1; repeat (n) @(negedge clk); ce = 0;
        checks++;
        if (dout !== ind_eval(chrom, din, n)) begin
          failures++;
          $display("FAIL trial %0d din %02h clocks %0d: got %02h expected %02h",
                   trial, din, n, dout, ind_eval(chrom, din, n));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
