// tb_bram_sp -- self-checking test of the single-port block RAM.
//
// Writes random words to random addresses of a 1024 x 16 instance (the
// probabilistic-vector size), mirrors them in a shadow array, and checks
// every read one clock later, including the read-first value returned on a
// write cycle.
module tb_bram_sp;
  logic clk = 1'b0, we;
  logic [9:0]  addr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [1024];
  logic        known  [1024];
  int checks = 0, failures = 0;

  bram_sp #(.DEPTH(1024), .WIDTH(16)) dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    logic        chk;
    for (int i = 0; i < 1024; i++) known[i] = 1'b0;
    we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin          // fill
      we = 1; addr = 10'(i); wdata = 16'($urandom());
      shadow[i] = wdata; known[i] = 1'b1;
      @(negedge clk);
    end
    for (int n = 0; n < 20000; n++) begin
      we    = ($urandom_range(0, 2) == 0);
      addr  = 10'($urandom());
      wdata = 16'($urandom());
      exp   = shadow[addr];
      chk   = known[addr];
      if (we) shadow[addr] = wdata;
      @(negedge clk);
      if (chk) begin
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("FAIL addr %0d: got %04h expected %04h", addr, rdata, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
