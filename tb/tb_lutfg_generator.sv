// tb_lutfg_generator -- self-checking test of the cell gene generator.
//
// A behavioural single-port memory model supplies the 32 probabilistic
// values of a cell with one clock of latency. The test seeds the four
// random number generators, runs the generator repeatedly and compares
// both 32-bit gene words with a reference computed from the RNG model of
// ehw_ref_pkg: gene k = (number < P[k]), and, with the additional mutation
// on, a LUT (16 genes) whose first mutation number is below `mut_prob`
// takes bit 0 of the mutation numbers instead. Also checks the mutation
// pulse count, the en/ready handshake and the 609-clock run time
// (1 to start, then 19 per gene).
module tb_lutfg_generator;
  import ehw_pkg::*;
  import ehw_ref_pkg::*;
  logic clk = 1'b0, rst, en, rng_reinit, rng_available, mut_en;
  logic mut_hit_a, mut_hit_b, ready;
  logic [4:0]  pv_addr;
  logic [15:0] pv_rdata, mut_prob;
  logic [31:0] seed [4];
  logic [31:0] genes_a, genes_b;
  logic [15:0] pv [32];
  logic [15:0] si [4], sq [4];
  int checks = 0, failures = 0, hits = 0;

  lutfg_generator dut (.clk, .rst, .en, .pv_addr, .pv_rdata, .rng_reinit, .seed,
    .rng_available, .mut_en, .mut_prob, .mut_hit_a, .mut_hit_b, .genes_a, .genes_b, .ready);

  always #5 clk = ~clk;
  always_ff @(posedge clk) pv_rdata <= pv[pv_addr];
  always_ff @(posedge clk) hits <= hits + int'(mut_hit_a) + int'(mut_hit_b);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] ea, eb;
    logic [15:0] r [4];
    logic        ma, mb;
    int          lat, exp_hits;
    rst = 1; en = 0; rng_reinit = 0; mut_en = 0; mut_prob = 0;
    for (int g = 0; g < 4; g++) seed[g] = $urandom();
    repeat (2) @(negedge clk); rst = 0;
    rng_reinit = 1; @(negedge clk); rng_reinit = 0;
    while (!rng_available) @(negedge clk);
    for (int g = 0; g < 4; g++) begin
      si[g] = (seed[g][15:0]  == 0) ? 16'h0001 : seed[g][15:0];
      sq[g] = (seed[g][31:16] == 0) ? 16'h0001 : seed[g][31:16];
    end
    for (int run = 0; run < 24; run++) begin
      // probabilities: random, all zero, all maximal
      for (int k = 0; k < 32; k++)
        pv[k] = (run == 1) ? 16'h0000 : (run == 2) ? 16'hFFFF : 16'($urandom());
      mut_en   = (run >= 8);
      mut_prob = (run >= 16) ? 16'hFFFF : (run >= 12) ? 16'h0000 : 16'h6000;
      exp_hits = hits;
      ea = '0; eb = '0; ma = 0; mb = 0;
      for (int k = 0; k < 32; k++) begin
        for (int g = 0; g < 4; g++) r[g] = rng_next(si[g], sq[g]);
        ea[k] = (r[0] < pv[k]);
        eb[k] = (r[1] < pv[k]);
        if (k % 16 == 0) begin
          ma = mut_en && (r[2] < mut_prob);
          mb = mut_en && (r[3] < mut_prob);
          exp_hits += int'(ma) + int'(mb);
        end
        if (ma) ea[k] = r[2][0];
        if (mb) eb[k] = r[3][0];
      end
      en = 1; lat = 0;
      do begin @(negedge clk); lat++; end while (!ready && lat < 2000);
      checks++;
      if (lat != 609) begin failures++; $display("FAIL run time %0d clocks", lat); end
      check32(genes_a, ea, $sformatf("run %0d chromosome A", run));
      check32(genes_b, eb, $sformatf("run %0d chromosome B", run));
      @(negedge clk);
      check32(32'(ready), 32'd1, "ready held while en high");
      en = 0; @(negedge clk);
      check32(32'(ready), 32'd0, "ready drops with en");
      check32(32'(hits), 32'(exp_hits), "mutation pulses");
      if (run == 1) check32(genes_a | genes_b, 32'h0, "P = 0 gives zeros");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
