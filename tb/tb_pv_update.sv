// tb_pv_update -- self-checking test of the probabilistic-vector update.
//
// Uses a reduced vector of 128 genes (4 chromosome words) held in
// behavioural memories with one clock of read latency. For random vectors,
// chromosomes, winners, step sizes and margins it runs one pass and
// compares the whole vector with the reference rule: genes equal -> no
// change; winner gene 1 -> P + step limited to 65535 - d, only if
// P < 65535 - d; winner gene 0 -> P - step limited to d, only if P > d.
// Also checks the pass length (2 clocks per gene plus 4 per differing
// gene), the done pulse and the count of margin-blocked updates.
module tb_pv_update;
  import ehw_pkg::*;
  localparam int N = 128;
  logic clk = 1'b0, rst, start, winner_b, busy, done, clamp_hit, pv_we;
  logic [15:0] step, margin, pv_wdata, pv_rdata;
  logic [6:0]  pv_addr;
  logic [1:0]  chrom_addr;
  logic [31:0] chrom_a, chrom_b;
  logic [15:0] pv [N], exp_pv [N];
  logic [31:0] ca [4], cb [4];
  int checks = 0, failures = 0, clamps = 0;

  pv_update #(.NGENES(N)) dut (.clk, .rst, .start, .winner_b, .step, .margin, .busy, .done,
    .clamp_hit, .pv_addr, .pv_we, .pv_wdata, .pv_rdata, .chrom_addr, .chrom_a, .chrom_b);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    pv_rdata <= pv[pv_addr];
    if (pv_we) pv[pv_addr] <= pv_wdata;
    chrom_a  <= ca[chrom_addr];
    chrom_b  <= cb[chrom_addr];
    if (clamp_hit) clamps <= clamps + 1;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, ndiff, exp_clamps;
    logic w, l;
    logic [15:0] hi, lo;
    rst = 1; start = 0; winner_b = 0; step = 16'h0400; margin = 16'h07AE;
    repeat (2) @(negedge clk); rst = 0;
    for (int run = 0; run < 60; run++) begin
      winner_b = 1'($urandom());
      step     = (run < 20) ? 16'h0400 : 16'($urandom_range(1, 16'h3000));
      margin   = (run < 20) ? 16'h07AE : 16'($urandom_range(0, 16'h2000));
      hi = 16'hFFFF - margin; lo = margin;
      for (int w4 = 0; w4 < 4; w4++) begin ca[w4] = $urandom(); cb[w4] = $urandom(); end
      for (int i = 0; i < N; i++) begin
        // mix of values near the margins and anywhere
        int sel;
        sel = $urandom_range(0, 3);
        if (sel == 0)      pv[i] = hi - 16'($urandom_range(0, 600));
        else if (sel == 1) pv[i] = lo + 16'($urandom_range(0, 600));
        else               pv[i] = 16'($urandom());
      end
      ndiff = 0; exp_clamps = clamps;
      for (int i = 0; i < N; i++) begin
        logic ga, gb;
        int   t;
        ga = ca[i/32][i%32]; gb = cb[i/32][i%32];
        w  = winner_b ? gb : ga; l = winner_b ? ga : gb;
        exp_pv[i] = pv[i];
        if (w != l) begin
          ndiff++;
          if (w) begin
            if (pv[i] < hi) begin
              t = int'(pv[i]) + int'(step);
              exp_pv[i] = (t > int'(hi)) ? hi : 16'(t);
            end else exp_clamps++;
          end else begin
            if (pv[i] > lo) begin
              t = int'(pv[i]) - int'(step);
              exp_pv[i] = (t < int'(lo)) ? lo : 16'(t);
            end else exp_clamps++;
          end
        end
      end
      start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done && lat < 5000) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2 * N + 4 * ndiff + 1) begin
        failures++; $display("FAIL pass length %0d, expected %0d", lat, 2 * N + 4 * ndiff + 1);
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (pv[i] !== exp_pv[i]) begin
          failures++;
          $display("FAIL run %0d gene %0d: got %04h expected %04h", run, i, pv[i], exp_pv[i]);
        end
      end
      checks++;
      if (clamps != exp_clamps) begin
        failures++; $display("FAIL clamp count %0d expected %0d", clamps, exp_clamps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
