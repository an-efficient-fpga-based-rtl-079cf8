// ehw_ref_pkg -- reference models used by the testbenches.
//
// Pure functions, written independently of the RTL, for the evolvable
// individual (four synchronous column updates of 32 cells from a cleared
// state), the test-vector don't-care compare and the LFSR noise bit
// generator.
package ehw_ref_pkg;

  // Output of the 8-bit individual after `nclk` enabled clocks from reset.
  // chrom[c] holds the 32 LUT bits of cell c = 8*column + row.
  function automatic logic [7:0] ind_eval(input logic [31:0] chrom [32],
                                          input logic [7:0] din,
                                          input int nclk = 4);
    logic [7:0] st [4];
    logic [7:0] nx [4];
    logic [7:0] src;
    logic [3:0] ci;
    for (int c = 0; c < 4; c++) st[c] = 8'h00;
    for (int t = 0; t < nclk; t++) begin
      for (int c = 0; c < 4; c++) begin
        src = (c == 0) ? din : st[c-1];
        for (int r = 0; r < 8; r++) begin
          ci = (r % 2 == 0) ? src[3:0] : src[7:4];
          nx[c][r] = chrom[c*8 + r][31 - {st[c][r], ci}];
        end
      end
      for (int c = 0; c < 4; c++) st[c] = nx[c];
    end
    return st[3];
  endfunction

  function automatic bit vec_pass(input logic [7:0] out, input logic [7:0] o,
                                  input logic [7:0] d);
    return ((out | d) == (o | d));
  endfunction

  // One shift of a 16-stage right-shifting LFSR; returns the bit shifted out.
  function automatic logic lfsr_step(inout logic [15:0] s, input int taps[$]);
    logic fb = 1'b0;
    logic o  = s[0];
    foreach (taps[t]) fb ^= s[taps[t]];
    s = {fb, s[15:1]};
    return o;
  endfunction

  // Next WIDTH-bit number of the hybrid RNG (MSB first = first noise bit).
  function automatic logic [15:0] rng_next(inout logic [15:0] si,
                                           inout logic [15:0] sq,
                                           input int width = 16);
    logic [15:0] v = '0;
    for (int b = 0; b < width; b++) begin
      logic bi, bq;
      bi = lfsr_step(si, '{6, 0});
      bq = lfsr_step(sq, '{9, 5, 4, 0});
      v  = {v[14:0], bi ^ bq};
    end
    return v;
  endfunction

endpackage
