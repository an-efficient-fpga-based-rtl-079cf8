// lfsr16 -- 16-stage linear-feedback shift register noise-bit generator.
//
// On every enabled clock the register shifts right by one position; the
// new leftmost stage (bit 15) is the XOR of the stages named in TAPS, and
// the bit shifted out of stage 0 is the noise bit. Two tap sets are used by
// the random number generator: {6, 0} (two taps, one XOR) and
// {9, 5, 4, 0} (four taps, three XORs, stage 0 feeding the last XOR). The
// stage count and tap positions follow the noise-generator description;
// with this shift direction the 2-tap set has a cycle of 434 states from
// seed 1 and the 4-tap set 57337, so neither is a maximal-length sequence.
//
// `load` writes `seed` into the register (a zero seed is replaced by
// 16'h0001 so the register cannot lock up at zero; this is this design's
// choice). `noise` is combinational from the current state.
module lfsr16 #(
  parameter int unsigned NTAPS             = 2,
  parameter int unsigned TAPS [4]          = '{6, 0, 0, 0}
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [15:0] seed,
  input  logic        step,
  output logic        noise,
  output logic [15:0] state
);

  logic fb;

  always_comb begin
    fb = 1'b0;
    for (int t = 0; t < NTAPS; t++) fb ^= state[TAPS[t]];
  end

  assign noise = state[0];

  always_ff @(posedge clk) begin
    if (rst)       state <= 16'h0001;
    else if (load) state <= (seed == 16'h0000) ? 16'h0001 : seed;
    else if (step) state <= {fb, state[15:1]};
  end

endmodule
