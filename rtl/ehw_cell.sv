// ehw_cell -- one evolvable cell of the individual.
//
// A cell is the content of one FPGA slice: two 4-input look-up tables
// (LUT-F and LUT-G) fed by the same four inputs, a multiplexer selecting one
// of the two LUT outputs, and a flip-flop holding the cell's state. The
// multiplexer is driven by the flip-flop itself, so the cell behaves as a
// single 5-input LUT whose fifth input is its own previous output. The
// 32 configuration bits `luts` are the cell's genes.
//
// Bit addressing follows the cell model of the evolution framework: the
// 5-bit index {state, in} is complemented, i.e. the next state is
// luts[31 - {state, in}]. With state 0 the upper half (bits 31..16) is
// used, with state 1 the lower half (bits 15..0).
//
// Timing: the flip-flop updates on a rising clock edge when `ce` is high;
// `clr` (synchronous, used by the wrapper's RESET_FF step) and `rst` clear
// it. `q` is the registered output.
module ehw_cell (
  input  logic        clk,
  input  logic        rst,    // synchronous, active high
  input  logic        clr,    // synchronous state clear
  input  logic        ce,     // clock enable
  input  logic [31:0] luts,   // genes: LUT-G/LUT-F contents
  input  logic [3:0]  in,     // the four routed inputs
  output logic        q       // cell state / output
);

  logic [4:0] index;
  logic       next_q;

  always_comb begin
    index  = ~{q, in};        // 31 - {q, in}
    next_q = luts[index];
  end

  always_ff @(posedge clk) begin
    if (rst || clr)  q <= 1'b0;
    else if (ce)     q <= next_q;
  end

endmodule
