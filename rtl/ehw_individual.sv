// ehw_individual -- the 8-bit data-path evolvable individual.
//
// Thirty-two ehw_cell instances are arranged as four columns of eight cells.
// Column 0 reads the primary input word, each later column reads the eight
// state bits of the column before it, and the eight cells of column 3 form
// the output word. The routing is fixed (it is not evolved): within a
// column, cells in rows 0, 2, 4, 6 take the four least significant bits of
// the previous word and cells in rows 1, 3, 5, 7 the four most significant
// bits. Row r of a column produces bit r of that column's word. Cell
// c = 8*column + row uses chromosome bits [32c+31 : 32c], so the whole
// individual is described by 1024 genes.
//
// The LUT contents are held in a configuration register file that is
// written one cell (32 bits) at a time through `cfg_we/cfg_cell/cfg_data`.
// On the FPGA this is the LUT configuration memory reached through the
// internal configuration port; here it is ordinary registers.
//
// Timing: every enabled clock moves all 32 flip-flops at once, so a value
// at `din` reaches `dout` after four enabled clocks. `clr` resets all cell
// states.
module ehw_individual
  import ehw_pkg::*;
#(
  parameter int unsigned COLS = 4,
  parameter int unsigned ROWS = DATA_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clr,
  input  logic                     ce,
  input  logic [ROWS-1:0]          din,
  output logic [ROWS-1:0]          dout,
  // configuration (deployment) port
  input  logic                     cfg_we,
  input  logic [$clog2(COLS*ROWS)-1:0] cfg_cell,
  input  logic [31:0]              cfg_data
);

  localparam int unsigned NCELL = COLS * ROWS;
  localparam int unsigned HALF  = ROWS / 2;

  logic [31:0]     cfg_mem [NCELL];
  logic [ROWS-1:0] col_q   [COLS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < NCELL; c++) cfg_mem[c] <= '0;
    end else if (cfg_we) begin
      cfg_mem[cfg_cell] <= cfg_data;
    end
  end

  for (genvar col = 0; col < COLS; col++) begin : g_col
    logic [ROWS-1:0] src;
    if (col == 0) begin : g_first
      assign src = din;
    end else begin : g_next
      assign src = col_q[col-1];
    end
    for (genvar row = 0; row < ROWS; row++) begin : g_row
      logic [3:0] cin;
      if (row % 2 == 0) begin : g_lo
        assign cin = src[HALF-1:0];
      end else begin : g_hi
        assign cin = src[ROWS-1:HALF];
      end
      ehw_cell u_cell (
        .clk  (clk),
        .rst  (rst),
        .clr  (clr),
        .ce   (ce),
        .luts (cfg_mem[col*ROWS + row]),
        .in   (cin),
        .q    (col_q[col][row])
      );
    end
  end

  assign dout = col_q[COLS-1];

endmodule
