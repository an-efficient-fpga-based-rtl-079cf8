// bram_sp -- single-port synchronous block RAM.
//
// One read/write port with a registered read: the word at `addr` appears on
// `rdata` one clock after it is presented; a write stores `wdata` at `addr`
// on the clock edge and `rdata` then shows the old word (read-first), as a
// block RAM configured read-first does. The contents start undefined and
// are filled by the user logic (the compact-GA core writes 0.5 into every
// probabilistic-vector entry during initialisation).
//
// The system uses it for the probabilistic vector (1024 x 16 bits, 10-bit
// address) and the two chromosome memories (32 x 32 bits each, one word per
// evolvable cell). Being single-ported, only one access per clock is
// possible; that limit shapes the update automaton.
module bram_sp #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    rdata <= mem[addr];
    if (we) mem[addr] <= wdata;
  end

endmodule
