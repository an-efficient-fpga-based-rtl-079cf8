// rng -- hybrid random number generator.
//
// A noise bit generator made of two 16-stage LFSRs, lfsr_i with taps {6,0}
// and lfsr_q with taps {9,5,4,0}, produces one noise bit per clock,
// noise = lfsr_i XOR lfsr_q. The bits are shifted into a WIDTH-bit output
// buffer, so a WIDTH-bit number takes WIDTH clocks. The 32-bit seed loads
// lfsr_i from its 16 least significant bits and lfsr_q from its 16 most
// significant bits.
//
// Control: a rising edge on `request` starts a new number; `reinit` resets
// the internal state and loads `seed`. Status: `ready` is high while a
// finished number is in `value` (it drops when a new request starts);
// `available` is low while a number is being generated or a seed is being
// loaded. A request that arrives while the core is busy is ignored.
//
// Timing: if `request` is first seen high at clock edge t, `ready` is high
// and `value` valid after edge t + WIDTH (WIDTH noise bits, one per clock).
// The tap sets, the XOR combination and the seed split follow the
// generator description; the WIDTH default of 16 matches the 16-bit
// probabilistic vector compared against it.
module rng #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             request,
  input  logic             reinit,
  input  logic [31:0]      seed,
  output logic [WIDTH-1:0] value,
  output logic             ready,
  output logic             available
);

  typedef enum logic [1:0] {R_IDLE, R_GEN, R_SEED} rstate_e;

  rstate_e                   st;
  logic                      req_q;
  logic [$clog2(WIDTH+1)-1:0] cnt;
  logic                      bit_i, bit_q, step, load;
  

  assign step = (st == R_GEN);
  assign load = (st == R_SEED);

  lfsr16 #(.NTAPS(2), .TAPS('{6, 0, 0, 0})) u_lfsr_i (
    .clk(clk), .rst(rst), .load(load), .seed(seed[15:0]),
    .step(step), .noise(bit_i), .state());

  lfsr16 #(.NTAPS(4), .TAPS('{9, 5, 4, 0})) u_lfsr_q (
    .clk(clk), .rst(rst), .load(load), .seed(seed[31:16]),
    .step(step), .noise(bit_q), .state());

  assign available = (st == R_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= R_IDLE;
      req_q <= 1'b0;
      cnt   <= '0;
      value <= '0;
      ready <= 1'b0;
    end else begin
      req_q <= request;
      unique case (st)
        R_IDLE: begin
          if (reinit) begin
            st    <= R_SEED;
            ready <= 1'b0;
          end else if (request && !req_q) begin
            st    <= R_GEN;
            cnt   <= '0;
            ready <= 1'b0;
          end
        end
        R_GEN: begin
          value <= {value[WIDTH-2:0], bit_i ^ bit_q};
          cnt   <= cnt + 1'b1;
          if (cnt == ($bits(cnt))'(WIDTH - 1)) begin
            st    <= R_IDLE;
            ready <= 1'b1;
          end
        end
        R_SEED:  st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
    end
  end

endmodule
