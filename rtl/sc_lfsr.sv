// sc_lfsr: maximal-length Fibonacci linear feedback shift register, the
// pseudo-random number generator of every stochastic converter.
//
// Each clock the register shifts left by one; the new bit 0 is the XOR of
// the tap bits given by sc_pkg::lfsr_taps(WIDTH). The register runs through
// all 2^WIDTH-1 non-zero states, so the full word is a uniform random
// number in 1..2^WIDTH-1 and any single bit is high with probability
// close to 0.5. Using an LFSR as the random source follows the source
// design; the tap table, the shift direction and SEED are this design's
// own. SEED must be non-zero (a zero seed is replaced by 1).
//
// Interface: rnd_o is the register, valid from the first clock after
// reset; it advances every clock. Reset is asynchronous, active low.
module sc_lfsr #(
  parameter int unsigned WIDTH = 14,
  parameter logic [WIDTH-1:0] SEED = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] rnd_o
);
  import sc_pkg::*;

  localparam logic [31:0] TAPS32 = lfsr_taps(WIDTH);
  localparam logic [WIDTH-1:0] TAPS = TAPS32[WIDTH-1:0];
  localparam logic [WIDTH-1:0] SEED_NZ = (SEED == '0) ? WIDTH'(1) : SEED;

  logic [WIDTH-1:0] state;
  logic             fb;

  assign fb = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= SEED_NZ;
    else        state <= {state[WIDTH-2:0], fb};
  end

  assign rnd_o = state;

  initial begin
    assert (WIDTH >= 3 && WIDTH <= 24)
      else $error("sc_lfsr: WIDTH %0d has no maximal-length tap set", WIDTH);
  end
endmodule
