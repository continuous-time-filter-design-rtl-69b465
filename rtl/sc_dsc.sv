// sc_dsc: digital-to-stochastic converter (DSC).
//
// A WIDTH-bit value is compared every clock with a fresh number from an
// LFSR; the output pulse is high when the random number is not above the
// value. Since the LFSR visits 1..2^WIDTH-1 once per period, the pulse is
// high with probability value/(2^WIDTH-1), which is the value/2^WIDTH of
// the source design up to one part in 2^WIDTH, and exactly 0 and 1 at the
// two ends of the range. Comparing a register with a random number
// generator follows the source design; the "<=" comparison and the SEED
// are this design's own.
//
// Interface: value_i is sampled combinationally; pulse_o is combinational
// from value_i and the LFSR register, so a value change shows in the same
// clock. Reset is asynchronous, active low (it only resets the LFSR).
module sc_dsc #(
  parameter int unsigned WIDTH = 14,
  parameter logic [WIDTH-1:0] SEED = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] value_i,
  output logic             pulse_o
);
  logic [WIDTH-1:0] rnd;

  sc_lfsr #(.WIDTH(WIDTH), .SEED(SEED)) u_rng (
    .clk   (clk),
    .rst_n (rst_n),
    .rnd_o (rnd)
  );

  assign pulse_o = (rnd <= value_i);
endmodule
