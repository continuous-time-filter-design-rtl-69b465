// rc_comparator_model: behavioural model (not synthesizable) of the analog
// front end of the analog-to-stochastic converter: an RC integrator that
// smooths the converter's output pulse stream, and a comparator that
// compares the smoothed voltage with the analog input.
//
// Voltages are normalised to the logic supply (0.0 .. 1.0). The RC is a
// discrete first-order lag updated on every rising clock edge,
//   v <- v + (stream - v) / RC_CYCLES,
// and the comparator output is (vin > v), with no offset or hysteresis.
// Both the time constant and the ideal comparator are modelling choices;
// the RC must be slower than the clock yet faster than the input signal.
module rc_comparator_model #(
  parameter int unsigned RC_CYCLES = 16
) (
  input  logic clk,
  input  logic stream_i,   // converter output pulse stream
  input  real  vin_i,      // analog input, 0.0 .. 1.0
  output logic cmp_o,      // 1 while vin_i is above the RC voltage
  output real  vrc_o       // RC integrator voltage
);
  real v = 0.0;

  always @(posedge clk) begin
    v <= v + ((stream_i ? 1.0 : 0.0) - v) / real'(RC_CYCLES);
  end

  assign cmp_o = (vin_i > v);
  assign vrc_o = v;
endmodule
