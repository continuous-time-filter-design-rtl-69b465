// sc_signed_adder: the ADDER of the stochastic filters, a wired-OR
// summation of two signed stochastic pulses.
//
// Each input is a pulse bit with a sign bit. The sum has a pulse when
// exactly one input has one, or when both have one of the same sign;
// two coincident pulses of opposite sign cancel. The sign of the sum is
// the sign of whichever input pulsed. Two coincident pulses of the same
// sign merge into a single pulse, which is why this adder is only
// accurate for low pulse densities, as in the error signal of a filter
// loop. The equations are those of the source design:
//   sum  = a ^ b | a & ~(sa ^ sb)
//   sign = a sa (~b | sb) | b sb (~a | sa)
// Purely combinational; no clock.
module sc_signed_adder
  import sc_pkg::*;
(
  input  sc_signed_t a_i,
  input  sc_signed_t b_i,
  output sc_signed_t sum_o,
  output logic       cancel_o   // both pulsed with opposite signs
);
  always_comb begin
    sum_o.pulse = (a_i.pulse ^ b_i.pulse) | (a_i.pulse & ~(a_i.pos ^ b_i.pos));
    sum_o.pos   = (a_i.pulse & a_i.pos & (~b_i.pulse | b_i.pos))
                | (b_i.pulse & b_i.pos & (~a_i.pulse | a_i.pos));
    cancel_o    = a_i.pulse & b_i.pulse & (a_i.pos ^ b_i.pos);
  end
endmodule
