// sc_pkg: types and helpers shared by the stochastic-logic filter blocks.
//
// A signed stochastic stream carries, every clock, a pulse bit and a sign
// bit. The value it codes is the probability of a pulse, taken as positive
// or negative according to the sign bit that accompanies each pulse. The
// sign bit only has a meaning while the pulse bit is high. The sign
// convention (1 = positive) is this design's own choice.
//
// lfsr_taps() gives a maximal-length feedback tap mask for a Fibonacci
// LFSR of 3 to 24 bits (the usual published tap table); other widths
// fall back to the 16-bit mask, which is not maximal.
package sc_pkg;

  typedef struct packed {
    logic pulse;  // 1: a pulse is present this clock
    logic pos;    // sign of the pulse: 1 positive, 0 negative
  } sc_signed_t;

  localparam logic SC_POS = 1'b1;
  localparam logic SC_NEG = 1'b0;

  // Tap mask: bit (t-1) set for each tap t of the feedback polynomial.
  function automatic logic [31:0] lfsr_taps(input int unsigned width);
    logic [31:0] m;
    case (width)
      3:  m = (32'd1 << 2)  | (32'd1 << 1);
      4:  m = (32'd1 << 3)  | (32'd1 << 2);
      5:  m = (32'd1 << 4)  | (32'd1 << 2);
      6:  m = (32'd1 << 5)  | (32'd1 << 4);
      7:  m = (32'd1 << 6)  | (32'd1 << 5);
      8:  m = (32'd1 << 7)  | (32'd1 << 5)  | (32'd1 << 4)  | (32'd1 << 3);
      9:  m = (32'd1 << 8)  | (32'd1 << 4);
      10: m = (32'd1 << 9)  | (32'd1 << 6);
      11: m = (32'd1 << 10) | (32'd1 << 8);
      12: m = (32'd1 << 11) | (32'd1 << 5)  | (32'd1 << 3)  | (32'd1 << 0);
      13: m = (32'd1 << 12) | (32'd1 << 3)  | (32'd1 << 2)  | (32'd1 << 0);
      14: m = (32'd1 << 13) | (32'd1 << 4)  | (32'd1 << 2)  | (32'd1 << 0);
      15: m = (32'd1 << 14) | (32'd1 << 13);
      16: m = (32'd1 << 15) | (32'd1 << 14) | (32'd1 << 12) | (32'd1 << 3);
      17: m = (32'd1 << 16) | (32'd1 << 13);
      18: m = (32'd1 << 17) | (32'd1 << 10);
      19: m = (32'd1 << 18) | (32'd1 << 5)  | (32'd1 << 1)  | (32'd1 << 0);
      20: m = (32'd1 << 19) | (32'd1 << 16);
      21: m = (32'd1 << 20) | (32'd1 << 18);
      22: m = (32'd1 << 21) | (32'd1 << 20);
      23: m = (32'd1 << 22) | (32'd1 << 17);
      24: m = (32'd1 << 23) | (32'd1 << 22) | (32'd1 << 21) | (32'd1 << 16);
      default: m = (32'd1 << 15) | (32'd1 << 14) | (32'd1 << 12) | (32'd1 << 3);
    endcase
    return m;
  endfunction

endpackage
