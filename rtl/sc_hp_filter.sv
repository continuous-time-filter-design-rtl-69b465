// sc_hp_filter: first-order stochastic high-pass filter.
//
// The output is the input stream minus the output of a first-order
// low-pass stage (sc_lp_stage) fed with the same input. Both streams may
// be dense, so the wired-OR ADDER cannot be used; instead a multiplexer
// picks, each clock, either the input pulse (as a positive pulse) or the
// low-pass pulse (as a negative pulse). The select is one bit of a
// separate LFSR, high with probability 0.5, so the output codes
//   (x - y_lp) / 2,  with  G(s) = s tau / (1 + s tau)          (K = 1)
//   G(s) = ((K-1) + s tau) / (K + s tau)                       (gain K)
// where tau = 2^N / Fclk, times the factor 1/2 of the multiplexer.
// The structure (low-pass, subtraction by a multiplexer with a p=0.5
// LFSR select) follows the source design; the signed output encoding
// (pulse plus sign bit), the choice of the select LFSR's top bit and the
// seeds are this design's own.
//
// Interface: x_i is one stochastic bit per clock; hp_o is a signed
// stochastic stream, combinational from x_i and registers. lp_count_o
// and lp_y_o expose the inner low-pass stage. Reset is asynchronous,
// active low.
module sc_hp_filter
  import sc_pkg::*;
#(
  parameter int unsigned N = 14,
  parameter int unsigned K = 1,
  parameter logic [N-1:0] SEED = 1,
  parameter logic [15:0]  SEL_SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x_i,
  output sc_signed_t   hp_o,
  output logic         sel_o,       // 1: input chosen, 0: low-pass chosen
  output logic         lp_y_o,
  output logic [N-1:0] lp_count_o
);
  logic [15:0] sel_rnd;
  logic        lp_up, lp_dn, lp_cancel, lp_sat;

  sc_lp_stage #(.N(N), .K(K), .SEED(SEED)) u_lp (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_i      (x_i),
    .y_o      (lp_y_o),
    .count_o  (lp_count_o),
    .err_up_o (lp_up),
    .err_dn_o (lp_dn),
    .cancel_o (lp_cancel),
    .sat_o    (lp_sat)
  );

  sc_lfsr #(.WIDTH(16), .SEED(SEL_SEED)) u_sel (
    .clk   (clk),
    .rst_n (rst_n),
    .rnd_o (sel_rnd)
  );

  assign sel_o = sel_rnd[15];

  always_comb begin
    if (sel_o) hp_o = '{pulse: x_i,    pos: SC_POS};
    else       hp_o = '{pulse: lp_y_o, pos: SC_NEG};
  end
endmodule
