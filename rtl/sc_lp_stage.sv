// sc_lp_stage: first-order stochastic low-pass filter.
//
// The input stream x (a unipolar stochastic stream, value 0..1) and the
// stage's own output stream y enter the signed ADDER as +x and -y. Their
// difference, a low-density error stream, steps an N-bit up/down counter,
// and a DSC turns the counter value back into the output stream y. With
// unity gain (K = 1) the counter obeys dC/dt = Fclk (x - C/2^N), a
// first-order lag with
//   tau = 2^N / Fclk,  fc = Fclk / (2 pi 2^N),  G(s) = 1 / (1 + s tau).
// A gain factor K in the feedback path makes each negative error pulse
// step the counter down by K instead of 1, which gives
//   G(s) = (1/K) / (1 + s tau/K).
// The loop, the ADDER, the counter and the DSC follow the source design.
// How the factor K is applied (a down-step of K; a cancelled coincidence
// of x and y still counts as -(K-1)) is this design's reading of the
// source, which only places "a k factor in the feedback loop".
//
// Interface: x_i is one stochastic bit per clock. y_o is the output
// stream (combinational from registers). count_o is the digital output,
// value count_o/2^N. The pulse statistics below are for monitoring only.
// One clock of latency from an input pulse to the counter. Reset is
// asynchronous, active low; the counter resets to 0.
module sc_lp_stage
  import sc_pkg::*;
#(
  parameter int unsigned N = 14,
  parameter int unsigned K = 1,
  parameter logic [N-1:0] SEED = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x_i,
  output logic         y_o,
  output logic [N-1:0] count_o,
  output logic         err_up_o,   // counter stepped up this clock
  output logic         err_dn_o,   // counter stepped down this clock
  output logic         cancel_o,   // x and y pulsed together and cancelled
  output logic         sat_o       // counter step was clamped
);
  localparam int unsigned DW = $clog2(K + 1) + 2;

  sc_signed_t a, b, err;
  logic       cancel;
  logic signed [DW-1:0] delta;

  assign a = '{pulse: x_i, pos: SC_POS};
  assign b = '{pulse: y_o, pos: SC_NEG};

  sc_signed_adder u_add (
    .a_i      (a),
    .b_i      (b),
    .sum_o    (err),
    .cancel_o (cancel)
  );

  always_comb begin
    if (err.pulse && err.pos)       delta = DW'(1);
    else if (err.pulse)             delta = -DW'(K);
    else if (cancel)                delta = -DW'(K - 1);
    else                            delta = '0;
  end

  sc_updown_counter #(.WIDTH(N), .DW(DW), .INIT('0)) u_cnt (
    .clk     (clk),
    .rst_n   (rst_n),
    .delta_i (delta),
    .count_o (count_o),
    .sat_o   (sat_o)
  );

  sc_dsc #(.WIDTH(N), .SEED(SEED)) u_dsc (
    .clk     (clk),
    .rst_n   (rst_n),
    .value_i (count_o),
    .pulse_o (y_o)
  );

  assign err_up_o = delta > 0;
  assign err_dn_o = delta < 0;
  assign cancel_o = cancel;

  initial begin
    assert (K >= 1 && K < (1 << N))
      else $error("sc_lp_stage: gain factor K=%0d out of range", K);
  end
endmodule
