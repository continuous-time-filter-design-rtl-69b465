// sc_filter_top: stochastic-logic continuous-time filter system.
//
// The digital part of a mixed analog/stochastic filter board. An analog
// input is turned into a stochastic pulse stream by an analog-to-
// stochastic converter whose comparator and RC integrator are off chip
// (cmp_i in, asc_stream_o out); its N_ASC-bit digital half is here. The
// stream then runs through STAGES cascaded first-order stochastic
// low-pass stages (N_LP-bit counters), which together form a low-pass
// filter of order STAGES, and, side by side, through a first-order
// stochastic high-pass filter (N_HP-bit counter). Each stage's cutoff is
//   fc = Fclk / (2 pi 2^N)
// so at the reference 36 MHz clock the 14-bit stages cut off at about
// 350 Hz and the 8-bit converter at about 22 kHz.
// The converter/cascade arrangement, the 8-bit converter, the 14-bit
// filters and the fourth order follow the source design. Feeding the
// high-pass filter from the same converter output, and all LFSR seeds,
// are this design's own choices.
//
// Interface: all streams are one bit per clock; *_count_o are the
// counters, i.e. the digital outputs, value count/2^N. lp_stream_o[i] is
// the output of stage i+1; lp_stream_o[STAGES-1] is the filter output,
// which an external RC low-pass turns back into an analog voltage.
// hp_o is a signed stream (pulse and sign) coding (x - lowpass)/2.
// Reset is asynchronous, active low.
module sc_filter_top
  import sc_pkg::*;
#(
  parameter int unsigned N_ASC  = 8,
  parameter int unsigned N_LP   = 14,
  parameter int unsigned STAGES = 4,
  parameter int unsigned K_LP   = 1,
  parameter int unsigned N_HP   = 14,
  parameter int unsigned K_HP   = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // analog-to-stochastic converter, external comparator and RC
  input  logic                        cmp_i,
  output logic                        asc_stream_o,
  output logic [N_ASC-1:0]            asc_count_o,
  // low-pass cascade
  output logic [STAGES-1:0]           lp_stream_o,
  output logic [STAGES-1:0][N_LP-1:0] lp_count_o,
  // monitoring of the low-pass stages (one bit per stage)
  output logic [STAGES-1:0]           lp_up_o,
  output logic [STAGES-1:0]           lp_dn_o,
  output logic [STAGES-1:0]           lp_cancel_o,
  output logic [STAGES-1:0]           lp_sat_o,
  output logic                        asc_sat_o,
  // high-pass filter
  output sc_signed_t                  hp_o,
  output logic                        hp_sel_o,
  output logic [N_HP-1:0]             hp_lp_count_o
);
  logic [STAGES:0] chain;
  logic            hp_lp_y;

  sc_asc_digital #(.N(N_ASC), .SEED(N_ASC'(8'h5B))) u_asc (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmp_i    (cmp_i),
    .stream_o (asc_stream_o),
    .count_o  (asc_count_o),
    .sat_o    (asc_sat_o)
  );

  assign chain[0] = asc_stream_o;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    // Distinct seeds keep the stages' random sequences apart.
    localparam logic [N_LP-1:0] SEED_I = N_LP'(32'h1 + 32'h9E5 * (i + 1));
    sc_lp_stage #(.N(N_LP), .K(K_LP), .SEED(SEED_I)) u_lp (
      .clk      (clk),
      .rst_n    (rst_n),
      .x_i      (chain[i]),
      .y_o      (chain[i+1]),
      .count_o  (lp_count_o[i]),
      .err_up_o (lp_up_o[i]),
      .err_dn_o (lp_dn_o[i]),
      .cancel_o (lp_cancel_o[i]),
      .sat_o    (lp_sat_o[i])
    );
    assign lp_stream_o[i] = chain[i+1];
  end

  sc_hp_filter #(.N(N_HP), .K(K_HP), .SEED(N_HP'(32'h2C7F)), .SEL_SEED(16'hACE1)) u_hp (
    .clk        (clk),
    .rst_n      (rst_n),
    .x_i        (asc_stream_o),
    .hp_o       (hp_o),
    .sel_o      (hp_sel_o),
    .lp_y_o     (hp_lp_y),
    .lp_count_o (hp_lp_count_o)
  );
endmodule
