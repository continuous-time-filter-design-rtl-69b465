// tb_sc_filter_full: full-size testbench of the filter system, with every
// parameter at its default (8-bit converter, four 14-bit low-pass stages,
// 14-bit high-pass filter) and a 36 MHz clock, the reference frequency
// at which the 14-bit stages cut off at Fclk/(2 pi 2^14), about 350 Hz.
//
// A behavioural RC integrator and comparator close the converter loop.
// The testbench applies
//   1. a DC input of 0.5: all counters must settle at half scale and the
//      high-pass output must average 0;
//   2. a 350 Hz sine and then a 50 Hz sine of amplitude 0.3 around 0.5:
//      each stage's amplitude and phase, relative to the stage before,
//      must match the first-order response 1/(1 + j f/fc), and the
//      high-pass output must match (j f/fc)/(1 + j f/fc) times the 1/2 of
//      its multiplexer. Amplitude and phase come from correlating each
//      signal with sine and cosine over whole input periods; stage 1 and
//      the high-pass filter are referred to the converter's output
//      stream, which is what they filter.
// About 2.7 million clocks in all.
`timescale 1ns / 1ps
module tb_sc_filter_full;
  import sc_pkg::*;

  localparam int unsigned STAGES = 4;
  localparam real FCLK   = 36.0e6;
  localparam real FS_ASC = 255.0;
  localparam real FS_LP  = 16383.0;
  localparam real PI     = 3.14159265358979;
  localparam real FC     = FCLK / (2.0 * PI * FS_LP);

  logic clk = 0;
  logic rst_n = 0;
  logic cmp, asc_stream, asc_sat, hp_sel;
  logic [7:0] asc_count;
  logic [STAGES-1:0] lp_stream, lp_up, lp_dn, lp_cancel, lp_sat;
  logic [STAGES-1:0][13:0] lp_count;
  sc_signed_t hp;
  logic [13:0] hp_lp_count;
  real vin, vrc;
  int  checks = 0, failures = 0;

  // 36 MHz: 27.778 ns period
  always #13.889 clk = ~clk;

  sc_filter_top dut (
    .clk(clk), .rst_n(rst_n), .cmp_i(cmp),
    .asc_stream_o(asc_stream), .asc_count_o(asc_count),
    .lp_stream_o(lp_stream), .lp_count_o(lp_count),
    .lp_up_o(lp_up), .lp_dn_o(lp_dn), .lp_cancel_o(lp_cancel), .lp_sat_o(lp_sat),
    .asc_sat_o(asc_sat),
    .hp_o(hp), .hp_sel_o(hp_sel), .hp_lp_count_o(hp_lp_count)
  );

  rc_comparator_model #(.RC_CYCLES(64)) u_afe (
    .clk(clk), .stream_i(asc_stream), .vin_i(vin), .cmp_o(cmp), .vrc_o(vrc)
  );

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_near(input real got, input real exp, input real tol, input string what);
    checks++;
    $display("%s: %0.4f (expected %0.4f +- %0.4f)", what, got, exp, tol);
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real wrap(input real d);
    real r = d;
    if (r > 180.0) r -= 360.0;
    if (r < -180.0) r += 360.0;
    return r;
  endfunction

  function automatic real sigval(input int i);
    if (i == 0)           return real'(asc_count) / FS_ASC;
    else if (i <= STAGES) return real'(lp_count[i-1]) / FS_LP;
    else if (i == STAGES + 1) return hp.pulse ? (hp.pos ? 1.0 : -1.0) : 0.0;
    else                  return asc_stream ? 1.0 : 0.0;
  endfunction

  real ms[STAGES+3], mc[STAGES+3];
  real amp[STAGES+3], ph[STAGES+3];

  // Sine of frequency f: settle for nset periods, measure over nmeas.
  task automatic run_sine(input real f, input int nset, input int nmeas);
    real per, t, sv, cv, g_exp, p_exp;
    int  c0, ctot;
    per  = FCLK / f;
    c0   = int'(per * real'(nset));
    ctot = int'(per * real'(nset + nmeas));
    foreach (ms[i]) begin ms[i] = 0.0; mc[i] = 0.0; end
    t = 0.0;
    for (int c = 0; c < ctot; c++) begin
      vin = 0.5 + 0.3 * $sin(2.0 * PI * t / per);
      @(negedge clk);
      if (c >= c0) begin
        sv = $sin(2.0 * PI * t / per);
        cv = $cos(2.0 * PI * t / per);
        for (int i = 0; i < STAGES + 3; i++) begin
          ms[i] += sigval(i) * sv;
          mc[i] += sigval(i) * cv;
        end
      end
      t += 1.0;
    end
    for (int i = 0; i < STAGES + 3; i++) begin
      amp[i] = 2.0 * $sqrt(ms[i] * ms[i] + mc[i] * mc[i]) / real'(ctot - c0);
      ph[i]  = $atan2(mc[i], ms[i]) * 180.0 / PI;
    end
    g_exp = 1.0 / $sqrt(1.0 + (f / FC) * (f / FC));
    p_exp = -$atan(f / FC) * 180.0 / PI;
    check_near(amp[0], 0.3, 0.02, $sformatf("%0.0f Hz: converter amplitude", f));
    // the converter's output stream is stage 1's input
    amp[0] = amp[STAGES+2];
    ph[0]  = ph[STAGES+2];
    check_near(amp[0], 0.3, 0.02, $sformatf("%0.0f Hz: converter stream amplitude", f));
    for (int i = 1; i <= STAGES; i++) begin
      check_near(amp[i] / amp[i-1], g_exp, 0.03, $sformatf("%0.0f Hz: stage %0d gain", f, i));
      check_near(wrap(ph[i] - ph[i-1]), p_exp, 3.0, $sformatf("%0.0f Hz: stage %0d phase", f, i));
    end
    check_near(amp[STAGES] / amp[0], g_exp ** STAGES, 0.03,
               $sformatf("%0.0f Hz: 4th-order gain", f));
    check_near(amp[STAGES+1] / amp[0], 0.5 * (f / FC) * g_exp, 0.02,
               $sformatf("%0.0f Hz: high-pass gain (with mux 1/2)", f));
    check_near(wrap(ph[STAGES+1] - ph[0]), 90.0 + p_exp, 6.0,
               $sformatf("%0.0f Hz: high-pass phase", f));
  endtask

  real acc[STAGES+2];

  initial begin
    vin = 0.5;
    $display("stage cutoff frequency %0.2f Hz", FC);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // 1. DC
    repeat (200000) @(posedge clk);
    foreach (acc[i]) acc[i] = 0.0;
    repeat (100000) begin
      @(negedge clk);
      for (int i = 0; i < STAGES + 2; i++) acc[i] += sigval(i);
    end
    check_near(acc[0] / 1.0e5, 0.5, 0.02, "DC: converter");
    for (int i = 1; i <= STAGES; i++)
      check_near(acc[i] / 1.0e5, 0.5, 0.02, $sformatf("DC: stage %0d", i));
    check_near(acc[STAGES+1] / 1.0e5, 0.0, 0.01, "DC: high-pass net rate");
    // 2. the two test frequencies
    run_sine(350.0, 4, 4);
    run_sine(50.0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
