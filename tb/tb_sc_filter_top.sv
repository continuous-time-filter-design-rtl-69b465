// tb_sc_filter_top: end-to-end self-checking testbench of the whole
// filter system, with 8-bit low-pass and high-pass counters (tau = 255
// clocks) so that it runs in seconds. The converter keeps its 8 bits and
// the cascade its four stages.
//
// A behavioural RC integrator and comparator close the analog-to-
// stochastic loop around the design. The testbench
//   1. applies a DC input of 0.6 and checks that the converter and all
//      four low-pass counters settle at 0.6 of full scale and that the
//      high-pass output averages 0 (no DC gain);
//   2. applies a sine at the stage cutoff frequency fc = Fclk/(2 pi 255)
//      and checks, by correlating each counter with sine and cosine over
//      whole periods, that every stage passes 1/sqrt(2) of the amplitude
//      of the previous one with a 45 degree lag, and that the high-pass
//      output also passes 1/sqrt(2) of the input, times the 1/2 of its
//      multiplexer, with a 45 degree lead;
//   3. drives the input beyond both rails so that the converter counter
//      saturates.
// It counts how often each mechanism occurs (converter comparator high
// and low, converter saturation, counter up and down steps and ADDER
// cancellations in every stage, both multiplexer selections and both
// signs of high-pass pulses) and fails for any that never happened.
// With unity gain a low-pass counter cannot saturate (its own feedback
// pulses cancel the input at full scale), so that is not counted.
module tb_sc_filter_top;
  import sc_pkg::*;

  localparam int unsigned N_ASC  = 8;
  localparam int unsigned N_LP   = 8;
  localparam int unsigned N_HP   = 8;
  localparam int unsigned STAGES = 4;
  localparam real FS_ASC = 255.0;
  localparam real FS_LP  = 255.0;
  localparam real PI     = 3.14159265358979;
  localparam real PERIOD = 2.0 * PI * FS_LP;   // clocks per period at fc

  logic clk = 0;
  logic rst_n = 0;
  logic cmp, asc_stream, asc_sat, hp_sel;
  logic [N_ASC-1:0] asc_count;
  logic [STAGES-1:0] lp_stream, lp_up, lp_dn, lp_cancel, lp_sat;
  logic [STAGES-1:0][N_LP-1:0] lp_count;
  sc_signed_t hp;
  logic [N_HP-1:0] hp_lp_count;
  real vin, vrc;
  int  checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_filter_top #(.N_ASC(N_ASC), .N_LP(N_LP), .STAGES(STAGES), .N_HP(N_HP)) dut (
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

  // mechanism counters
  int n_cmp_hi, n_cmp_lo, n_asc_sat, n_sel1, n_sel0, n_hp_pos, n_hp_neg;
  int n_up[STAGES], n_dn[STAGES], n_cn[STAGES];
  always @(negedge clk) if (rst_n) begin
    if (cmp) n_cmp_hi++; else n_cmp_lo++;
    if (asc_sat) n_asc_sat++;
    if (hp_sel) n_sel1++; else n_sel0++;
    if (hp.pulse &&  hp.pos) n_hp_pos++;
    if (hp.pulse && !hp.pos) n_hp_neg++;
    for (int i = 0; i < STAGES; i++) begin
      if (lp_up[i])     n_up[i]++;
      if (lp_dn[i])     n_dn[i]++;
      if (lp_cancel[i]) n_cn[i]++;
    end
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_near(input real got, input real exp, input real tol, input string what);
    checks++;
    $display("%s: %0.3f (expected %0.3f +- %0.3f)", what, got, exp, tol);
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check_cnt(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  // sine measurement: signals 0 = converter, 1..STAGES = stages, STAGES+1 = high-pass
  real ms[STAGES+2], mc[STAGES+2], mm[STAGES+2];
  real amp[STAGES+2], ph[STAGES+2];
  real acc[STAGES+1], hp_net;
  real t_clk, sv, cv, val;
  int  ncyc;

  initial begin
    vin = 0.6;
    for (int i = 0; i < STAGES; i++) begin n_up[i] = 0; n_dn[i] = 0; n_cn[i] = 0; end
    n_cmp_hi = 0; n_cmp_lo = 0; n_asc_sat = 0; n_sel1 = 0; n_sel0 = 0; n_hp_pos = 0; n_hp_neg = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. DC
    repeat (8000) @(posedge clk);
    foreach (acc[i]) acc[i] = 0.0;
    hp_net = 0.0;
    repeat (30000) begin
      @(negedge clk);
      acc[0] += real'(asc_count) / FS_ASC;
      for (int i = 0; i < STAGES; i++) acc[i+1] += real'(lp_count[i]) / FS_LP;
      hp_net += hp.pulse ? (hp.pos ? 1.0 : -1.0) : 0.0;
    end
    check_near(acc[0] / 30000.0, vin, 0.03, "DC: converter");
    for (int i = 0; i < STAGES; i++)
      check_near(acc[i+1] / 30000.0, vin, 0.04, $sformatf("DC: stage %0d", i + 1));
    check_near(hp_net / 30000.0, 0.0, 0.02, "DC: high-pass net rate");

    // 2. sine at fc
    t_clk = 0.0;
    ncyc = int'(PERIOD * 12.0);
    foreach (ms[i]) begin ms[i] = 0.0; mc[i] = 0.0; mm[i] = 0.0; end
    for (int c = 0; c < int'(PERIOD * 20.0); c++) begin
      vin = 0.5 + 0.3 * $sin(2.0 * PI * t_clk / PERIOD);
      @(negedge clk);
      if (c >= int'(PERIOD * 20.0) - ncyc) begin
        sv = $sin(2.0 * PI * t_clk / PERIOD);
        cv = $cos(2.0 * PI * t_clk / PERIOD);
        for (int i = 0; i < STAGES + 2; i++) begin
          if (i == 0)               val = real'(asc_count) / FS_ASC;
          else if (i <= STAGES)     val = real'(lp_count[i-1]) / FS_LP;
          else                      val = hp.pulse ? (hp.pos ? 1.0 : -1.0) : 0.0;
          ms[i] += val * sv; mc[i] += val * cv; mm[i] += val;
        end
      end
      t_clk += 1.0;
    end
    for (int i = 0; i < STAGES + 2; i++) begin
      amp[i] = 2.0 * $sqrt(ms[i] * ms[i] + mc[i] * mc[i]) / real'(ncyc);
      ph[i]  = $atan2(mc[i], ms[i]) * 180.0 / PI;
      $display("sine: signal %0d amplitude %0.4f phase %0.1f deg", i, amp[i], ph[i]);
    end
    check_near(amp[0], 0.3, 0.03, "sine: converter amplitude");
    for (int i = 1; i <= STAGES; i++) begin
      check_near(amp[i] / amp[i-1], 0.7071, 0.07, $sformatf("sine: stage %0d gain", i));
      val = ph[i] - ph[i-1];
      if (val > 180.0) val -= 360.0;
      if (val < -180.0) val += 360.0;
      check_near(val, -45.0, 8.0, $sformatf("sine: stage %0d phase", i));
    end
    check_near(amp[STAGES+1] / amp[0], 0.5 * 0.7071, 0.07, "sine: high-pass gain (with mux 1/2)");
    val = ph[STAGES+1] - ph[0];
    if (val > 180.0) val -= 360.0;
    if (val < -180.0) val += 360.0;
    check_near(val, 45.0, 15.0, "sine: high-pass phase");

    // 3. overdrive both rails
    vin = 1.2;
    repeat (3000) @(posedge clk);
    vin = -0.2;
    repeat (3000) @(posedge clk);

    check_cnt(n_cmp_hi, "comparator high");
    check_cnt(n_cmp_lo, "comparator low");
    check_cnt(n_asc_sat, "converter saturation");
    check_cnt(n_sel1, "high-pass select input");
    check_cnt(n_sel0, "high-pass select low-pass");
    check_cnt(n_hp_pos, "high-pass positive pulse");
    check_cnt(n_hp_neg, "high-pass negative pulse");
    for (int i = 0; i < STAGES; i++) begin
      check_cnt(n_up[i], $sformatf("stage %0d up step", i + 1));
      check_cnt(n_dn[i], $sformatf("stage %0d down step", i + 1));
      check_cnt(n_cn[i], $sformatf("stage %0d ADDER cancellation", i + 1));
    end
    $display("events: cmp hi %0d lo %0d, converter saturation %0d, sel %0d/%0d, hp +%0d -%0d",
             n_cmp_hi, n_cmp_lo, n_asc_sat, n_sel1, n_sel0, n_hp_pos, n_hp_neg);
    for (int i = 0; i < STAGES; i++)
      $display("events: stage %0d up %0d down %0d cancel %0d", i + 1, n_up[i], n_dn[i], n_cn[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
