// tb_sc_hp_filter: self-checking testbench of the first-order stochastic
// high-pass filter, run with 8-bit counters (tau = 255 clocks).
//
// Two filters, unity gain (K = 1) and K = 2, share one random input of
// density p = 0.6. The signed output is measured as the net pulse rate
// (positive pulses minus negative pulses per clock), which codes
// (x - lowpass)/2. Checked are
//   - every clock, that the output is the input pulse (positive) when
//     the select bit is high and the low-pass pulse (negative) otherwise;
//   - the select bit's density, 0.5;
//   - just after a step (first tau/10 clocks, averaged over 400 steps) the
//     output is close to p/2, the high-frequency gain 1 times 1/2;
//   - in steady state it is 0 for K = 1 and (K-1)/K * p/2 for K = 2,
//     the DC gains of G(s) = s tau/(1 + s tau) and ((K-1) + s tau)/(K + s tau).
module tb_sc_hp_filter;
  import sc_pkg::*;
  localparam int unsigned N = 8;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         x;
  sc_signed_t   h1, h2;
  logic         s1, s2, l1, l2;
  logic [N-1:0] c1, c2;
  int           checks = 0, failures = 0;
  int           p16;

  always #5 clk = ~clk;

  sc_hp_filter #(.N(N), .K(1), .SEED(N'(8'h3A))) dut1 (
    .clk(clk), .rst_n(rst_n), .x_i(x), .hp_o(h1), .sel_o(s1), .lp_y_o(l1), .lp_count_o(c1));
  sc_hp_filter #(.N(N), .K(2), .SEED(N'(8'hC5)), .SEL_SEED(16'h1D2B)) dut2 (
    .clk(clk), .rst_n(rst_n), .x_i(x), .hp_o(h2), .sel_o(s2), .lp_y_o(l2), .lp_count_o(c2));

  always @(posedge clk) x <= ($urandom % 65536) < p16;

  // structural check of the multiplexer, every clock
  int mux_err;
  always @(negedge clk) if (rst_n) begin
    if (h1.pulse !== (s1 ? x : l1) || (h1.pulse && h1.pos !== s1)) mux_err++;
    if (h2.pulse !== (s2 ? x : l2) || (h2.pulse && h2.pos !== s2)) mux_err++;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_near(input real got, input real exp, input real tol, input string what);
    checks++;
    $display("%s: %0.4f (expected %0.4f +- %0.3f)", what, got, exp, tol);
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int netv(sc_signed_t h);
    return h.pulse ? (h.pos ? 1 : -1) : 0;
  endfunction

  real n1, n2, sel_d;
  int  cyc;
  real p;

  initial begin
    mux_err = 0;
    p = 0.6;
    p16 = int'(p * 65536.0);
    x = 0;
    // right after a step
    // (input held at 0 until the low-pass counters are empty, then a step
    // to p; the LFSRs keep running so the select bits differ per step)
    n1 = 0; n2 = 0; cyc = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 400; r++) begin
      p16 = 0;
      repeat (5) @(posedge clk);
      wait (c1 == '0 && c2 == '0);
      // random extra delay, so the steps do not all start at the same
      // LFSR phase
      repeat (1 + $urandom % 1000) @(posedge clk);
      p16 = int'(p * 65536.0);
      @(posedge clk);
      repeat (25) begin
        @(negedge clk);
        n1 += netv(h1); n2 += netv(h2); cyc++;
      end
    end
    check_near(n1 / cyc, 0.95 * p / 2.0, 0.03, "K=1 output just after step");
    check_near(n2 / cyc, 0.90 * p / 2.0, 0.03, "K=2 output just after step");
    // steady state
    repeat (3000) @(posedge clk);
    n1 = 0; n2 = 0; sel_d = 0; cyc = 0;
    repeat (65535) begin
      @(negedge clk);
      n1 += netv(h1); n2 += netv(h2); sel_d += real'(s1); cyc++;
    end
    check_near(sel_d / cyc, 0.5, 0.002, "select density");
    check_near(n1 / cyc, 0.0, 0.02, "K=1 steady-state output");
    check_near(n2 / cyc, 0.5 * p / 2.0, 0.02, "K=2 steady-state output");
    checks++;
    if (mux_err != 0) begin
      failures++; $display("FAIL multiplexer output wrong in %0d clocks", mux_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
