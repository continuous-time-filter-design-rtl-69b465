// tb_sc_lp_stage: self-checking testbench of the first-order stochastic
// low-pass stage, run with 8-bit counters (tau = 255 clocks) so that many
// time constants fit in a short simulation.
//
// Two stages share one random input stream: one with unity gain (K = 1)
// and one with gain factor K = 2. The testbench checks
//   - the one-clock latency from an input pulse to the counter;
//   - the step response, averaged over 40 runs from reset: the unity-gain
//     counter must reach 1 - 1/e of its final value after tau clocks and
//     the K = 2 counter after tau/2 clocks (G(s) = (1/K)/(1 + s tau/K));
//   - the steady-state mean, p * 255 for K = 1 and p * 255 / 2 for K = 2,
//     at two input densities;
//   - that up steps, down steps and cancellations all occurred.
// The expected values follow from the first-order model alone; the
// tolerances allow for the stochastic noise of the counters.
module tb_sc_lp_stage;
  localparam int unsigned N = 8;
  localparam real FS = 255.0;   // DSC full scale, 2^N - 1

  logic         clk = 0;
  logic         rst_n = 0;
  logic         x;
  logic         y1, y2;
  logic [N-1:0] c1, c2;
  logic         up1, dn1, cn1, st1, up2, dn2, cn2, st2;
  int           checks = 0, failures = 0;
  int           p16;    // input density, scaled by 65536

  always #5 clk = ~clk;

  sc_lp_stage #(.N(N), .K(1), .SEED(N'(8'h3A))) dut1 (
    .clk(clk), .rst_n(rst_n), .x_i(x), .y_o(y1), .count_o(c1),
    .err_up_o(up1), .err_dn_o(dn1), .cancel_o(cn1), .sat_o(st1));
  sc_lp_stage #(.N(N), .K(2), .SEED(N'(8'hC5))) dut2 (
    .clk(clk), .rst_n(rst_n), .x_i(x), .y_o(y2), .count_o(c2),
    .err_up_o(up2), .err_dn_o(dn2), .cancel_o(cn2), .sat_o(st2));

  // input stream: new random bit after every rising edge
  always @(posedge clk) x <= ($urandom % 65536) < p16;

  int n_up, n_dn, n_cn;
  always @(posedge clk) if (rst_n) begin
    n_up += int'(up1) + int'(up2);
    n_dn += int'(dn1) + int'(dn2);
    n_cn += int'(cn1) + int'(cn2);
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
    $display("%s: %0.2f (expected %0.2f +- %0.1f)", what, got, exp, tol);
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
  endtask

  real a1, a2, f1, f2, m1, m2;
  real p;

  initial begin
    n_up = 0; n_dn = 0; n_cn = 0;
    p16 = 0;
    x = 0;
    // latency: one input pulse moves the counter at the next edge
    do_reset();
    @(negedge clk);
    force x = 1'b1;
    @(posedge clk); #1;
    release x;
    checks++;
    if (c1 != N'(1) || c2 != N'(1)) begin
      failures++; $display("FAIL latency: counters %0d %0d after one pulse", c1, c2);
    end
    // step response, averaged
    p = 0.5;
    p16 = int'(p * 65536.0);
    a1 = 0; a2 = 0; f1 = 0; f2 = 0;
    for (int r = 0; r < 40; r++) begin
      do_reset();
      for (int t = 1; t <= 1500; t++) begin
        @(posedge clk); #1;
        if (t == 128) a2 += real'(c2);
        if (t == 255) a1 += real'(c1);
        if (t == 1500) begin f1 += real'(c1); f2 += real'(c2); end
      end
    end
    check_near(a1 / 40.0, 0.632 * p * FS,       6.0, "K=1 count after tau");
    check_near(a2 / 40.0, 0.632 * p * FS / 2.0, 7.0, "K=2 count after tau/2");
    check_near(f1 / 40.0, p * FS,               5.0, "K=1 count after 6 tau");
    check_near(f2 / 40.0, p * FS / 2.0,         4.0, "K=2 count after 6 tau");
    // steady state at two densities
    foreach (plist[i]) begin
      p = plist[i];
      p16 = int'(p * 65536.0);
      repeat (3000) @(posedge clk);
      m1 = 0; m2 = 0;
      repeat (20000) begin
        @(posedge clk); #1;
        m1 += real'(c1); m2 += real'(c2);
      end
      check_near(m1 / 20000.0, p * FS,       5.0, $sformatf("K=1 mean at p=%0.2f", p));
      check_near(m2 / 20000.0, p * FS / 2.0, 5.0, $sformatf("K=2 mean at p=%0.2f", p));
    end
    checks++;
    if (n_up == 0 || n_dn == 0 || n_cn == 0) begin
      failures++; $display("FAIL events: up %0d down %0d cancel %0d", n_up, n_dn, n_cn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real plist[2] = '{0.3, 0.9};
endmodule
