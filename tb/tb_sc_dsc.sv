// tb_sc_dsc: self-checking testbench of the digital-to-stochastic
// converter at its default 14-bit width.
//
// Over one full LFSR period (2^14 - 1 clocks) every non-zero random
// number appears exactly once, so the number of output pulses for a held
// value v must be exactly v: the pulse probability is v/(2^14 - 1). The
// testbench checks that count for a set of values including both ends of
// the range, and that a value change takes effect in the same clock.
module tb_sc_dsc;
  localparam int unsigned W = 14;
  localparam int unsigned PERIOD = (1 << W) - 1;

  logic         clk = 0;
  logic         rst_n = 0;
  logic [W-1:0] value;
  logic         pulse;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_dsc dut (.clk(clk), .rst_n(rst_n), .value_i(value), .pulse_o(pulse));

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int values[8] = '{0, 1, 2, 1000, 4096, 8192, 12345, 16383};
  int cnt;

  initial begin
    value = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (values[i]) begin
      value = W'(values[i]);
      cnt = 0;
      repeat (PERIOD) begin
        #1;
        if (pulse) cnt++;
        @(posedge clk);
      end
      checks++;
      if (cnt != values[i]) begin
        failures++;
        $display("FAIL value %0d gave %0d pulses", values[i], cnt);
      end
    end
    // same-clock response: all-zero value never pulses, full scale always does
    repeat (50) begin
      value = '0;   #1; checks++; if (pulse)  failures++;
      value = '1;   #1; checks++; if (!pulse) failures++;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
