// tb_sc_updown_counter: self-checking testbench of the saturating up/down
// counter (6-bit value, 4-bit signed step for a short run).
//
// Random steps from -8 to +7, biased in turn up and down so that both
// rails are hit, are applied for several thousand clocks. A reference
// integer accumulator clamped to 0..63 is compared with the counter after
// every clock, and the saturation flag with the reference's clamping.
module tb_sc_updown_counter;
  localparam int unsigned W = 6;

  logic               clk = 0;
  logic               rst_n = 0;
  logic signed [3:0]  delta;
  logic [W-1:0]       count;
  logic               sat;
  int                 checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_updown_counter #(.WIDTH(W), .DW(4), .INIT(W'(20))) dut (
    .clk(clk), .rst_n(rst_n), .delta_i(delta), .count_o(count), .sat_o(sat)
  );

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_cnt, nxt, d, sat_lo, sat_hi;
  bit ref_sat;

  initial begin
    delta = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (count != W'(20)) begin failures++; $display("FAIL reset value %0d", count); end
    rst_n = 1;
    ref_cnt = 20; sat_lo = 0; sat_hi = 0;
    for (int c = 0; c < 5000; c++) begin
      d = int'($urandom % 16) - 8;
      if (((c / 300) % 2) == 0) d = d + 2; else d = d - 1;
      if (d > 7) d = 7;
      if (d < -8) d = -8;
      delta = 4'(d);
      nxt = ref_cnt + d;
      ref_sat = (nxt < 0) || (nxt > 63);
      #1;
      checks++;
      if (sat !== ref_sat) begin failures++; $display("FAIL sat flag c=%0d", c); end
      if (nxt < 0)  begin nxt = 0;  sat_lo++; end
      if (nxt > 63) begin nxt = 63; sat_hi++; end
      @(posedge clk); #1;
      ref_cnt = nxt;
      checks++;
      if (count != W'(ref_cnt)) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d count %0d ref %0d", c, count, ref_cnt);
      end
    end
    checks++;
    if (sat_lo == 0 || sat_hi == 0) begin
      failures++; $display("FAIL rails not reached: low %0d high %0d", sat_lo, sat_hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
