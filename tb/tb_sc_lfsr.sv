// tb_sc_lfsr: self-checking testbench of the LFSR random number generator.
//
// For every width from 3 to 16 it runs one LFSR and checks that the state
// is never zero, that it first returns to its seed after exactly
// 2^W - 1 clocks (maximal length) and that the top bit was high in
// exactly 2^(W-1) of those clocks (the p = 0.5 select bit). The default
// 14-bit instance is also checked clock by clock against a reference
// shift register built from its own tap list x^14 + x^5 + x^3 + x^1.
module tb_sc_lfsr;
  logic clk = 0;
  logic rst_n = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int LO = 3, HI = 16;
  int  period [LO:HI];
  int  ones   [LO:HI];
  bit  zero   [LO:HI];
  bit  done   [LO:HI];

  for (genvar w = LO; w <= HI; w++) begin : g_w
    logic [w-1:0] rnd;
    sc_lfsr #(.WIDTH(w), .SEED(w'(1))) u (.clk(clk), .rst_n(rst_n), .rnd_o(rnd));
    initial begin
      period[w] = 0; ones[w] = 0; zero[w] = 0; done[w] = 0;
      @(posedge rst_n);
      while (!done[w]) begin
        @(posedge clk); #1;
        period[w]++;
        if (rnd[w-1]) ones[w]++;
        if (rnd == '0) zero[w] = 1;
        if (rnd == w'(1)) done[w] = 1;
      end
    end
  end

  // default-size instance with a clock-by-clock reference
  logic [13:0] rnd14, ref14;
  sc_lfsr u14 (.clk(clk), .rst_n(rst_n), .rnd_o(rnd14));
  int mism = 0;
  always @(posedge clk) if (rst_n) begin
    ref14 <= {ref14[12:0], ref14[13] ^ ref14[4] ^ ref14[2] ^ ref14[0]};
  end

  initial begin
    ref14 = 14'd1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (20000) begin
      @(posedge clk); #1;
      checks++;
      if (rnd14 !== ref14) begin
        failures++;
        if (mism++ < 5) $display("FAIL 14-bit state %h, reference %h", rnd14, ref14);
      end
    end
    wait (done[HI]);
    for (int w = LO; w <= HI; w++) begin
      checks += 3;
      if (period[w] != (1 << w) - 1) begin
        failures++; $display("FAIL width %0d period %0d", w, period[w]);
      end
      if (ones[w] != (1 << (w - 1))) begin
        failures++; $display("FAIL width %0d top bit high %0d times", w, ones[w]);
      end
      if (zero[w]) begin
        failures++; $display("FAIL width %0d reached zero", w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
