// tb_sc_asc_digital: self-checking testbench of the digital half of the
// analog-to-stochastic converter.
//
// Part 1 drives the comparator input directly with a random pattern and
// compares the counter, clock by clock, with a reference that delays the
// input by the two synchroniser stages and steps a clamped counter by
// +1/-1 (this also checks the three-clock latency and saturation at both
// ends). Part 2 closes the loop through a behavioural RC integrator and
// comparator and checks that the counter's mean settles at vin * 2^N
// within 8 counts (the RC and comparator model is idealised).
module tb_sc_asc_digital;
  localparam int unsigned N = 8;

  logic clk = 0;
  logic rst_n = 0;
  logic cmp_drv;
  logic use_model;
  logic cmp, cmp_model, stream, sat;
  logic [N-1:0] count;
  real  vin, vrc;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign cmp = use_model ? cmp_model : cmp_drv;

  sc_asc_digital #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .cmp_i(cmp),
    .stream_o(stream), .count_o(count), .sat_o(sat)
  );

  rc_comparator_model #(.RC_CYCLES(64)) u_afe (
    .clk(clk), .stream_i(stream), .vin_i(vin), .cmp_o(cmp_model), .vrc_o(vrc)
  );

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int ref_cnt;
  logic d1, d2;
  int sat_seen;
  real acc;
  int n;

  initial begin
    use_model = 0;
    cmp_drv   = 0;
    vin       = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Part 1: open loop, exact reference.
    ref_cnt = 128; d1 = 0; d2 = 0; sat_seen = 0;
    for (int c = 0; c < 4000; c++) begin
      // long runs of one level drive the counter into both rails
      if (c < 400)       cmp_drv = 1;
      else if (c < 900)  cmp_drv = 0;
      else               cmp_drv = ($urandom % 8) < ((c / 500) % 2 ? 6 : 2);
      @(posedge clk);
      // reference: counter uses the value of d2 before this edge
      ref_cnt = ref_cnt + (d2 ? 1 : -1);
      if (ref_cnt < 0)   begin ref_cnt = 0;   sat_seen++; end
      if (ref_cnt > 255) begin ref_cnt = 255; sat_seen++; end
      d2 = d1; d1 = cmp_drv;
      #1;
      check(count == N'(ref_cnt), $sformatf("open loop c=%0d count=%0d ref=%0d", c, count, ref_cnt));
    end
    check(sat_seen > 0, "saturation never reached");
    // Part 2: closed loop through the analog model.
    use_model = 1;
    foreach (vin_list[i]) begin
      vin = vin_list[i];
      repeat (3000) @(posedge clk);
      acc = 0.0; n = 0;
      repeat (20000) begin
        @(posedge clk);
        acc += real'(count);
        n++;
      end
      acc = acc / n;
      $display("vin=%0.3f mean count=%0.2f expected=%0.2f", vin, acc, vin * 255.0);
      check(acc > vin * 255.0 - 8.0 && acc < vin * 255.0 + 8.0,
            $sformatf("closed loop vin=%0.2f mean=%0.2f", vin, acc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real vin_list[4] = '{0.30, 0.70, 0.10, 0.55};
endmodule
