// tb_sc_signed_adder: exhaustive self-checking testbench of the signed
// stochastic ADDER.
//
// All 16 combinations of two pulses and two signs are applied. The
// reference adds the two pulses as integers (+1, -1 or 0 each): a zero
// sum gives no pulse, a non-zero sum a pulse with the sum's sign (a sum
// of 2 merges into one pulse, as a wired OR does). Cancellation is
// flagged when the two pulses have opposite signs.
module tb_sc_signed_adder;
  import sc_pkg::*;

  sc_signed_t a, b, s;
  logic       cancel;
  int         checks = 0, failures = 0;

  sc_signed_adder dut (.a_i(a), .b_i(b), .sum_o(s), .cancel_o(cancel));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int va, vb, sum;

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = '{pulse: i[0], pos: i[1]};
      b = '{pulse: i[2], pos: i[3]};
      #1;
      va  = a.pulse ? (a.pos ? 1 : -1) : 0;
      vb  = b.pulse ? (b.pos ? 1 : -1) : 0;
      sum = va + vb;
      checks++;
      if (s.pulse !== (sum != 0)) begin
        failures++; $display("FAIL pulse, inputs %b", i[3:0]);
      end
      if (sum != 0) begin
        checks++;
        if (s.pos !== (sum > 0)) begin
          failures++; $display("FAIL sign, inputs %b", i[3:0]);
        end
      end
      checks++;
      if (cancel !== (va * vb < 0)) begin
        failures++; $display("FAIL cancel, inputs %b", i[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
