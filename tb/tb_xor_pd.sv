// tb_xor_pd: self-checking testbench for the EX-OR phase detector.
//
// Checks the truth table, then drives two square waves of period 2*HALF
// time steps with v2 lagging v1 by d steps (d = 0..2*HALF-1) and checks
// that the output is high for the expected number of steps per period:
// min(d, 2*HALF-d) * 2, i.e. duty = phase difference / 180 degrees.
module tb_xor_pd;
  localparam int HALF = 8;
  localparam int PER  = 2 * HALF;

  logic v1, v2, pd_out;
  int checks = 0, failures = 0;

  xor_pd dut (.v1(v1), .v2(v2), .pd_out(pd_out));

  function automatic logic sq(input int t);
    return ((t % PER) >= HALF);
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2; a++) begin
      for (int b = 0; b < 2; b++) begin
        v1 = 1'(a); v2 = 1'(b); #1;
        checks++;
        if (pd_out !== 1'(a != b)) begin
          failures++;
          $display("FAIL truth table v1=%0d v2=%0d out=%0d", a, b, pd_out);
        end
      end
    end
    for (int d = 0; d < PER; d++) begin
      automatic int high = 0;
      automatic int expect_high;
      for (int t = 0; t < PER; t++) begin
        v1 = sq(t + PER);
        v2 = sq(t + PER - d);
        #1;
        if (pd_out) high++;
      end
      expect_high = 2 * ((d <= HALF) ? d : PER - d);
      checks++;
      if (high != expect_high) begin
        failures++;
        $display("FAIL lag=%0d high=%0d expected=%0d", d, high, expect_high);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
