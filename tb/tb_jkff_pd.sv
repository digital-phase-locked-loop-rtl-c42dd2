// tb_jkff_pd: self-checking testbench for the JK flip-flop phase detector.
//
// v1 and v2 are square waves of PER clocks, v2 lagging v1 by d clocks.
// For d = 1..PER-1 the output must be high exactly PER-d clocks in every
// period (set by the v2 edge, cleared by the next v1 edge, both one clock
// late). For d = 0 both edges coincide and the flip-flop must toggle once
// per period. Also checks the reset value.
module tb_jkff_pd;
  localparam int PER = 16;

  logic clk, rst_n, v1, v2, q;
  int checks = 0, failures = 0;

  jkff_pd dut (.clk(clk), .rst_n(rst_n), .v1(v1), .v2(v2), .q(q));

  initial begin clk = 1'b0; rst_n = 1'b0; v1 = 1'b0; v2 = 1'b0; end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic sq(input int t);
    return ((t % PER) >= PER / 2);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset q=%0d", q); end
    @(negedge clk); rst_n = 1;
    for (int d = 0; d < PER; d++) begin
      automatic int high = 0;
      automatic int toggles = 0;
      automatic logic qprev = 1'b0;
      // settle two periods, then measure four
      for (int t = 0; t < 6 * PER; t++) begin
        @(negedge clk);
        if (t == 2 * PER) begin high = 0; toggles = 0; qprev = q; end
        if (t >= 2 * PER) begin
          if (q) high++;
          if (q != qprev) toggles++;
          qprev = q;
        end
        v1 = sq(t + PER);
        v2 = sq(t + PER - d);
      end
      checks++;
      if (d == 0) begin
        if (toggles != 4) begin
          failures++;
          $display("FAIL coincident edges: %0d toggles in 4 periods", toggles);
        end
      end else if (high != 4 * (PER - d)) begin
        failures++;
        $display("FAIL lag=%0d high=%0d expected=%0d", d, high, 4 * (PER - d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
