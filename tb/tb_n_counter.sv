// tb_n_counter: self-checking testbench for the divide-by-N counter.
//
// For several N (including 0 and 1, which act as 2) drives random IDout
// pulses and checks v2 against the pulse count since reset: v2 must be
// 1 exactly when (count mod N) >= N/2, so v2 has one cycle per N pulses.
module tb_n_counter;
  localparam int unsigned NW = 8;

  logic clk, rst_n, id_pulse, v2;
  logic [NW-1:0] n_div;
  int checks = 0, failures = 0;

  n_counter #(.NW(NW)) dut (.clk(clk), .rst_n(rst_n), .id_pulse(id_pulse),
                            .n_div(n_div), .v2(v2));

  initial begin clk = 1'b0; rst_n = 1'b0; id_pulse = 1'b0; n_div = '0; end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nlist[] = '{0, 1, 2, 3, 5, 8, 13, 100, 255};

  initial begin
    foreach (nlist[j]) begin
      int n, cnt, rises;
      logic v2_prev;
      n = (nlist[j] < 2) ? 2 : nlist[j];
      rst_n = 0; n_div = NW'(nlist[j]);
      repeat (2) @(negedge clk);
      checks++;
      if (v2 !== 1'b0) begin failures++; $display("FAIL reset v2"); end
      rst_n = 1; cnt = 0; rises = 0; v2_prev = 1'b0;
      for (int i = 0; i < 20 * n + 50; i++) begin
        id_pulse = 1'($urandom_range(0, 2) != 0);
        @(negedge clk);
        if (id_pulse) cnt++;
        checks++;
        if (v2 !== 1'((cnt % n) >= n / 2)) begin
          failures++;
          $display("FAIL N=%0d pulses=%0d v2=%0d", n, cnt, v2);
        end
        if (v2 && !v2_prev) rises++;
        v2_prev = v2;
      end
      checks++;
      if (rises != (cnt + n - n / 2) / n) begin
        failures++;
        $display("FAIL N=%0d %0d rising edges for %0d pulses", n, rises, cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
