// tb_id_counter: self-checking testbench for the ID counter (DCO).
//
// Every clock in which id_out is 1 is one IDout pulse. Without inc/dec
// activity consecutive pulses are 2 clocks apart (ID clock / 2). Each
// positive edge of inc must produce exactly one gap of 1 clock (half a
// cycle added) within 4 clocks of the edge, each positive edge of dec
// exactly one gap of 3 clocks (half a cycle deleted); all other gaps are
// 2. Levels that stay high must not act again, and inc_p/dec_p must be
// one clock wide. A last phase raises inc and dec together: both
// corrections happen and the total pulse count is unchanged.
module tb_id_counter;
  logic clk, rst_n, inc, dec, id_out, inc_p, dec_p;
  int checks = 0, failures = 0;
  int gap1 = 0, gap3 = 0, gapbad = 0, since = 0, pulses = 0, cycles = 0;
  int inc_edges = 0, dec_edges = 0, incp_cnt = 0, decp_cnt = 0;
  int last_inc = -100, last_dec = -100, late = 0;
  logic started;

  id_counter dut (.clk(clk), .rst_n(rst_n), .inc(inc), .dec(dec),
                  .id_out(id_out), .inc_p(inc_p), .dec_p(dec_p));

  initial begin clk = 1'b0; rst_n = 1'b0; inc = 1'b0; dec = 1'b0; started = 1'b0; end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: gaps between IDout pulses
  initial forever begin
    @(posedge clk);  // values of the cycle that is ending
    if (!rst_n) continue;
    cycles++;
    if (inc_p) incp_cnt++;
    if (dec_p) decp_cnt++;
    since++;
    if (id_out) begin
      pulses++;
      if (started) begin
        if (since == 1) begin
          gap1++;
          if (cycles - last_inc > 4) late++;
        end else if (since == 3) begin
          gap3++;
          if (cycles - last_dec > 5) late++;
        end else if (since != 2) gapbad++;
      end
      started = 1'b1;
      since = 0;
    end
  end

  task automatic pulse_in(input bit is_inc, input int width);
    @(negedge clk);
    if (is_inc) begin inc = 1; inc_edges++; last_inc = cycles; end
    else        begin dec = 1; dec_edges++; last_dec = cycles; end
    repeat (width) @(negedge clk);
    inc = 0; dec = 0;
  endtask

  initial begin
    int p0, c0;
    repeat (3) @(negedge clk);
    checks++;
    if (id_out !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    repeat (40) @(negedge clk);
    checks++;
    if (gap1 != 0 || gap3 != 0 || gapbad != 0) begin
      failures++; $display("FAIL free running gaps %0d %0d %0d", gap1, gap3, gapbad);
    end
    for (int i = 0; i < 30; i++) begin
      pulse_in(1'($urandom_range(0, 1)), $urandom_range(1, 12));
      repeat ($urandom_range(8, 20)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (gap1 != inc_edges || gap3 != dec_edges || gapbad != 0 || late != 0) begin
      failures++;
      $display("FAIL gaps: 1->%0d (inc %0d) 3->%0d (dec %0d) other %0d late %0d",
               gap1, inc_edges, gap3, dec_edges, gapbad, late);
    end
    checks++;
    if (incp_cnt != inc_edges || decp_cnt != dec_edges) begin
      failures++;
      $display("FAIL edge pulses %0d/%0d %0d/%0d", incp_cnt, inc_edges, decp_cnt, dec_edges);
    end
    // simultaneous increment and decrement: pulse count over 40 clocks unchanged
    p0 = pulses; c0 = cycles;
    @(negedge clk); inc = 1; dec = 1;
    repeat (5) @(negedge clk); inc = 0; dec = 0;
    repeat (34) @(negedge clk);
    checks++;
    if ((pulses - p0) != (cycles - c0) / 2) begin
      failures++;
      $display("FAIL inc+dec together: %0d pulses in %0d clocks", pulses - p0, cycles - c0);
    end
    checks++;
    if (gap1 != inc_edges + 1 || gap3 != dec_edges + 1) begin
      failures++; $display("FAIL inc+dec together: both corrections expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
