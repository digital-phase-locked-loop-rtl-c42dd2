// tb_adpll_top: end-to-end testbench of the all-digital PLL, run with the
// top's default parameters.
//
// The reference v1 comes from a 32-bit phase accumulator clocked by clk, so
// any frequency ratio to the centre frequency f0 = fclk/(2N) can be set.
// Each case resets the loop, lets it settle and then counts, over a
// measurement window, the rising edges of v1 and v2', the clocks in which
// the selected detector output (DN/UP) is 1, and the Carry and Borrow
// edges. The expected values come from the loop equations, not from the
// RTL:
//   free running (v1 held low): v2' makes one cycle per 2N clocks;
//   locked: v2' makes as many cycles as v1 (within 2), and the DN/UP duty
//     d satisfies (1 - 2d) * M / (2 N K) = f1/f0 - 1, M = K clock / f0;
//   outside the hold range f0 * M / (2 K N): v2' falls behind v1;
//   IDout: N pulses per v2' cycle, and (clocks + Carry edges - Borrow
//     edges) / 2, each edge moving IDout by half a cycle.
// Cases cover both detectors, positive and negative offsets, a reduced
// K clock (k_en), capture of a reference applied to the free-running
// loop, and the 4 kHz / 100 MHz operating point (N = 12500).
// Every mechanism (carry, borrow, lock, detector switch, K clock enable,
// free running, capture, loss of lock) is counted and must occur.
module tb_adpll_top;
  import adpll_pkg::*;

  localparam int KLW = $clog2(KW_MAX_DEFAULT + 1);

  logic clk, rst_n, k_en, v1, pd_sel;
  logic [KLW-1:0] k_log2;
  logic [NW_DEFAULT-1:0] n_div;
  logic v2, pd_out, xor_out, jk_out, carry, borrow, id_out, inc_p, dec_p;

  int checks = 0, failures = 0;
  int n_capture = 0, n_carry = 0, n_borrow = 0, n_lock = 0, n_jk = 0, n_ken = 0, n_free = 0, n_unlock = 0;

  adpll_top dut (
    .clk(clk), .rst_n(rst_n), .k_en(k_en), .v1(v1), .pd_sel(pd_sel),
    .k_log2(k_log2), .n_div(n_div), .v2(v2), .pd_out(pd_out),
    .xor_out(xor_out), .jk_out(jk_out), .carry(carry), .borrow(borrow),
    .id_out(id_out), .inc_p(inc_p), .dec_p(dec_p)
  );

  initial begin
    clk = 1'b0; rst_n = 1'b0; pd_sel = 1'b0;
    k_log2 = 3; n_div = 8;
  end
  always #5 clk = ~clk;   // 100 MHz

  initial begin : watchdog
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference generator and K clock enable divider
  logic [31:0] acc, acc_step;
  bit          v1_on;
  int          ken_div, ken_cnt;
  initial begin acc = '0; acc_step = '0; v1_on = 0; ken_div = 1; ken_cnt = 0; end
  always @(posedge clk) begin
    if (v1_on) acc <= acc + acc_step;
    ken_cnt <= (ken_cnt + 1 >= ken_div) ? 0 : ken_cnt + 1;
  end
  always_comb begin
    v1   = v1_on & acc[31];
    k_en = (ken_cnt == 0);
  end

  // measurement counters, sampled just before each rising edge
  int m_v1, m_v2, m_dn, m_clk, m_c, m_b, m_id, m_sel_bad, m_edge_bad;
  logic carry_q, borrow_q;
  logic v1_q, v2_q;
  bit meas;
  initial begin m_v1 = 0; m_v2 = 0; m_dn = 0; m_clk = 0; m_c = 0; m_b = 0; meas = 0; v1_q = 0; v2_q = 0;
    m_id = 0; m_sel_bad = 0; m_edge_bad = 0; carry_q = 0; borrow_q = 0; end
  initial forever begin
    @(posedge clk);
    if (meas) begin
      m_clk++;
      if (v1 && !v1_q) m_v1++;
      if (v2 && !v2_q) m_v2++;
      if (pd_out && k_en) m_dn++;
      if (inc_p) m_c++;
      if (dec_p) m_b++;
      if (id_out) m_id++;
      if (pd_out != (pd_sel ? jk_out : xor_out)) m_sel_bad++;
      if (xor_out != (v1 ^ v2)) m_sel_bad++;
      if (inc_p != (carry && !carry_q) || dec_p != (borrow && !borrow_q)) m_edge_bad++;
    end
    carry_q = carry;
    borrow_q = borrow;
    v1_q = v1;
    v2_q = v2;
  end

  // expect: 0 = free running, 1 = locked, 2 = not locked (out of hold range),
  //         3 = free running, then capture and lock without a reset
  task automatic run_case(input string name, input bit jk, input int kl, input int n,
                          input real ratio, input int kdiv, input int expect_mode,
                          input int settle_cyc, input int meas_cyc);
    real kmod, mm, d_exp, d_got;
    @(negedge clk);
    rst_n = 0; meas = 0; v1_on = 0; acc = '0;
    pd_sel = jk; k_log2 = KLW'(kl); n_div = NW_DEFAULT'(n); ken_div = kdiv;
    acc_step = 32'($rtoi(ratio * 4294967296.0 / (2.0 * n)));
    repeat (4) @(negedge clk);
    rst_n = 1;
    if (expect_mode == 3) begin
      // free running first, then the reference is applied without a reset.
      // The EX-OR detector then outputs v2' itself (50% duty): f0. The JK
      // detector is never reset without v1 edges, so DN/UP stays 1 and the
      // DCO runs at the bottom of the hold range, f0 * (1 - M/(2NK)).
      int r0, r_exp;
      r_exp = jk ? $rtoi(50.0 * (1.0 - (2.0 * n / kdiv) / (2.0 * n * (1 << kl))) + 0.5) : 50;
      r0 = 0; m_v2 = 0; meas = 1;
      repeat (50 * 2 * n) @(negedge clk);
      meas = 0; r0 = m_v2;
      checks++;
      if (r0 < r_exp - 1 || r0 > r_exp + 1) begin
        failures++; $display("FAIL %s: %0d free-running cycles before capture", name, r0);
      end else n_free++;
      n_capture++;
    end
    v1_on = (expect_mode != 0);
    repeat (settle_cyc * 2 * n) @(negedge clk);
    m_v1 = 0; m_v2 = 0; m_dn = 0; m_clk = 0; m_c = 0; m_b = 0; meas = 1;
    m_id = 0; m_sel_bad = 0; m_edge_bad = 0;
    repeat (meas_cyc * 2 * n) @(negedge clk);
    meas = 0;
    kmod = real'(1 << kl);
    mm = 2.0 * n / kdiv;
    d_got = real'(m_dn) / (real'(m_clk) / kdiv);
    d_exp = (1.0 - (ratio - 1.0) * 2.0 * n * kmod / mm) / 2.0;
    $display("%-28s v1=%0d v2=%0d dn_duty=%.3f (exp %.3f) carry=%0d borrow=%0d",
             name, m_v1, m_v2, d_got, d_exp, m_c, m_b);
    n_carry += m_c; n_borrow += m_b;
    if (jk) n_jk++;
    if (kdiv > 1) n_ken++;
    checks++;
    if (m_sel_bad != 0 || m_edge_bad != 0) begin
      failures++; $display("FAIL %s: detector select %0d / carry-borrow edge %0d mismatches",
                           name, m_sel_bad, m_edge_bad);
    end
    // IDout pulses: N per v2' cycle, and (clocks + carries - borrows) / 2
    checks++;
    if (m_id < n * m_v2 - n || m_id > n * m_v2 + n ||
        m_id < (m_clk + m_c - m_b) / 2 - 2 || m_id > (m_clk + m_c - m_b) / 2 + 2) begin
      failures++; $display("FAIL %s: %0d IDout pulses", name, m_id);
    end
    checks++;
    case (expect_mode)
      0: begin
        if (m_v2 < meas_cyc - 1 || m_v2 > meas_cyc + 1) begin
          failures++; $display("FAIL %s: free running %0d cycles, expected %0d", name, m_v2, meas_cyc);
        end else n_free++;
      end
      1, 3: begin
        if (m_v2 < m_v1 - 2 || m_v2 > m_v1 + 2) begin
          failures++; $display("FAIL %s: not locked", name);
        end else n_lock++;
        checks++;
        if (d_got < d_exp - 0.08 || d_got > d_exp + 0.08) begin
          failures++; $display("FAIL %s: DN/UP duty %.3f, expected %.3f", name, d_got, d_exp);
        end
      end
      default: begin
        if (m_v2 > m_v1 - 5) begin
          failures++; $display("FAIL %s: locked outside the hold range", name);
        end else n_unlock++;
      end
    endcase
  endtask

  task automatic need(input string what, input int cnt);
    checks++;
    if (cnt == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    // N = 8, K = 8, M = 2N: hold range +-f0/8
    run_case("free running",          0, 3, 8, 1.00, 1, 0, 20, 200);
    run_case("xor lock df=0",         0, 3, 8, 1.00, 1, 1, 100, 400);
    run_case("xor lock df=+5%",       0, 3, 8, 1.05, 1, 1, 100, 400);
    run_case("xor lock df=-5%",       0, 3, 8, 0.95, 1, 1, 100, 400);
    run_case("xor lock df=+10%",      0, 3, 8, 1.10, 1, 1, 100, 400);
    run_case("xor out of range +25%", 0, 3, 8, 1.25, 1, 2, 100, 400);
    run_case("jk lock df=0",          1, 3, 8, 1.00, 1, 1, 100, 400);
    run_case("jk lock df=+5%",        1, 3, 8, 1.05, 1, 1, 100, 400);
    run_case("jk lock df=-5%",        1, 3, 8, 0.95, 1, 1, 100, 400);
    run_case("capture from free run +8%", 0, 3, 8, 1.08, 1, 3, 100, 400);
    run_case("jk capture from free run -6%", 1, 3, 8, 0.94, 1, 3, 100, 400);
    run_case("xor K=16 N=32 df=+2%",  0, 4, 32, 1.02, 1, 1, 200, 400);
    run_case("xor k_en 1/2 df=+4%",   0, 3, 8, 1.04, 2, 1, 200, 400);
    run_case("xor k_en 1/2 df=+10%",  0, 3, 8, 1.10, 2, 2, 200, 400);
    // 4 kHz reference, 100 MHz clock: 2N = 25000
    run_case("4kHz/100MHz N=12500 +1%", 0, 3, 12500, 1.01, 1, 1, 60, 100);
    need("carry", n_carry);
    need("borrow", n_borrow);
    need("lock", n_lock);
    need("JK detector selected", n_jk);
    need("K clock enable below clk", n_ken);
    need("free running", n_free);
    need("capture after free running", n_capture);
    need("loss of lock outside hold range", n_unlock);
    $display("mechanisms: capture=%0d carry=%0d borrow=%0d lock=%0d jk=%0d k_en=%0d free=%0d unlock=%0d",
             n_capture, n_carry, n_borrow, n_lock, n_jk, n_ken, n_free, n_unlock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
