// tb_k_counter: self-checking testbench for the K counter loop filter.
//
// First replays the illustrated K=8 sequence: 8 K clocks with DN/UP=0,
// then 8 with DN/UP=1, checking that each counter advances only when
// selected and that Carry/Borrow are high exactly while their counter
// holds K/2..K-1. Then, for every K modulus 2..2**KW_MAX (and two
// out-of-range settings that must clamp), drives random DN/UP and clock
// enable and compares Carry/Borrow against a model that keeps the two
// counts as integers modulo K.
module tb_k_counter;
  localparam int unsigned KW = 6;

  logic clk, rst_n, k_en, dn_up, carry, borrow;
  logic [$clog2(KW+1)-1:0] k_log2;
  int checks = 0, failures = 0;
  int carry_rises = 0, borrow_rises = 0;

  k_counter #(.KW_MAX(KW)) dut (
    .clk(clk), .rst_n(rst_n), .k_en(k_en), .dn_up(dn_up),
    .k_log2(k_log2), .carry(carry), .borrow(borrow)
  );

  initial begin clk = 1'b0; rst_n = 1'b0; k_en = 1'b0; dn_up = 1'b0; k_log2 = 3; end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int up_m, dn_m, kmod;

  task automatic check(input string what);
    checks++;
    if (carry !== (up_m >= kmod / 2) || borrow !== (dn_m >= kmod / 2)) begin
      failures++;
      $display("FAIL %s K=%0d up=%0d dn=%0d carry=%0d borrow=%0d",
               what, kmod, up_m, dn_m, carry, borrow);
    end
  endtask

  task automatic step(input logic en, input logic dir);
    logic c0, b0;
    k_en = en; dn_up = dir;
    @(posedge clk);
    c0 = carry; b0 = borrow;
    if (en) begin
      if (dir) dn_m = (dn_m + 1) % kmod;
      else     up_m = (up_m + 1) % kmod;
    end
    @(negedge clk);
    if (!c0 && carry)  carry_rises++;
    if (!b0 && borrow) borrow_rises++;
  endtask

  initial begin
    up_m = 0; dn_m = 0; kmod = 8;
    repeat (2) @(negedge clk);
    check("reset");
    rst_n = 1;
    // illustrated sequence, K = 8
    for (int i = 0; i < 8; i++) begin step(1'b1, 1'b0); check("up phase"); end
    for (int i = 0; i < 8; i++) begin step(1'b1, 1'b1); check("down phase"); end
    checks++;
    if (carry_rises != 1 || borrow_rises != 1) begin
      failures++;
      $display("FAIL one Carry and one Borrow edge expected per K counts: %0d %0d",
               carry_rises, borrow_rises);
    end
    // every modulus, random stimulus
    for (int kl = 0; kl <= KW + 1; kl++) begin
      int kc;
      kc = (kl < 1) ? 1 : (kl > KW) ? KW : kl;
      rst_n = 0; @(negedge clk); rst_n = 1;
      k_log2 = ($clog2(KW+1))'(kl);
      kmod = 1 << kc; up_m = 0; dn_m = 0;
      carry_rises = 0; borrow_rises = 0;
      for (int i = 0; i < 40 * kmod; i++) begin
        step(1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 1)));
        check("random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
