// k_counter: K counter loop filter.
//
// Two independent counters, an "up" counter and a "down" counter, both
// counting upwards modulo K (contents 0..K-1, back to 0 after K-1). The
// DN/UP input chooses which one advances on an enabled K clock: DN/UP=1
// advances the down counter and freezes the up counter, DN/UP=0 advances
// the up counter and freezes the down counter. Carry is the MSB of the up
// counter and Borrow the MSB of the down counter, so each counter gives one
// rising edge of its output every K counts; those rising edges are what
// the ID counter reacts to.
//
// K = 2**k_log2 is chosen at run time by the K modulus control k_log2
// (1..KW_MAX); values outside that range are clamped. The counters are
// KW_MAX bits wide and masked to k_log2 bits, so the MSB taken as
// Carry/Borrow is bit k_log2-1. k_en is a clock enable that makes the
// K clock a sub-rate of clk (tie it high for K clock = clk). Carry and
// Borrow are registered bits and change one clock after the count that
// crosses K/2 or wraps. rst_n (asynchronous, active low) clears both
// counters; the reset value is this design's choice.
module k_counter #(
  parameter int unsigned KW_MAX = adpll_pkg::KW_MAX_DEFAULT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        k_en,    // K clock enable
  input  logic                        dn_up,   // 1: down counter, 0: up counter
  input  logic [$clog2(KW_MAX+1)-1:0] k_log2,  // K modulus control, K = 2**k_log2
  output logic                        carry,   // MSB of the up counter
  output logic                        borrow   // MSB of the down counter
);

  typedef logic [KW_MAX-1:0] cnt_t;

  cnt_t up_cnt, dn_cnt;
  cnt_t mask;
  int unsigned kl;

  always_comb begin
    kl = 32'(k_log2);
    if (kl < 1)      kl = 1;
    if (kl > KW_MAX) kl = KW_MAX;
    mask = cnt_t'((64'd1 << kl) - 64'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_cnt <= '0;
      dn_cnt <= '0;
    end else if (k_en) begin
      if (dn_up) dn_cnt <= (dn_cnt + cnt_t'(1)) & mask;
      else       up_cnt <= (up_cnt + cnt_t'(1)) & mask;
    end
  end

  always_comb begin
    carry  = up_cnt[kl-1];
    borrow = dn_cnt[kl-1];
  end

endmodule
