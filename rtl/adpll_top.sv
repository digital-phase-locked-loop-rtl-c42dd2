// adpll_top: all-digital phase-locked loop.
//
// The reference square wave v1 is compared with the feedback v2' by a
// phase detector, whose output steers the DN/UP input of a K counter loop
// filter. The filter's Carry and Borrow outputs feed the increment and
// decrement inputs of an ID counter, which divides the ID clock by two and
// adds or deletes half an output cycle on each positive Carry/Borrow edge.
// A divide-by-N counter turns the ID counter's output into v2'. With the
// clock at 2N times the centre frequency f0 the loop runs free at f0;
// with the EX-OR detector it locks with v2' a quarter cycle away from v1,
// with the JK flip-flop detector half a cycle away.
//
// Interface: one clock clk serves as both the ID clock and the K clock;
// k_en is a clock enable that lowers the K clock rate (tie high for
// M = 2N). k_log2 sets K = 2**k_log2, n_div sets N, pd_sel picks the phase
// detector (0 = EX-OR, 1 = JK flip-flop). v1 must be synchronous to clk.
// The hold range is about +-f0 * M / (2 K N), i.e. +-f0/K with k_en high.
// Using one clock for both counters, the clock enable, the synchronous
// JK detector and the run-time selection are this design's choices; the
// block structure follows the described ADPLL.
module adpll_top #(
  parameter int unsigned KW_MAX = adpll_pkg::KW_MAX_DEFAULT,
  parameter int unsigned NW     = adpll_pkg::NW_DEFAULT
) (
  input  logic                        clk,      // ID clock and K clock, 2N * f0
  input  logic                        rst_n,    // asynchronous, active low
  input  logic                        k_en,     // K clock enable
  input  logic                        v1,       // reference square wave
  input  logic                        pd_sel,   // 0: EX-OR detector, 1: JK flip-flop detector
  input  logic [$clog2(KW_MAX+1)-1:0] k_log2,   // K modulus control, K = 2**k_log2
  input  logic [NW-1:0]               n_div,    // N control
  output logic                        v2,       // DCO output divided by N (v2')
  output logic                        pd_out,   // selected phase detector output (DN/UP)
  output logic                        xor_out,  // EX-OR detector output
  output logic                        jk_out,   // JK flip-flop detector output
  output logic                        carry,    // K counter carry
  output logic                        borrow,   // K counter borrow
  output logic                        id_out,   // ID counter output (IDout)
  output logic                        inc_p,    // one-clock pulse per positive Carry edge
  output logic                        dec_p     // one-clock pulse per positive Borrow edge
);

  import adpll_pkg::*;

  xor_pd u_xor_pd (
    .v1     (v1),
    .v2     (v2),
    .pd_out (xor_out)
  );

  jkff_pd u_jkff_pd (
    .clk   (clk),
    .rst_n (rst_n),
    .v1    (v1),
    .v2    (v2),
    .q     (jk_out)
  );

  always_comb pd_out = (pd_sel_e'(pd_sel) == PD_JKFF) ? jk_out : xor_out;

  k_counter #(.KW_MAX(KW_MAX)) u_k_counter (
    .clk    (clk),
    .rst_n  (rst_n),
    .k_en   (k_en),
    .dn_up  (pd_out),
    .k_log2 (k_log2),
    .carry  (carry),
    .borrow (borrow)
  );

  id_counter u_id_counter (
    .clk    (clk),
    .rst_n  (rst_n),
    .inc    (carry),
    .dec    (borrow),
    .id_out (id_out),
    .inc_p  (inc_p),
    .dec_p  (dec_p)
  );

  n_counter #(.NW(NW)) u_n_counter (
    .clk      (clk),
    .rst_n    (rst_n),
    .id_pulse (id_out),
    .n_div    (n_div),
    .v2       (v2)
  );

endmodule
