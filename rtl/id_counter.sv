// id_counter: increment/decrement counter used as the digitally
// controlled oscillator.
//
// With no carry or borrow activity the ID counter divides the ID clock by
// two: an internal toggle flip-flop t flips on every clock and IDout is one
// clock-wide pulse each time t is 1, i.e. one pulse every two ID clocks.
// A positive edge on inc (carry from the loop filter) adds half an IDout
// cycle: the next time t is 1 it is held at 1 for one extra clock, so two
// IDout pulses follow one clock apart instead of two. A positive edge on
// dec (borrow) deletes half a cycle: the next time t is 0 it is held at 0
// for one extra clock, so three clocks pass between two IDout pulses.
// Each added pulse advances the divided-down output by 1/(2N) of a cycle,
// each deleted one retards it by the same amount.
//
// The edges of inc and dec are detected on clk (inc_p / dec_p, one clock
// wide) and remembered in a pending flag until the toggle flip-flop is in
// the state where it can be applied, so IDout shows the correction
// within two clocks of the edge. An increment
// and a decrement that are both pending are both applied in turn and cancel.
//
// id_out is t itself, a registered signal. Consecutive 1s are separate
// IDout pulses: the divide-by-N counter uses id_out as a count enable on
// the same clock. Everything is synchronous to clk, the ID clock
// (2N times the centre frequency); rst_n is asynchronous, active low.
// The toggle/hold mechanism is this design's choice of insides; the
// behaviour (divide by 2, add or delete half a cycle on a positive edge)
// is the specified one.
module id_counter (
  input  logic clk,      // ID clock, 2N * f0
  input  logic rst_n,
  input  logic inc,      // increment, connected to carry
  input  logic dec,      // decrement, connected to borrow
  output logic id_out,   // IDout pulse train, one clock-wide pulse per IDout cycle
  output logic inc_p,    // one-clock pulse on a rising edge of inc
  output logic dec_p     // one-clock pulse on a rising edge of dec
);

  logic inc_d, dec_d;
  logic inc_pend, dec_pend;
  logic t;
  logic hold_hi, hold_lo;

  always_comb begin
    inc_p   = inc & ~inc_d;
    dec_p   = dec & ~dec_d;
    hold_hi = inc_pend & t;    // add half a cycle: stay at 1 once more
    hold_lo = dec_pend & ~t;   // delete half a cycle: stay at 0 once more
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc_d    <= 1'b0;
      dec_d    <= 1'b0;
      inc_pend <= 1'b0;
      dec_pend <= 1'b0;
      t        <= 1'b0;
    end else begin
      inc_d    <= inc;
      dec_d    <= dec;
      inc_pend <= inc_p | (inc_pend & ~hold_hi);
      dec_pend <= dec_p | (dec_pend & ~hold_lo);
      if (!(hold_hi || hold_lo)) t <= ~t;
    end
  end

  always_comb id_out = t;

endmodule
