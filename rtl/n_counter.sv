// n_counter: divide-by-N counter in the feedback path.
//
// Counts IDout pulses modulo N and produces the square wave v2' that goes
// back to the phase detector: v2 is 0 while the count is below N/2
// (rounded down) and 1 from there to N-1, so the rising edge of v2 comes
// with the count reaching N/2 and v2 has exactly one cycle per N IDout
// pulses. N is set at run time by the N control input n_div (2..2**NW-1;
// 0 and 1 are treated as 2).
//
// id_pulse is a count enable on clk: every clock in which it is 1 is one
// IDout pulse. v2 is registered and changes on the clock edge that counts
// the pulse. rst_n (asynchronous, active low) clears the count and v2.
// The count direction, the duty cycle split and the reset value are this
// design's choices.
module n_counter #(
  parameter int unsigned NW = adpll_pkg::NW_DEFAULT
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          id_pulse,  // IDout, one pulse per clock it is high
  input  logic [NW-1:0] n_div,     // N control
  output logic          v2         // divided output v2'
);

  logic [NW-1:0] n_eff, half, cnt, cnt_next;

  always_comb begin
    n_eff    = (n_div < NW'(2)) ? NW'(2) : n_div;
    half     = n_eff >> 1;
    cnt_next = (cnt >= n_eff - NW'(1)) ? '0 : cnt + NW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      v2  <= 1'b0;
    end else if (id_pulse) begin
      cnt <= cnt_next;
      v2  <= (cnt_next >= half);
    end
  end

endmodule
