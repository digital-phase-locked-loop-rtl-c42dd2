// jkff_pd: edge-triggered JK flip-flop phase detector.
//
// A rising edge of the DCO signal v2 sets the flip-flop (J), a rising edge
// of the reference v1 resets it (K); if both rise in the same cycle the
// flip-flop toggles, as a JK flip-flop does with J=K=1. The output is
// high from a v2 edge to the next v1 edge, so its duty cycle is the phase
// lead of v2 over v1 divided by 360 degrees and lock (50% duty) is at
// 180 degrees. This input assignment is this design's choice: with the
// K counter's convention (1 = count down = slow the DCO) it is the one
// that gives negative feedback. Without v1 edges (no reference) the
// flip-flop stays set, so a free-running loop drifts to the low end of
// its hold range.
//
// This is the alternative phase detector that the K counter loop filter
// accepts. The edges are detected synchronously: v1 and v2 are sampled
// on clk and an edge is a 0 in the previous sample and 1 in the current
// one, so q follows an input edge by one clock. rst_n (asynchronous,
// active low) clears q and the edge history.
module jkff_pd (
  input  logic clk,
  input  logic rst_n,
  input  logic v1,      // reference signal, drives K on its rising edge
  input  logic v2,      // DCO signal v2', drives J on its rising edge
  output logic q        // phase error
);

  logic v1_d, v2_d;
  logic j, k;

  always_comb begin
    j = v2 & ~v2_d;
    k = v1 & ~v1_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_d <= 1'b0;
      v2_d <= 1'b0;
      q    <= 1'b0;
    end else begin
      v1_d <= v1;
      v2_d <= v2;
      unique case ({j, k})
        2'b10:   q <= 1'b1;
        2'b01:   q <= 1'b0;
        2'b11:   q <= ~q;
        default: q <= q;
      endcase
    end
  end

endmodule
