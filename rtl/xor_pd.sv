// xor_pd: EX-OR phase detector.
//
// The output is v1 XOR v2, where v1 is the reference square wave and v2 is
// the DCO feedback (v2'). For two square waves of equal frequency the
// output runs at twice that frequency and its duty cycle equals the phase
// difference divided by 180 degrees: 50% at quadrature, 0% in phase,
// 100% in anti-phase. The usable range is -90..+90 degrees around the
// quadrature lock point. The output drives DN/UP of the K counter.
//
// Purely combinational, no clock. Inputs are expected to be synchronous
// to the loop clock when the output feeds the K counter.
module xor_pd (
  input  logic v1,      // reference signal
  input  logic v2,      // DCO signal v2'
  output logic pd_out   // phase error, 1 while the inputs differ
);

  always_comb pd_out = v1 ^ v2;

endmodule
