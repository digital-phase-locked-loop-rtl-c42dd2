// adpll_pkg: types and default sizes shared by the all-digital PLL.
//
// The loop is a phase detector, a K counter loop filter, an
// increment/decrement (ID) counter used as the DCO, and a divide-by-N
// feedback counter. Two phase detectors exist, an EX-OR gate (the main
// one) and an edge-triggered JK flip-flop; pd_sel_e names them.
// The counter widths below are this design's choice: they bound the
// largest K modulus (2**K_LOG2_W_MAX) and the largest N that the run-time
// controls can select.
package adpll_pkg;

  // Phase detector selection at the top level.
  typedef enum logic {
    PD_XOR  = 1'b0,  // EX-OR gate, locks at a 90 degree phase offset
    PD_JKFF = 1'b1   // edge-triggered JK flip-flop, locks at 180 degrees
  } pd_sel_e;

  // Width of the K counter registers: K may range up to 2**KW_MAX.
  localparam int unsigned KW_MAX_DEFAULT = 16;
  // Width of the divide-by-N counter: N may range up to 2**NW - 1.
  localparam int unsigned NW_DEFAULT = 16;

endpackage
