// dpll_pkg - types shared by the blocks of the three-phase-comparator DPLL.
//
// The loop corrects its output phase in steps of Delta = pi/m (one period of
// the 2m*f0 oscillator) or n*Delta. A correction is requested by the decision
// block as a one-cycle step command; its direction comes from the random-walk
// filter (advance at count 2N, retard at count 0) and its size from comparing
// the accumulated comparator difference E with a threshold. The struct
// encoding below is this design's own choice.
package dpll_pkg;

  // One phase correction request, valid for a single clock cycle.
  typedef struct packed {
    logic valid;    // a correction is requested this cycle
    logic advance;  // 1: advance the output phase, 0: retard it
    logic big;      // 1: n*Delta (acquisition), 0: Delta (tracking)
  } step_cmd_t;

  localparam step_cmd_t STEP_NONE = '{valid: 1'b0, advance: 1'b0, big: 1'b0};

  // D = B' - C' takes the values -2, 0 and +2.
  typedef logic signed [2:0] d_val_t;

endpackage
