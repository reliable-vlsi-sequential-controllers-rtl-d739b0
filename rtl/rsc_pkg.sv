// rsc_pkg: types and helper functions shared by the programmable sequential
// controller blocks.
//
// det_mode_e selects how the fault detector is built: as a single
// exclusive-or over the state variables (smallest) or as one more general
// binary-tree network identical to a state-variable circuit (least design
// effort). comb_mode_e selects the gate that merges the outputs of redundant
// fail-safe controllers: OR when the safe output value is 0, AND when it is 1.
// odd_parity() is the fault-state map of a distance-two (even parity) state
// assignment.
package rsc_pkg;

  typedef enum logic {
    DET_XOR = 1'b0,   // exclusive-or tree over the state variables
    DET_BTS = 1'b1    // replicated binary-tree network with constant inputs
  } det_mode_e;

  typedef enum logic {
    COMB_OR  = 1'b0,  // safe output value is 0
    COMB_AND = 1'b1   // safe output value is 1
  } comb_mode_e;

  // 1 when the state code has odd parity, i.e. is a fault state of an
  // even-parity state assignment.
  function automatic logic odd_parity(input int unsigned code, input int unsigned width);
    logic p;
    p = 1'b0;
    for (int unsigned b = 0; b < width; b++) p ^= code[b];
    return p;
  endfunction

endpackage
