// hsa_pkg: types and constants shared by the self-repairing hybrid adder.
//
// The adder is built from self-checking full adders (SFAs). Every SFA carries
// a small fault-injection hook so that a test can make it misbehave and watch
// the adder detect the fault and route around it. The hook is this design's
// own addition (the adder itself only needs the SFA's error output); in a
// product the hook inputs are tied to SFA_FAULT_NONE and synthesis removes
// the XOR gates they control.
package hsa_pkg;

  // One fault-injection control word per SFA. Each bit, when set, inverts
  // one internal node of the SFA:
  //   sum_flip  - the sum sub-module output
  //   cout_flip - the carry-out sub-module output
  //   eqt_flip  - the equivalence tester output (a false alarm: the adder
  //               bits are right but the checker reports an error)
  typedef struct packed {
    logic sum_flip;
    logic cout_flip;
    logic eqt_flip;
  } sfa_fault_t;

  localparam sfa_fault_t SFA_FAULT_NONE = '{sum_flip: 1'b0, cout_flip: 1'b0, eqt_flip: 1'b0};

  // Spare SFAs per block: the architecture provides exactly one hot-standby
  // SFA in every block, so one fault per block can be repaired.
  localparam int unsigned SPARES_PER_BLOCK = 1;

endpackage
