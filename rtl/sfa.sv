// sfa: self-checking full adder.
//
// A full adder whose checker flags an error from its own inputs and outputs,
// independently of whether the incoming carry is itself right. It relies on
// the full-adder property: if A == B == Cin then Sum xor Cout == 0, otherwise
// Sum xor Cout == 1. The checker therefore computes
//   G1 = Sum xnor Cout,  Error (Ef) = G1 xor Eqt,
// which is 0 for a working adder and 1 when sum or carry is wrong.
//
// The three sub-modules (sfa_sum, sfa_cout, sfa_eqt) and the two checker gates
// follow the published structure. The fault-injection input is this design's
// own test hook: each bit of it inverts one sub-module output (see hsa_pkg).
// Purely combinational, no clock.
module sfa
  import hsa_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  sfa_fault_t fault,  // test hook, tie to SFA_FAULT_NONE in use
  output logic       sum,
  output logic       cout,
  output logic       ef      // 1: this SFA produced a wrong sum or carry
);
  logic sum_raw, cout_raw, eqt_raw, eqt;
  logic g1;

  sfa_sum  u_sum  (.a(a), .b(b), .cin(cin), .sum(sum_raw));
  sfa_cout u_cout (.a(a), .b(b), .cin(cin), .cout(cout_raw));
  sfa_eqt  u_eqt  (.a(a), .b(b), .cin(cin), .eqt(eqt_raw));

  always_comb begin
    sum  = sum_raw  ^ fault.sum_flip;
    cout = cout_raw ^ fault.cout_flip;
    eqt  = eqt_raw  ^ fault.eqt_flip;
    g1   = ~(sum ^ cout);
    ef   = g1 ^ eqt;
  end
endmodule
