// sfa_eqt: equivalence tester of the self-checking full adder.
//
// Eqt = NOT( (A xor B) | (A xor Cin) ): 1 exactly when the three full-adder
// inputs are all equal. The checker of the SFA uses it to decide whether sum
// and carry-out must agree (all inputs equal) or differ (otherwise).
// Purely combinational, no clock.
module sfa_eqt (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic eqt
);
  logic a_x_b, a_x_c;

  always_comb begin
    a_x_b = a ^ b;
    a_x_c = a ^ cin;
    eqt   = ~(a_x_b | a_x_c);
  end
endmodule
