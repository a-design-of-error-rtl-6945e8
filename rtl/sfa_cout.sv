// sfa_cout: carry-out sub-module of the self-checking full adder.
//
// Cout = NOT( (A xnor Cin) & ~A  |  (A xor Cin) & ~B ).
// When A equals Cin the carry is A; otherwise it is B. The first stage forms
// A xor Cin, a second stage uses it to pass either ~A or ~B, and an output
// inverter gives the carry. Purely combinational, no clock.
module sfa_cout (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic cout
);
  logic a_x_c;   // first pass-transistor stage
  logic stage2;  // selected ~A or ~B, before the output inverter

  always_comb begin
    a_x_c  = a ^ cin;
    stage2 = (~a_x_c & ~a) | (a_x_c & ~b);
    cout   = ~stage2;
  end
endmodule
