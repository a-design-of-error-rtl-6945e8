// sfa_sum: sum sub-module of the self-checking full adder.
//
// Sum = NOT( (A xor B) xnor Cin ), which equals A xor B xor Cin. The circuit
// form follows the two-stage pass-transistor structure: a first stage forms
// A xor B, a second stage combines it with Cin into an XNOR, and an output
// inverter restores the sum. Here that structure is expressed as gates.
// Purely combinational, no clock.
module sfa_sum (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum
);
  logic a_x_b;   // first pass-transistor stage
  logic stage2;  // second stage, before the output inverter

  always_comb begin
    a_x_b  = a ^ b;
    stage2 = ~(a_x_b ^ cin);
    sum    = ~stage2;
  end
endmodule
