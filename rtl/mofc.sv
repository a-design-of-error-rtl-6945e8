// mofc: module of final carry-out of a carry-select block.
//
// The block computes its sums once, for carry-in 0. The carry-out for
// carry-in 1 differs from the carry-out for carry-in 0 only when every sum bit
// for carry-in 0 is 1, which is what x reports; so c1 = c0 xor x, and the
// block's real carry-in picks c0 or c1. Purely combinational.
module mofc (
  input  logic c0,    // block carry-out assuming carry-in 0
  input  logic x,     // AND of all block sum bits computed with carry-in 0
  input  logic cin,   // actual carry-in of the block
  output logic cout
);
  logic c1;
  always_comb begin
    c1   = c0 ^ x;
    cout = cin ? c1 : c0;
  end
endmodule
