// ips: one position of the input shifter.
//
// Hands an SFA either its own operand pair (a_cur, b_cur) or the pair of the
// position below it (a_prev, b_prev). The select is the block's cumulative
// fault flag from the position below: once any SFA lower in the block has
// reported an error, every SFA above it takes the operands of its lower
// neighbour, so the operands move up by one and the spare SFA at the top of
// the block absorbs the displaced bit. 0 selects the own pair, 1 the lower
// pair, as drawn in the published shifter. Purely combinational.
module ips (
  input  logic a_cur,
  input  logic b_cur,
  input  logic a_prev,
  input  logic b_prev,
  input  logic shift,   // cumulative fault flag of the position below
  output logic a,
  output logic b
);
  always_comb begin
    a = shift ? a_prev : a_cur;
    b = shift ? b_prev : b_cur;
  end
endmodule
