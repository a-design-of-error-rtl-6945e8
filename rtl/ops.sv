// ops: one position of the output shifter.
//
// Picks the result bit of a logical bit position from the SFA at the same
// physical position (s_cur) or from the one above it (s_next). The select is
// the block's cumulative fault flag at that position: once a fault has been
// seen at or below it, the bit was computed one position higher because the
// input shifter moved the operands up. 0 selects s_cur, 1 selects s_next.
// Purely combinational.
module ops (
  input  logic s_cur,
  input  logic s_next,
  input  logic shift,   // cumulative fault flag at this position
  output logic s
);
  always_comb s = shift ? s_next : s_cur;
endmodule
