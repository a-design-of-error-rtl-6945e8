// inl: initial block, the lowest self-repairing bit of a carry-select block.
//
// Its SFA adds with carry-in fixed at 0. The sum for carry-in 1 is simply the
// complement of the sum for carry-in 0, and the real block carry-in selects
// between them. It also starts the block's X chain: x reports whether the
// carry-in-0 sum bits so far are all 1.
//
// Self-repair parts, as for every bit of a block:
//  - input multiplexer: own operands, or those of the position below when
//    ef_prev is set (at the bottom of a block ef_prev is 0);
//  - carry bypass (CBP): on an error the carry-out becomes the carry-in (0);
//  - sum bypass (SBP): on an error the sum bit fed into the X chain is
//    replaced by the error signal (1), so the X chain passes through;
//  - OR gate: ef_cum = ef_own | ef_prev.
// Purely combinational.
module inl
  import hsa_pkg::*;
(
  input  logic       a_cur,
  input  logic       b_cur,
  input  logic       a_prev,
  input  logic       b_prev,
  input  logic       ef_prev,
  input  logic       cin_blk,  // actual carry-in of the block (select)
  input  sfa_fault_t fault,
  output logic       s,        // selected sum bit
  output logic       c,        // carry-in-0 carry to the position above
  output logic       x,        // X chain output
  output logic       ef_own,
  output logic       ef_cum
);
  logic a, b, s0, s1, sfa_cout, sbp;

  ips u_ips (.a_cur(a_cur), .b_cur(b_cur), .a_prev(a_prev), .b_prev(b_prev),
             .shift(ef_prev), .a(a), .b(b));

  sfa u_sfa (.a(a), .b(b), .cin(1'b0), .fault(fault),
             .sum(s0), .cout(sfa_cout), .ef(ef_own));

  always_comb begin
    c      = ef_own ? 1'b0 : sfa_cout;   // CBP, carry-in of an INL is 0
    sbp    = ef_own ? ef_own : s0;       // SBP
    x      = sbp;
    s1     = ~s0;
    s      = cin_blk ? s1 : s0;
    ef_cum = ef_own | ef_prev;
  end
endmodule
