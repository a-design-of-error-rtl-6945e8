// abl: adder block, one upper self-repairing bit of a carry-select block.
//
// Its SFA adds on the block's carry-in-0 carry chain. The sum for carry-in 1
// is s1 = s0 xor x_prev, where x_prev says whether all lower carry-in-0 sum
// bits of the block are 1 (a carry-in of 1 then ripples up to here). An AND
// gate extends the chain: x = x_prev & s0. The real block carry-in selects
// s0 or s1.
//
// Self-repair parts:
//  - input multiplexer: own operands, or those of the position below when
//    ef_prev is set;
//  - carry bypass (CBP): on an error the carry-out becomes the carry-in;
//  - sum bypass (SBP): on an error the sum bit entering the AND gate is
//    replaced by the error signal (1), so x = x_prev;
//  - OR gate: ef_cum = ef_own | ef_prev.
// Purely combinational.
module abl
  import hsa_pkg::*;
(
  input  logic       a_cur,
  input  logic       b_cur,
  input  logic       a_prev,
  input  logic       b_prev,
  input  logic       ef_prev,
  input  logic       c_prev,   // carry-in-0 carry from the position below
  input  logic       x_prev,   // X chain from the position below
  input  logic       cin_blk,  // actual carry-in of the block (select)
  input  sfa_fault_t fault,
  output logic       s,
  output logic       c,
  output logic       x,
  output logic       ef_own,
  output logic       ef_cum
);
  logic a, b, s0, s1, sfa_cout, sbp;

  ips u_ips (.a_cur(a_cur), .b_cur(b_cur), .a_prev(a_prev), .b_prev(b_prev),
             .shift(ef_prev), .a(a), .b(b));

  sfa u_sfa (.a(a), .b(b), .cin(c_prev), .fault(fault),
             .sum(s0), .cout(sfa_cout), .ef(ef_own));

  always_comb begin
    c      = ef_own ? c_prev : sfa_cout;  // CBP
    sbp    = ef_own ? ef_own : s0;        // SBP
    x      = x_prev & sbp;
    s1     = s0 ^ x_prev;
    s      = cin_blk ? s1 : s0;
    ef_cum = ef_own | ef_prev;
  end
endmodule
