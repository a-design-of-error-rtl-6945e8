// rbl: ripple block cell, one self-repairing bit of the ripple-carry block.
//
// An SFA plus the carry bypass (CBP) multiplexer and the fault-chain OR gate.
// When the SFA reports an error, its carry-out is replaced by its carry-in so
// the carry chain skips the faulty adder; its sum is discarded by the output
// shifter of the block. The OR gate forms the block's cumulative fault flag,
// ef_cum = ef_own | ef_prev, which steers the input and output shifters of
// the positions above. Operands arrive already shifted (see ips).
// Purely combinational.
module rbl
  import hsa_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic       c_prev,   // carry from the position below
  input  logic       ef_prev,  // cumulative fault flag from the position below
  input  sfa_fault_t fault,
  output logic       s,
  output logic       c,        // carry to the position above, after bypass
  output logic       ef_own,   // error of this SFA
  output logic       ef_cum    // cumulative fault flag up to this position
);
  logic sfa_cout;

  sfa u_sfa (.a(a), .b(b), .cin(c_prev), .fault(fault),
             .sum(s), .cout(sfa_cout), .ef(ef_own));

  always_comb begin
    c      = ef_own ? c_prev : sfa_cout;  // CBP
    ef_cum = ef_own | ef_prev;
  end
endmodule
