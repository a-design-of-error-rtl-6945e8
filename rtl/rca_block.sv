// rca_block: self-repairing ripple-carry block for the least significant
// bits of the hybrid adder.
//
// BITS logical bits are computed on BITS+1 physical RBL cells; the top cell is
// a hot-standby spare. Each cell's SFA checks itself. A cumulative fault flag
// runs up the block (OR of all errors at or below a cell). Above a faulty
// cell the input shifter (ips) hands every cell the operands of the cell
// below, the faulty cell's carry bypass passes its carry-in straight on, and
// the output shifter (ops) takes each result bit from one cell higher. With
// no fault the spare adds 0 + 0 and its result is not used. The block
// carry-out is the carry out of the cell that computed the top logical bit:
// cell BITS-1 without a fault, the spare otherwise (the output shifter is
// applied to it like to a sum bit).
//
// One fault per block is repaired; with two or more, the result may be wrong.
// fault_flag reports that some SFA of the block flagged an error, which is
// the block-level fault localization. Purely combinational.
module rca_block
  import hsa_pkg::*;
#(
  parameter int unsigned BITS = 8
) (
  input  logic [BITS-1:0] a,
  input  logic [BITS-1:0] b,
  input  logic            cin,
  input  sfa_fault_t      fault [BITS+1],   // test hook per physical cell
  output logic [BITS-1:0] sum,
  output logic            cout,
  output logic [BITS:0]   ef,               // error of each physical cell
  output logic            fault_flag
);
  localparam int unsigned CELLS = BITS + SPARES_PER_BLOCK;

  for (genvar p = 0; p < CELLS; p++) begin : g_cell
    logic a_cur, b_cur, a_prev, b_prev, shift_in, c_in;
    logic a_p, b_p, s, c, ef_own, ef_cum;

    // operands of this physical position and of the one below
    assign a_cur  = (p < BITS) ? a[p % BITS] : 1'b0;
    assign b_cur  = (p < BITS) ? b[p % BITS] : 1'b0;
    if (p == 0) begin : g_bottom
      assign a_prev   = 1'b0;
      assign b_prev   = 1'b0;
      assign shift_in = 1'b0;
      assign c_in     = cin;
    end else begin : g_upper
      assign a_prev   = a[p-1];
      assign b_prev   = b[p-1];
      assign shift_in = g_cell[p-1].ef_cum;
      assign c_in     = g_cell[p-1].c;
    end

    ips u_ips (.a_cur(a_cur), .b_cur(b_cur), .a_prev(a_prev), .b_prev(b_prev),
               .shift(shift_in), .a(a_p), .b(b_p));

    rbl u_rbl (.a(a_p), .b(b_p), .c_prev(c_in), .ef_prev(shift_in),
               .fault(fault[p]), .s(s), .c(c), .ef_own(ef_own), .ef_cum(ef_cum));

    assign ef[p] = ef_own;
  end

  // output shifter: logical bit j, plus the carry treated as bit BITS-1's
  // companion taken from the same cell
  for (genvar j = 0; j < BITS; j++) begin : g_out
    ops u_ops (.s_cur(g_cell[j].s), .s_next(g_cell[j+1].s),
               .shift(g_cell[j].ef_cum), .s(sum[j]));
  end

  ops u_ops_cout (.s_cur(g_cell[BITS-1].c), .s_next(g_cell[BITS].c),
                  .shift(g_cell[BITS-1].ef_cum), .s(cout));

  assign fault_flag = g_cell[CELLS-1].ef_cum;
endmodule
