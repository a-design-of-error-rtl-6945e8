// csea_block: self-repairing carry-select block built on a single ripple
// chain.
//
// Instead of two ripple adders (one per assumed carry-in) the block adds once
// with carry-in 0. The INL at the bottom forms the sum for carry-in 1 as the
// complement of its carry-in-0 sum; every ABL above forms it as
// s0 xor X, where X (an AND chain) says whether all lower carry-in-0 sum bits
// are 1. The actual block carry-in selects in every bit, and the MOFC forms
// the block carry-out the same way.
//
// Self-repair: BITS logical bits sit on BITS+1 physical cells (INL + BITS
// ABLs), the top one a hot-standby spare. Every SFA checks itself; a
// cumulative fault flag runs up the block. Above a faulty cell the operands
// move up one cell, the faulty cell's carry bypass passes its carry on, its
// sum bypass makes the X chain skip it, and the output shifter (ops) takes
// each result bit from one cell higher. The carry-in-0 carry-out and the
// final X fed to the MOFC are shifted the same way (from cell BITS-1 without
// a fault, from the spare otherwise). With no fault the spare adds 0 + 0.
//
// One fault per block is repaired. fault_flag reports that some SFA of the
// block flagged an error. Purely combinational.
module csea_block
  import hsa_pkg::*;
#(
  parameter int unsigned BITS = 8
) (
  input  logic [BITS-1:0] a,
  input  logic [BITS-1:0] b,
  input  logic            cin,              // actual block carry-in
  input  sfa_fault_t      fault [BITS+1],   // test hook per physical cell
  output logic [BITS-1:0] sum,
  output logic            cout,
  output logic [BITS:0]   ef,
  output logic            fault_flag
);
  localparam int unsigned CELLS = BITS + SPARES_PER_BLOCK;

  for (genvar p = 0; p < CELLS; p++) begin : g_cell
    logic a_cur, b_cur, s, c, x, ef_own, ef_cum;

    assign a_cur = (p < BITS) ? a[p % BITS] : 1'b0;
    assign b_cur = (p < BITS) ? b[p % BITS] : 1'b0;

    if (p == 0) begin : g_inl
      inl u_inl (.a_cur(a_cur), .b_cur(b_cur), .a_prev(1'b0), .b_prev(1'b0),
                 .ef_prev(1'b0), .cin_blk(cin), .fault(fault[p]),
                 .s(s), .c(c), .x(x), .ef_own(ef_own), .ef_cum(ef_cum));
    end else begin : g_abl
      abl u_abl (.a_cur(a_cur), .b_cur(b_cur), .a_prev(a[p-1]), .b_prev(b[p-1]),
                 .ef_prev(g_cell[p-1].ef_cum), .c_prev(g_cell[p-1].c),
                 .x_prev(g_cell[p-1].x), .cin_blk(cin), .fault(fault[p]),
                 .s(s), .c(c), .x(x), .ef_own(ef_own), .ef_cum(ef_cum));
    end

    assign ef[p] = ef_own;
  end

  for (genvar j = 0; j < BITS; j++) begin : g_out
    ops u_ops (.s_cur(g_cell[j].s), .s_next(g_cell[j+1].s),
               .shift(g_cell[j].ef_cum), .s(sum[j]));
  end

  logic c0, x_top;
  ops u_ops_c0 (.s_cur(g_cell[BITS-1].c), .s_next(g_cell[BITS].c),
                .shift(g_cell[BITS-1].ef_cum), .s(c0));
  ops u_ops_x  (.s_cur(g_cell[BITS-1].x), .s_next(g_cell[BITS].x),
                .shift(g_cell[BITS-1].ef_cum), .s(x_top));

  mofc u_mofc (.c0(c0), .x(x_top), .cin(cin), .cout(cout));

  assign fault_flag = g_cell[CELLS-1].ef_cum;
endmodule
