// hybrid_adder: self-repairing hybrid carry-select adder (top level).
//
// WIDTH-bit adder split into NBLK blocks; block k holds BLK_BITS[k] bits,
// counted from the least significant end. The lowest block is a ripple-carry block (rca_block): for the least
// significant bits a carry-select stage would only add multiplexer delay. All
// higher blocks are single-ripple-chain carry-select blocks (csea_block); the
// carry-out of each block is the actual carry-in of the next. Every block
// holds one hot-standby spare self-checking full adder (SFA), BLK_BITS+1 SFAs
// in all, and repairs one fault by shifting operands and results past the
// faulty SFA, concurrently with normal operation and without a reset.
//
// Defaults: 64 bits in 8 blocks of 8 bits, i.e. 8 blocks of 9 full adders.
// Block sizes may also grow from block to block (m, m+1, m+2, ...), the
// square-root arrangement that balances the ripple delay inside a block
// against the select delay along the chain of blocks; BLK_BITS must then add
// up to WIDTH.
//
// Interface:
//   a, b, cin      operands and carry-in
//   fault_inj      per-SFA fault-injection hooks (test only; tie to
//                  SFA_FAULT_NONE), one per physical SFA
//   sum, cout      result
//   ef             error output of every physical SFA
// Physical SFAs are numbered block by block from the least significant end:
// block k owns SFAs sfa_base(k) .. sfa_base(k)+BLK_BITS[k], the last of them
// its spare; sfa_base(k) = (bits of the blocks below k) + k. With the default
// sizes this is k*9 + cell.
//   blk_fault      per block: some SFA of the block has flagged an error
// Purely combinational: results are valid one adder delay after the inputs.
module hybrid_adder
  import hsa_pkg::*;
#(
  parameter int unsigned WIDTH           = 64,
  parameter int unsigned NBLK            = 8,
  parameter int unsigned BLK_BITS [NBLK] = '{default: 8}
) (
  input  logic [WIDTH-1:0]      a,
  input  logic [WIDTH-1:0]      b,
  input  logic                  cin,
  input  sfa_fault_t            fault_inj [WIDTH+NBLK],
  output logic [WIDTH-1:0]      sum,
  output logic                  cout,
  output logic [WIDTH+NBLK-1:0] ef,
  output logic [NBLK-1:0]       blk_fault
);
  // first operand bit of block k
  function automatic int unsigned bit_base(int unsigned k);
    int unsigned s = 0;
    for (int unsigned i = 0; i < k; i++) s += BLK_BITS[i];
    return s;
  endfunction

  // first physical SFA of block k (each lower block adds one spare)
  function automatic int unsigned sfa_base(int unsigned k);
    return bit_base(k) + k;
  endfunction

  if (NBLK < 1 || bit_base(NBLK) != WIDTH) begin : g_bad_size
    $error("hybrid_adder: the block sizes BLK_BITS must add up to WIDTH");
  end

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned BITS  = BLK_BITS[k];
    localparam int unsigned LO    = bit_base(k);
    localparam int unsigned FLO   = sfa_base(k);

    logic            cin_k, cout_k, flag_k;
    logic [BITS-1:0] sum_k;
    logic [BITS:0]   ef_k;
    sfa_fault_t      fault_k [BITS+1];

    for (genvar p = 0; p <= BITS; p++) begin : g_fault
      assign fault_k[p] = fault_inj[FLO + p];
    end

    if (k == 0) begin : g_rca
      assign cin_k = cin;
      rca_block #(.BITS(BITS)) u_rca (
        .a(a[LO +: BITS]), .b(b[LO +: BITS]), .cin(cin_k),
        .fault(fault_k), .sum(sum_k), .cout(cout_k), .ef(ef_k),
        .fault_flag(flag_k));
    end else begin : g_csea
      assign cin_k = g_blk[k-1].cout_k;
      csea_block #(.BITS(BITS)) u_csea (
        .a(a[LO +: BITS]), .b(b[LO +: BITS]), .cin(cin_k),
        .fault(fault_k), .sum(sum_k), .cout(cout_k), .ef(ef_k),
        .fault_flag(flag_k));
    end

    assign sum[LO +: BITS]     = sum_k;
    assign ef[FLO +: BITS + 1] = ef_k;
    assign blk_fault[k]        = flag_k;
  end

  assign cout = g_blk[NBLK-1].cout_k;
endmodule
