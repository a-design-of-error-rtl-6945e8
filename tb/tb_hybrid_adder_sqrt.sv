// tb_hybrid_adder_sqrt: the hybrid adder with block sizes growing by one
// from block to block (square-root arrangement): a 4-bit ripple-carry block
// followed by carry-select blocks of 5, 6, 7 and 8 bits, 30 bits in all.
//
// Each trial draws operands, a carry-in and at most one detectable fault per
// block, and checks the sum and carry-out against integer addition, the
// per-SFA error vector and the per-block fault flags. Every block must have
// been repaired at least once, and so must its spare.
module tb_hybrid_adder_sqrt;
  import hsa_pkg::*;
  localparam int unsigned NBLK  = 5;
  localparam int unsigned SIZES [NBLK] = '{4, 5, 6, 7, 8};
  localparam int unsigned WIDTH = 30;
  localparam int unsigned NSFA  = WIDTH + NBLK;

  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;
  logic [NSFA-1:0]  ef;
  logic [NBLK-1:0]  blk_fault;
  sfa_fault_t       fault_inj [NSFA];

  int checks = 0, failures = 0;
  int repaired [NBLK];
  int spare_hit [NBLK];

  hybrid_adder #(.WIDTH(WIDTH), .NBLK(NBLK), .BLK_BITS(SIZES)) dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (repaired[k]) begin repaired[k] = 0; spare_hit[k] = 0; end
    for (int n = 0; n < 20000; n++) begin
      logic [WIDTH:0]  ref_sum;
      logic [NSFA-1:0] ef_exp;
      logic [NBLK-1:0] blk_exp;
      int first;
      a = WIDTH'({$urandom, $urandom}); b = WIDTH'({$urandom, $urandom});
      cin = 1'($urandom);
      if (n % 6 == 0) b = ~a;
      foreach (fault_inj[i]) fault_inj[i] = SFA_FAULT_NONE;
      ef_exp = '0; blk_exp = '0;
      first = 0;                              // first SFA of the block
      for (int k = 0; k < NBLK; k++) begin
        if (n % 8 != 0 && $urandom_range(1) == 0) begin
          int p;
          p = int'($urandom_range(SIZES[k]));
          case ($urandom_range(2))
            0: fault_inj[first + p].sum_flip  = 1'b1;
            1: fault_inj[first + p].cout_flip = 1'b1;
            default: fault_inj[first + p].eqt_flip = 1'b1;
          endcase
          ef_exp[first + p] = 1'b1;
          blk_exp[k] = 1'b1;
          repaired[k]++;
          if (p == int'(SIZES[k])) spare_hit[k]++;
        end
        first += int'(SIZES[k]) + 1;
      end
      #1;
      ref_sum = {1'b0, a} + {1'b0, b} + (WIDTH+1)'(cin);
      checks += 3;
      if ({cout, sum} !== ref_sum) begin
        failures++;
        $display("FAIL sum a=%h b=%h cin=%0d ef=%b got %h exp %h", a, b, cin, ef_exp, {cout, sum}, ref_sum);
      end
      if (ef !== ef_exp) begin failures++; $display("FAIL ef got %b exp %b", ef, ef_exp); end
      if (blk_fault !== blk_exp) begin failures++; $display("FAIL blk_fault got %b exp %b", blk_fault, blk_exp); end
    end
    for (int k = 0; k < NBLK; k++) begin
      checks += 2;
      if (repaired[k] == 0)  begin failures++; $display("FAIL block %0d never repaired", k); end
      if (spare_hit[k] == 0) begin failures++; $display("FAIL spare of block %0d never faulted", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
