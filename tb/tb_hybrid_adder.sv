// tb_hybrid_adder: end-to-end test of the 64-bit self-repairing hybrid adder
// at its default size (8 blocks of 8 bits, 9 SFAs per block).
//
// Each trial draws operands, a carry-in and a fault pattern with at most one
// detectable fault per block (random block subset, random cell, random fault
// kind). Expected results come from 65-bit integer addition. Checked in every
// trial: sum and carry-out, the per-SFA error vector (exactly the faulty
// SFAs) and the per-block fault flags. A last phase puts two faults into one
// block and checks only that both are localized.
//
// The mechanisms the adder relies on are counted, and each must occur:
// fault-free operation, repair in the ripple-carry block, repair in a
// carry-select block, a faulty initial cell (INL), a faulty spare, a false
// alarm from an equivalence tester, a repaired carry-select block selected by
// a carry-in of 1 (its X chain bypasses the faulty cell), a carry rippling
// through all 64 bits while faults are present, all eight blocks repaired at
// once, and a double fault localized.
module tb_hybrid_adder;
  import hsa_pkg::*;
  localparam int unsigned WIDTH = 64;
  localparam int unsigned BLK   = 8;
  localparam int unsigned NBLK  = WIDTH / BLK;
  localparam int unsigned CELLS = BLK + 1;

  logic [WIDTH-1:0]      a, b, sum;
  logic                  cin, cout;
  logic [NBLK*CELLS-1:0] ef;
  logic [NBLK-1:0]       blk_fault;
  sfa_fault_t            fault_inj [NBLK*CELLS];

  int checks = 0, failures = 0;

  typedef enum int {
    M_FAULT_FREE, M_RCA_REPAIR, M_CSEA_REPAIR, M_INL_FAULT, M_SPARE_FAULT,
    M_FALSE_ALARM, M_CSEA_CIN1_REPAIR, M_FULL_RIPPLE_FAULTY, M_ALL_BLOCKS,
    M_DOUBLE_LOCALIZED, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"fault-free", "rca repair", "csea repair",
    "inl fault", "spare fault", "false alarm", "csea cin=1 repair",
    "full ripple with faults", "all blocks repaired", "double fault localized"};

  hybrid_adder dut (.*);

  function automatic sfa_fault_t kind_to_fault(int k);
    case (k)
      0: return '{sum_flip: 1'b1, cout_flip: 1'b0, eqt_flip: 1'b0};
      1: return '{sum_flip: 1'b0, cout_flip: 1'b1, eqt_flip: 1'b0};
      2: return '{sum_flip: 1'b0, cout_flip: 1'b0, eqt_flip: 1'b1};
      default: return '{sum_flip: 1'b1, cout_flip: 1'b1, eqt_flip: 1'b1};
    endcase
  endfunction

  task automatic clear_faults();
    for (int k = 0; k < NBLK; k++)
      for (int p = 0; p < CELLS; p++) fault_inj[k*CELLS + p] = SFA_FAULT_NONE;
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mech[m]) mech[m] = 0;
    for (int n = 0; n < 20000; n++) begin
      logic [WIDTH:0]        ref_sum;
      logic [NBLK*CELLS-1:0] ef_exp;
      logic [NBLK-1:0]       blk_exp;
      logic                  any_eqt;
      int                    nfaulty;
      a   = {$urandom, $urandom};
      b   = {$urandom, $urandom};
      cin = 1'($urandom);
      if (n % 7 == 0) begin b = ~a; cin = 1'b1; end   // carry ripples through all bits
      clear_faults();
      ef_exp = '0; blk_exp = '0; any_eqt = 1'b0; nfaulty = 0;
      if (n % 16 != 0) begin
        for (int k = 0; k < NBLK; k++) begin
          if (n % 13 == 1 || $urandom_range(2) == 0) begin
            int p, kind;
            p    = int'($urandom_range(CELLS - 1));
            kind = int'($urandom_range(3));
            fault_inj[k*CELLS + p] = kind_to_fault(kind);
            ef_exp[k*CELLS + p] = 1'b1;
            blk_exp[k] = 1'b1;
            nfaulty++;
            if (kind == 2) any_eqt = 1'b1;
            if (p == 0 && k > 0) mech[M_INL_FAULT]++;
            if (p == CELLS - 1)  mech[M_SPARE_FAULT]++;
          end
        end
      end
      #1;
      ref_sum = {1'b0, a} + {1'b0, b} + (WIDTH+1)'(cin);
      // mechanism bookkeeping from the reference carries into each block
      if (nfaulty == 0) mech[M_FAULT_FREE]++;
      if (blk_exp[0]) mech[M_RCA_REPAIR]++;
      if (blk_exp[NBLK-1:1] != '0) mech[M_CSEA_REPAIR]++;
      if (any_eqt) mech[M_FALSE_ALARM]++;
      if (nfaulty == NBLK) mech[M_ALL_BLOCKS]++;
      if (nfaulty > 0 && b == ~a && cin) mech[M_FULL_RIPPLE_FAULTY]++;
      for (int k = 1; k < NBLK; k++) begin
        logic [WIDTH-1:0] mask;
        logic [WIDTH:0]   low;
        mask = (WIDTH'(1) << (k*BLK)) - WIDTH'(1);
        low  = {1'b0, a & mask} + {1'b0, b & mask} + (WIDTH+1)'(cin);
        if (blk_exp[k] && low[k*BLK]) mech[M_CSEA_CIN1_REPAIR]++;
      end
      checks += 3;
      if ({cout, sum} !== ref_sum) begin
        failures++;
        $display("FAIL sum a=%h b=%h cin=%0d blk=%b got %h exp %h", a, b, cin, blk_exp, {cout, sum}, ref_sum);
      end
      if (ef !== ef_exp) begin
        failures++;
        $display("FAIL ef got %h exp %h", ef, ef_exp);
      end
      if (blk_fault !== blk_exp) begin
        failures++;
        $display("FAIL blk_fault got %b exp %b", blk_fault, blk_exp);
      end
    end
    // two faults in one block: beyond repair, but localized
    for (int n = 0; n < 100; n++) begin
      int k, c1, c2;
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = 1'($urandom);
      clear_faults();
      k  = int'($urandom_range(NBLK - 1));
      c1 = int'($urandom_range(CELLS - 1));
      c2 = (c1 + 1 + int'($urandom_range(CELLS - 2))) % CELLS;
      fault_inj[k*CELLS + c1] = kind_to_fault(0);
      fault_inj[k*CELLS + c2] = kind_to_fault(1);
      #1;
      checks += 2;
      if (ef[k*CELLS + c1] && ef[k*CELLS + c2]) mech[M_DOUBLE_LOCALIZED]++;
      else begin failures++; $display("FAIL double fault not localized"); end
      if (blk_fault !== NBLK'(1) << k) begin failures++; $display("FAIL double fault blk_fault %b", blk_fault); end
    end
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-24s : %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism never exercised: %s", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
