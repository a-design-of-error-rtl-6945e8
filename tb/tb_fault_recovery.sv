// tb_fault_recovery: fault-recovery rate of the 64-bit self-repairing adder.
//
// For r = 1, 2 and 3 simultaneous faults, PATTERNS random fault patterns are
// drawn: r distinct SFAs out of the 72, each with its sum output inverted.
// Each pattern is exercised with VECTORS random operand sets; it counts as
// recovered when every result equals the integer sum. Two rules are checked:
//  - a pattern whose faults all lie in different blocks must be recovered
//    (one spare per block);
//  - the measured recovery rate must lie within 0.03 of the probability that
//    r random faults fall into r different blocks, computed analytically as
//    prod_{i<r} (N*t - i*t) / (N*t - i) with N = 8 blocks of t = 9 SFAs.
// The rates are printed for comparison with the analysis.
module tb_fault_recovery;
  import hsa_pkg::*;
  localparam int unsigned WIDTH    = 64;
  localparam int unsigned BLK      = 8;
  localparam int unsigned NBLK     = WIDTH / BLK;
  localparam int unsigned CELLS    = BLK + 1;
  localparam int unsigned NSFA     = NBLK * CELLS;
  localparam int unsigned PATTERNS = 3000;
  localparam int unsigned VECTORS  = 24;

  logic [WIDTH-1:0]      a, b, sum;
  logic                  cin, cout;
  logic [NSFA-1:0]       ef;
  logic [NBLK-1:0]       blk_fault;
  sfa_fault_t            fault_inj [NBLK*CELLS];

  int checks = 0, failures = 0;

  hybrid_adder dut (.*);

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 1; r <= 3; r++) begin
      int  recovered;
      real p_analytic, rate;
      recovered  = 0;
      p_analytic = 1.0;
      for (int i = 0; i < r; i++)
        p_analytic = p_analytic * real'(NSFA - i*CELLS) / real'(NSFA - i);
      for (int n = 0; n < PATTERNS; n++) begin
        int  idx [3];
        int  per_blk [NBLK];
        bit  distinct, ok;
        foreach (per_blk[k]) per_blk[k] = 0;
        for (int k = 0; k < NBLK; k++)
          for (int p = 0; p < CELLS; p++) fault_inj[k*CELLS + p] = SFA_FAULT_NONE;
        for (int i = 0; i < r; i++) begin
          bit fresh;
          do begin
            idx[i] = int'($urandom_range(NSFA - 1));
            fresh = 1;
            for (int j = 0; j < i; j++) if (idx[j] == idx[i]) fresh = 0;
          end while (!fresh);
          fault_inj[idx[i]].sum_flip = 1'b1;
          per_blk[idx[i] / CELLS]++;
        end
        distinct = 1;
        foreach (per_blk[k]) if (per_blk[k] > 1) distinct = 0;
        ok = 1;
        for (int v = 0; v < VECTORS; v++) begin
          logic [WIDTH:0] ref_sum;
          a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = 1'($urandom);
          if (v % 4 == 0) b = ~a;
          #1;
          ref_sum = {1'b0, a} + {1'b0, b} + (WIDTH+1)'(cin);
          if ({cout, sum} !== ref_sum) ok = 0;
        end
        if (ok) recovered++;
        if (distinct) begin
          checks++;
          if (!ok) begin failures++; $display("FAIL r=%0d pattern %0d not recovered", r, n); end
        end
      end
      rate = real'(recovered) / real'(PATTERNS);
      $display("r=%0d faults: recovered %0d of %0d patterns, rate %0.4f, analytic %0.4f",
               r, recovered, PATTERNS, rate, p_analytic);
      checks++;
      if (rate < p_analytic - 0.03 || rate > p_analytic + 0.03) begin
        failures++;
        $display("FAIL r=%0d rate far from analysis", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
