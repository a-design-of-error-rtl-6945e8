// tb_csea_block: self-checking test of csea_block with its default size.
//
// Each trial draws operands and carry-in (random, plus carry-propagating
// patterns) and a fault scenario: no fault, or one detectable fault in a
// random physical cell, spare included. A detectable fault inverts the sum,
// the carry, the equivalence tester (false alarm) or all three. The result
// must equal a + b + cin from integer addition in every such trial, the
// per-cell error vector must mark exactly the faulty cell, and fault_flag
// must be set exactly when a fault was injected. A final set of trials puts
// two faults into the block: the result is then not guaranteed, but both
// faulty cells must be reported. Every cell must have been faulted at least
// once with each kind of fault.
module tb_csea_block;
  import hsa_pkg::*;
  localparam int unsigned BITS  = 8;
  localparam int unsigned CELLS = BITS + 1;

  logic [BITS-1:0] a, b, sum;
  logic            cin, cout, fault_flag;
  logic [BITS:0]   ef;
  sfa_fault_t      fault [CELLS];
  int checks = 0, failures = 0;
  int hits [CELLS][4];

  csea_block #(.BITS(BITS)) dut (.*);

  // detectable fault kinds: odd number of inverted nodes
  function automatic sfa_fault_t kind_to_fault(int k);
    case (k)
      0: return '{sum_flip: 1'b1, cout_flip: 1'b0, eqt_flip: 1'b0};
      1: return '{sum_flip: 1'b0, cout_flip: 1'b1, eqt_flip: 1'b0};
      2: return '{sum_flip: 1'b0, cout_flip: 1'b0, eqt_flip: 1'b1};
      default: return '{sum_flip: 1'b1, cout_flip: 1'b1, eqt_flip: 1'b1};
    endcase
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_faults();
    for (int p = 0; p < CELLS; p++) fault[p] = SFA_FAULT_NONE;
  endtask

  initial begin
    foreach (hits[p, k]) hits[p][k] = 0;
    for (int n = 0; n < 20000; n++) begin
      logic [BITS:0] ref_sum;
      logic [BITS:0] ef_exp;
      int fcell, kind;
      a = BITS'($urandom); b = BITS'($urandom); cin = 1'($urandom);
      if (n % 5 == 0) b = ~a;                       // long carry propagation
      clear_faults();
      ef_exp = '0;
      if (n % 10 != 0) begin
        fcell = int'($urandom_range(CELLS - 1));
        kind = int'($urandom_range(3));
        fault[fcell] = kind_to_fault(kind);
        ef_exp[fcell] = 1'b1;
        hits[fcell][kind]++;
      end
      #1;
      ref_sum = {1'b0, a} + {1'b0, b} + (BITS+1)'(cin);
      checks += 3;
      if ({cout, sum} !== ref_sum) begin
        failures++;
        $display("FAIL sum a=%h b=%h cin=%0d ef=%b got %h exp %h", a, b, cin, ef_exp, {cout, sum}, ref_sum);
      end
      if (ef !== ef_exp) begin
        failures++;
        $display("FAIL ef a=%h b=%h got %b exp %b", a, b, ef, ef_exp);
      end
      if (fault_flag !== (ef_exp != '0)) begin
        failures++;
        $display("FAIL fault_flag");
      end
    end
    // two faults in the block: beyond repair, but both must be localized
    for (int n = 0; n < 200; n++) begin
      int c1, c2;
      a = BITS'($urandom); b = BITS'($urandom); cin = 1'($urandom);
      clear_faults();
      c1 = int'($urandom_range(CELLS - 1));
      c2 = (c1 + 1 + int'($urandom_range(CELLS - 2))) % CELLS;
      fault[c1] = kind_to_fault(0);
      fault[c2] = kind_to_fault(1);
      #1;
      checks += 2;
      if (!ef[c1] || !ef[c2]) begin failures++; $display("FAIL double fault not localized %0d %0d ef=%b", c1, c2, ef); end
      if (!fault_flag) begin failures++; $display("FAIL double fault flag"); end
    end
    foreach (hits[p, k]) begin
      checks++;
      if (hits[p][k] == 0) begin failures++; $display("FAIL cell %0d kind %0d never faulted", p, k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
