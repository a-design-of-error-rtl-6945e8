// tb_sfa: exhaustive self-checking test of the self-checking full adder.
// All 8 input combinations are run with each of the 8 fault-injection
// settings. Expected sum and carry come from integer addition, with the
// injected inversions applied. The checker must flag an error exactly when
// an odd number of the three internal nodes (sum, carry, equivalence tester)
// is inverted: one wrong output is always caught, a false alarm from the
// tester is reported, and inverting both sum and carry cancels out.
module tb_sfa;
  import hsa_pkg::*;
  logic a, b, cin, sum, cout, ef;
  sfa_fault_t fault;
  int checks = 0, failures = 0;

  sfa dut (.a(a), .b(b), .cin(cin), .fault(fault), .sum(sum), .cout(cout), .ef(ef));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 8; f++) begin
      for (int v = 0; v < 8; v++) begin
        int unsigned total;
        logic es, ec, ee;
        a = v[0]; b = v[1]; cin = v[2];
        fault = sfa_fault_t'(f[2:0]);
        #1;
        total = 32'(v[0]) + 32'(v[1]) + 32'(v[2]);
        es = total[0] ^ fault.sum_flip;
        ec = total[1] ^ fault.cout_flip;
        ee = fault.sum_flip ^ fault.cout_flip ^ fault.eqt_flip;
        checks += 3;
        if (sum !== es)  begin failures++; $display("FAIL sum v=%0d f=%0d", v, f);  end
        if (cout !== ec) begin failures++; $display("FAIL cout v=%0d f=%0d", v, f); end
        if (ef !== ee)   begin failures++; $display("FAIL ef v=%0d f=%0d got %0d", v, f, ef); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
