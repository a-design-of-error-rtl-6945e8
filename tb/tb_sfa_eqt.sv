// tb_sfa_eqt: exhaustive self-checking test of sfa_eqt.
// Drives all eight input combinations and compares the output with
// the all-inputs-equal flag computed arithmetically in the testbench.
module tb_sfa_eqt;
  logic a, b, cin, eqt;
  int checks = 0, failures = 0;

  sfa_eqt dut (.a(a), .b(b), .cin(cin), .eqt(eqt));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int unsigned ia, ib, ic, expv;
      ia = v & 1; ib = (v >> 1) & 1; ic = (v >> 2) & 1;
      a = ia[0]; b = ib[0]; cin = ic[0];
      #1;
      expv = (ia == ib && ib == ic) ? 1 : 0;
      checks++;
      if (eqt !== expv[0]) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: got %0d expected %0d", a, b, cin, eqt, expv[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
