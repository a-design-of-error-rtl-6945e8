// tb_sfa_sum: exhaustive self-checking test of sfa_sum.
// Drives all eight input combinations and compares the output with
// the sum bit of a full adder computed arithmetically in the testbench.
module tb_sfa_sum;
  logic a, b, cin, sum;
  int checks = 0, failures = 0;

  sfa_sum dut (.a(a), .b(b), .cin(cin), .sum(sum));

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
      expv = (ia + ib + ic) & 1;
      checks++;
      if (sum !== expv[0]) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: got %0d expected %0d", a, b, cin, sum, expv[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
