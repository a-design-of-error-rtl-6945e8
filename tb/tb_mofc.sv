// tb_mofc: test of the module of final carry-out. For random 8-bit operand
// pairs the testbench forms c0 (carry-out of a + b) and x (a + b is all ones),
// and checks that the module returns the carry-out of a + b + cin for both
// values of cin, computed by integer addition.
module tb_mofc;
  logic c0, x, cin, cout;
  int checks = 0, failures = 0;

  mofc dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] oa, ob;
      logic [8:0] r0, r;
      oa = 8'($urandom); ob = 8'($urandom);
      if (n % 4 == 0) ob = ~oa;             // make all-ones sums frequent
      r0  = {1'b0, oa} + {1'b0, ob};
      c0  = r0[8];
      x   = (r0[7:0] == 8'hFF);
      cin = n[2];
      #1;
      r = {1'b0, oa} + {1'b0, ob} + 9'(cin);
      checks++;
      if (cout !== r[8]) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0d got %0d", oa, ob, cin, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
