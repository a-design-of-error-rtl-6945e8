// tb_ips: exhaustive test of one input-shifter position. With shift 0 the
// own operand pair must come out, with shift 1 the pair of the lower position.
module tb_ips;
  logic a_cur, b_cur, a_prev, b_prev, shift, a, b;
  int checks = 0, failures = 0;

  ips dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {shift, b_prev, a_prev, b_cur, a_cur} = v[4:0];
      #1;
      checks += 2;
      if (a !== (v[4] ? v[2] : v[0])) begin failures++; $display("FAIL a v=%0d", v); end
      if (b !== (v[4] ? v[3] : v[1])) begin failures++; $display("FAIL b v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
