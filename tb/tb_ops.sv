// tb_ops: exhaustive test of one output-shifter position. With shift 0 the
// result of the own cell must come out, with shift 1 that of the cell above.
module tb_ops;
  logic s_cur, s_next, shift, s;
  int checks = 0, failures = 0;

  ops dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {shift, s_next, s_cur} = v[2:0];
      #1;
      checks++;
      if (s !== (v[2] ? v[1] : v[0])) begin failures++; $display("FAIL v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
