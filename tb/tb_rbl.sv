// tb_rbl: exhaustive test of the ripple block cell. All operand, carry and
// incoming fault-flag values are run with all fault-injection settings. A
// healthy cell must add; a cell whose SFA reports an error must pass its
// carry-in on unchanged (carry bypass); the cumulative flag must be the OR of
// its own error and the incoming flag.
module tb_rbl;
  import hsa_pkg::*;
  logic a, b, c_prev, ef_prev, s, c, ef_own, ef_cum;
  sfa_fault_t fault;
  int checks = 0, failures = 0;

  rbl dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 8; f++) begin
      for (int v = 0; v < 16; v++) begin
        int unsigned t;
        logic e_exp, s_exp, c_exp;
        {ef_prev, c_prev, b, a} = v[3:0];
        fault = sfa_fault_t'(f[2:0]);
        #1;
        t     = 32'(v[0]) + 32'(v[1]) + 32'(v[2]);
        e_exp = fault.sum_flip ^ fault.cout_flip ^ fault.eqt_flip;
        s_exp = t[0] ^ fault.sum_flip;
        c_exp = e_exp ? v[2] : (t[1] ^ fault.cout_flip);
        checks += 4;
        if (ef_own !== e_exp)          begin failures++; $display("FAIL ef_own f=%0d v=%0d", f, v); end
        if (ef_cum !== (e_exp | v[3])) begin failures++; $display("FAIL ef_cum f=%0d v=%0d", f, v); end
        if (s !== s_exp)               begin failures++; $display("FAIL s f=%0d v=%0d", f, v); end
        if (c !== c_exp)               begin failures++; $display("FAIL c f=%0d v=%0d", f, v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
