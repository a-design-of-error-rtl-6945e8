// tb_inl: exhaustive test of the initial block of a carry-select block.
// For every operand pair (own and lower position), incoming fault flag, block
// carry-in and fault-injection setting it checks: the operands used are the
// shifted ones when the incoming flag is set; the selected sum is the sum of
// the operands plus the block carry-in; the carry (carry-in 0) is the carry
// of the operands, or 0 when the SFA reports an error; the X output is the
// carry-in-0 sum, or 1 when the SFA reports an error.
module tb_inl;
  import hsa_pkg::*;
  logic a_cur, b_cur, a_prev, b_prev, ef_prev, cin_blk;
  logic s, c, x, ef_own, ef_cum;
  sfa_fault_t fault;
  int checks = 0, failures = 0;

  inl dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 8; f++) begin
      for (int v = 0; v < 64; v++) begin
        int unsigned t0, t;
        logic ua, ub, e_exp;
        {cin_blk, ef_prev, b_prev, a_prev, b_cur, a_cur} = v[5:0];
        fault = sfa_fault_t'(f[2:0]);
        #1;
        ua = v[4] ? v[2] : v[0];
        ub = v[4] ? v[3] : v[1];
        t0 = 32'(ua) + 32'(ub);
        t  = t0 + 32'(v[5]);
        e_exp = fault.sum_flip ^ fault.cout_flip ^ fault.eqt_flip;
        checks += 5;
        if (ef_own !== e_exp)          begin failures++; $display("FAIL ef_own f=%0d v=%0d", f, v); end
        if (ef_cum !== (e_exp | v[4])) begin failures++; $display("FAIL ef_cum f=%0d v=%0d", f, v); end
        if (c !== (e_exp ? 1'b0 : (t0[1] ^ fault.cout_flip)))
                                       begin failures++; $display("FAIL c f=%0d v=%0d", f, v); end
        if (x !== (e_exp ? 1'b1 : (t0[0] ^ fault.sum_flip)))
                                       begin failures++; $display("FAIL x f=%0d v=%0d", f, v); end
        if (s !== (t[0] ^ fault.sum_flip))
                                       begin failures++; $display("FAIL s f=%0d v=%0d", f, v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
