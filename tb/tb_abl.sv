// tb_abl: exhaustive test of the adder block of a carry-select block.
// x_prev = 1 means that all lower carry-in-0 sum bits are 1, so a block
// carry-in of 1 reaches this bit: the selected sum must then be the
// carry-in-0 sum plus one (mod 2), and the sum itself otherwise. The carry
// (carry-in 0) must be the SFA carry, or the incoming carry on an error; X
// must be x_prev AND the carry-in-0 sum, or x_prev on an error.
module tb_abl;
  import hsa_pkg::*;
  logic a_cur, b_cur, a_prev, b_prev, ef_prev, c_prev, x_prev, cin_blk;
  logic s, c, x, ef_own, ef_cum;
  sfa_fault_t fault;
  int checks = 0, failures = 0;

  abl dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 8; f++) begin
      for (int v = 0; v < 256; v++) begin
        int unsigned t0;
        logic ua, ub, e_exp, s0, ripple;
        {cin_blk, x_prev, c_prev, ef_prev, b_prev, a_prev, b_cur, a_cur} = v[7:0];
        fault = sfa_fault_t'(f[2:0]);
        #1;
        ua = v[4] ? v[2] : v[0];
        ub = v[4] ? v[3] : v[1];
        t0 = 32'(ua) + 32'(ub) + 32'(v[5]);
        e_exp  = fault.sum_flip ^ fault.cout_flip ^ fault.eqt_flip;
        s0     = t0[0] ^ fault.sum_flip;
        ripple = v[7] & v[6];               // block carry-in 1 reaches this bit
        checks += 5;
        if (ef_own !== e_exp)          begin failures++; $display("FAIL ef_own f=%0d v=%0d", f, v); end
        if (ef_cum !== (e_exp | v[4])) begin failures++; $display("FAIL ef_cum f=%0d v=%0d", f, v); end
        if (c !== (e_exp ? v[5] : (t0[1] ^ fault.cout_flip)))
                                       begin failures++; $display("FAIL c f=%0d v=%0d", f, v); end
        if (x !== (e_exp ? v[6] : (v[6] & s0)))
                                       begin failures++; $display("FAIL x f=%0d v=%0d", f, v); end
        if (s !== (s0 ^ ripple))       begin failures++; $display("FAIL s f=%0d v=%0d", f, v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
