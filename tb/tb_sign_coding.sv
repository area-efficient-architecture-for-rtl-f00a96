// tb_sign_coding: all significance/sign combinations of the four direct
// neighbours and both signs, against table D.3 of JPEG 2000.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_sign_coding;
  import ebc_pkg::*;
  import ebc_ref_pkg::*;
  logic [3:0] nsig, nsgn;
  logic sgn;
  logic [3:0] cx;
  logic d;
  int checks = 0, failures = 0;
  sign_coding dut (.*);
  function automatic int c1(bit s, bit n);
    return s ? (n ? -1 : 1) : 0;
  endfunction
  initial begin
    for (int i = 0; i < 512; i++) begin
      int h, v, k;
      {sgn, nsig, nsgn} = 9'(i);
      h = c1(nsig[3], nsgn[3]) + c1(nsig[2], nsgn[2]);
      v = c1(nsig[1], nsgn[1]) + c1(nsig[0], nsgn[0]);
      h = (h > 0) ? 1 : (h < 0) ? -1 : 0;
      v = (v > 0) ? 1 : (v < 0) ? -1 : 0;
      k = 3 * (h + 1) + (v + 1);
      #1;
      checks++;
      if (int'(cx) != SCX[k] || int'(d) != (int'(sgn) ^ SXR[k])) begin
        failures++;
        if (failures < 10) $display("FAIL %b: cx %0d d %0d", i[8:0], cx, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
