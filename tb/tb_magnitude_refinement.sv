// tb_magnitude_refinement: every neighbourhood with and without first
// refinement against the three refinement contexts.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_magnitude_refinement;
  import ebc_pkg::*;
  logic gam;
  logic [7:0] nsig;
  logic [3:0] cx;
  int checks = 0, failures = 0;
  magnitude_refinement dut (.*);
  initial begin
    for (int i = 0; i < 512; i++) begin
      int e;
      {gam, nsig} = 9'(i);
      e = 0;
      if (!gam) e = 2;
      else for (int b = 0; b < 8; b++) if (nsig[b]) e = 1;
      #1;
      checks++;
      if (int'(cx) != e) begin
        failures++;
        if (failures < 10) $display("FAIL gam %b nsig %b got %0d", gam, nsig, cx);
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
