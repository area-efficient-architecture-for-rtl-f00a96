// tb_mq_prob_table: all 47 states against the table of the MQ coder as
// printed in the JPEG 2000 standard (held in the reference package).
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_mq_prob_table;
  import ebc_pkg::*;
  import ebc_ref_pkg::*;
  logic [5:0] idx;
  qe_entry_t e;
  int checks = 0, failures = 0;
  mq_prob_table dut (.*);
  initial begin
    for (int i = 0; i < 47; i++) begin
      idx = 6'(i);
      #1;
      checks++;
      if (int'(e.qe) != QE[i] || int'(e.nmps) != NMPS[i] || int'(e.nlps) != NLPS[i] ||
          int'(e.sw) != SWT[i]) begin
        failures++;
        $display("FAIL state %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
