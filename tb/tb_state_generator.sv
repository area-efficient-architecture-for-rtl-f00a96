// tb_state_generator: random magnitudes, signs and bit-planes; the expected
// state word is worked out bit by bit from the magnitude.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_state_generator;
  import ebc_pkg::*;
  logic [9:0] mag;
  logic sign;
  logic [3:0] plane;
  samp_t st;
  int checks = 0, failures = 0;
  state_generator dut (.*);
  initial begin
    for (int i = 0; i < 4000; i++) begin
      bit e_sig, e_sig1;
      mag   = 10'($urandom);
      if (i % 3 == 0) mag = mag >> ($urandom % 10);
      sign  = 1'($urandom);
      plane = 4'($urandom % 10);
      #1;
      e_sig = 0; e_sig1 = 0;
      for (int b = 0; b < 10; b++) begin
        if (b > plane && mag[b]) e_sig = 1;
        if (b > plane + 1 && mag[b]) e_sig1 = 1;
      end
      checks++;
      if (st.sig !== e_sig || st.gam !== (e_sig && !e_sig1) || st.mu !== mag[plane] ||
          st.sgn !== sign || st.rho !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL mag=%0d k=%0d got %b", mag, plane, st);
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
