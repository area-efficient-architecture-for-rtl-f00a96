// tb_line_buffer: random writes and reads checked against an array model,
// including a read of the address written in the same cycle (old word).
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_line_buffer;
  import ebc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [5:0] waddr, raddr;
  samp_t wdata, rdata;
  samp_t model [64];
  int checks = 0, failures = 0;
  line_buffer dut (.*);
  initial begin
    we = 1;
    for (int a = 0; a < 64; a++) begin
      waddr = 6'(a); wdata = samp_t'($urandom); model[a] = wdata; raddr = 0;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); waddr = 6'($urandom); wdata = samp_t'($urandom);
      raddr = (i % 5 == 0) ? waddr : 6'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %b exp %b", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
