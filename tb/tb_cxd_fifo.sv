// tb_cxd_fifo: random bursts of 0..4 pairs within the reported room and
// random pops, checked against a queue model (order, contents, free count).
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_cxd_fifo;
  import ebc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] in_count, free;
  pass_t in_pass;
  logic [3:0][4:0] in_cxd;
  logic out_valid, out_pop;
  cxd_t out;
  cxd_t model[$];
  int checks = 0, failures = 0, full4 = 0;
  cxd_fifo dut (.*);
  initial begin
    in_count = 0; in_pass = PASS_SPP; in_cxd = '0; out_pop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      int exp_free, n;
      @(negedge clk);
      out_pop  = ($urandom % 3) != 0;
      in_pass  = pass_t'(1 + $urandom % 3);
      in_cxd   = 20'($urandom);
      #1;
      exp_free = 4 - model.size() + ((out_pop && model.size() > 0) ? 1 : 0);
      checks++;
      if (int'(free) != exp_free || out_valid != (model.size() > 0) ||
          (model.size() > 0 && out !== model[0])) begin
        failures++;
        if (failures < 10) $display("FAIL it %0d free %0d/%0d", it, free, exp_free);
      end
      n = $urandom % (exp_free + 1);
      if (n == 4) full4++;
      in_count = 3'(n);
      @(posedge clk);
      if (out_pop && model.size() > 0) void'(model.pop_front());
      for (int k = 0; k < n; k++) model.push_back('{in_pass, in_cxd[k][4:1], in_cxd[k][0]});
    end
    checks++;
    if (full4 == 0) failures++;
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
