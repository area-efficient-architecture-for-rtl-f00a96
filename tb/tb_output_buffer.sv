// tb_output_buffer: random deliveries of 0..3 bytes within the reported room
// and a random out_ready, checked against a queue model, including the
// end-of-codeword flag on the last lane.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_output_buffer;
  import ebc_pkg::*;
  typedef struct packed { logic [7:0] b; pass_t p; logic l; } ent_t;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] in_nbytes;
  logic [2:0][7:0] in_bytes;
  pass_t in_pass, out_pass;
  logic in_last, empty, out_valid, out_ready, out_last;
  logic [2:0] free;
  logic [7:0] out_byte;
  ent_t model[$];
  int checks = 0, failures = 0, full = 0;
  output_buffer dut (.*);
  initial begin
    in_nbytes = 0; in_bytes = '0; in_pass = PASS_SPP; in_last = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      int ef, n;
      @(negedge clk);
      out_ready = ($urandom % 3) == 0;
      in_bytes  = 24'($urandom);
      in_pass   = pass_t'(1 + $urandom % 3);
      in_last   = 1'($urandom);
      #1;
      ef = 7 - model.size() + ((out_ready && model.size() > 0) ? 1 : 0);
      checks++;
      if (int'(free) != ef || out_valid != (model.size() > 0) || empty != (model.size() == 0) ||
          (model.size() > 0 && {out_byte, out_pass, out_last} !== model[0])) begin
        failures++;
        if (failures < 10) $display("FAIL it %0d", it);
      end
      if (model.size() == 7) full++;
      n = $urandom % 4;
      if (n > ef) n = ef;
      in_nbytes = 2'(n);
      @(posedge clk);
      if (out_ready && model.size() > 0) void'(model.pop_front());
      for (int k = 0; k < n; k++) model.push_back({in_bytes[k], in_pass, in_last && k == n - 1});
    end
    checks++;
    if (full == 0) failures++;
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
