// tb_arith_encoder: random pairs of all three passes with random output
// room (so stage 2 stalls), several codewords per pass separated by flushes,
// context states carried across them.  The bytes of each pass and the
// end-of-codeword marks are compared with one bit-serial reference coder per
// pass.  Also checks one pair per cycle when nothing stalls.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_arith_encoder;
  import ebc_pkg::*;
  import ebc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, in_valid, in_pop, flush_req, idle, out_last;
  cxd_t in;
  logic [2:0] ob_free;
  logic [1:0] out_nbytes;
  logic [2:0][7:0] out_bytes;
  pass_t out_pass;
  arith_encoder dut (.*);

  int checks = 0, failures = 0, stalls = 0, free_run = 0;
  byte unsigned got [4][$];
  bit  gotl [4][$];
  int  free_pct;

  always @(posedge clk) if (rst_n) begin
    if (dut.v2 && !dut.adv2) stalls++;
    if (out_nbytes > ob_free) begin failures++; $display("FAIL overrun"); end
    for (int k = 0; k < int'(out_nbytes); k++) begin
      got[int'(out_pass)].push_back(out_bytes[k]);
      gotl[int'(out_pass)].push_back(out_last && k == int'(out_nbytes) - 1);
    end
  end
  always @(negedge clk) ob_free = (($urandom % 100) < free_pct) ? 3'd7 : 3'($urandom % 3);

  initial begin
    mq_ref r [4];
    byte unsigned expb [4][$];
    bit expl [4][$];
    int taken [4] = '{0, 0, 0, 0};
    init = 0; in_valid = 0; in = '0; flush_req = 0; free_pct = 50;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int p = 1; p <= 3; p++) r[p] = new(p);
    for (int seg = 0; seg < 12; seg++) begin
      int len;
      free_pct = (seg == 0) ? 100 : 50;
      len = 1 + $urandom % 2000;
      for (int i = 0; i < len; i++) begin
        int p, cx, d;
        p  = (seg % 4 == 3) ? 2 : 1 + $urandom % 3;
        cx = (p == 2) ? $urandom % 3 : $urandom % 16;
        d  = ($urandom % 16) == 0;
        r[p].encode(cx, d);
        in = '{pass_t'(p), 4'(cx), 1'(d)};
        in_valid = 1;
        #1;
        while (!in_pop) begin
          if (seg == 0) free_run++;
          @(negedge clk); #1;
        end
        @(negedge clk);
      end
      in_valid = 0;
      while (!idle) @(negedge clk);
      for (int p = 1; p <= 3; p++)
        if (r[p].used) begin
          void'(r[p].flush());
          for (int i = taken[p]; i < r[p].out.size(); i++) begin
            expb[p].push_back(r[p].out[i]);
            expl[p].push_back(i == r[p].out.size() - 1);
          end
          taken[p] = r[p].out.size();
        end
      flush_req = 1; @(negedge clk); flush_req = 0;
      while (!idle) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    for (int p = 1; p <= 3; p++) begin
      checks++;
      if (got[p].size() != expb[p].size()) begin
        failures++;
        $display("FAIL pass %0d: %0d bytes, expected %0d", p, got[p].size(), expb[p].size());
      end else foreach (got[p][i]) begin
        checks++;
        if (got[p][i] != expb[p][i] || gotl[p][i] != expl[p][i]) failures++;
      end
    end
    checks++;
    if (stalls == 0) failures++;
    checks++;
    if (free_run != 0) begin failures++; $display("FAIL: %0d wait cycles without stalls", free_run); end
    for (int p = 1; p <= 3; p++) $display("pass %0d got %0d exp %0d", p, got[p].size(), expb[p].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
