// tb_ebc_controller: the controller against simple models of the blocks it
// sequences.  For random bit-plane counts it must start one scan per
// bit-plane, from num_planes-1 down to 0, request a flush only after the
// scan, FIFO and encoder are all idle, wait for the flush to end, and pulse
// done once after the output buffer is empty.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_ebc_controller;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, cf_busy, fifo_empty, ae_idle, ob_empty;
  logic [3:0] num_planes, plane;
  logic cf_start, ae_init, ae_flush, busy, done;
  ebc_controller dut (.*);

  int checks = 0, failures = 0;
  int busy_left, flush_left, ob_left;
  int starts[$];
  int nflush, ninit, ndone, busy_at_flush;

  always @(posedge clk) if (rst_n) begin
    if (cf_start) begin starts.push_back(int'(plane)); busy_left <= 20 + $urandom % 30; end
    else if (busy_left > 0) busy_left <= busy_left - 1;
    if (ae_flush) begin
      nflush++;
      if (cf_busy || !fifo_empty || !ae_idle) busy_at_flush++;
      flush_left <= 3;
      ob_left <= 6;
    end else if (flush_left > 0) flush_left <= flush_left - 1;
    if (ob_left > 0 && !ae_flush) ob_left <= ob_left - 1;
    if (ae_init) ninit++;
    if (done) ndone++;
  end
  assign cf_busy    = busy_left > 5;
  assign fifo_empty = busy_left < 3;
  assign ae_idle    = (busy_left == 0) && (flush_left == 0);
  assign ob_empty   = ob_left == 0;

  initial begin
    start = 0; num_planes = 0; busy_left = 0; flush_left = 0; ob_left = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int np;
      np = (t < 11) ? t : $urandom % 11;
      starts.delete(); nflush = 0; ninit = 0; ndone = 0; busy_at_flush = 0;
      @(negedge clk);
      num_planes = 4'(np); start = 1;
      @(negedge clk);
      start = 0;
      while (ndone == 0) @(negedge clk);
      repeat (3) @(negedge clk);
      checks++;
      if (starts.size() != np || nflush != np || ninit != 1 || ndone != 1 ||
          busy_at_flush != 0 || busy) begin
        failures++;
        $display("FAIL np %0d: %0d starts %0d flushes", np, starts.size(), nflush);
      end
      foreach (starts[i]) begin
        checks++;
        if (starts[i] != np - 1 - i) failures++;
      end
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
