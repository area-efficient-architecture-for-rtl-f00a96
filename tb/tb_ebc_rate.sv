// tb_ebc_rate: throughput of the embedded block coder on the workload used to
// compare tier-1 coders: 64x64 code-blocks with six non-zero magnitude
// bit-planes, the average for natural images.  Blocks of every subband are
// coded at the default parameters with the output always ready.  Magnitudes
// follow a roughly geometric distribution (most samples small, few large), the
// usual shape of wavelet coefficients; a sparse profile also sets half of the
// samples to zero, as in detail subbands, and a dense profile does not.
// Every output byte, its pass and its end-of-codeword mark are checked
// against the sequential reference coder.
//
// Timing checked: the time from start to done of each block must be at most
// 6 planes x (16 stripes x 4 x 64 + 13) scan cycles, plus the cycles the
// context formation waited for FIFO room, plus 16 cycles per bit-plane for
// draining and terminating the codewords.  The samples-per-cycle rate of each
// block is printed.  For the sparse profile it must reach 0.155 S/cycle: the
// published figure for this architecture is 1/6 (0.167) S/cycle, and the
// thirteen pipeline cycles per bit-plane of this implementation bound it at
// 4096 / 24654 = 0.166.  Dense blocks produce more pairs per bit-plane than
// the one-pair-per-cycle coder takes in a scan, so the context formation
// waits for FIFO room and the rate drops below that; it is reported only.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_ebc_rate;
  import ebc_pkg::*;
  import ebc_ref_pkg::*;

  localparam int W = 64, H = 64, MW = 10, NP = 6;
  localparam int SCAN = NP * ((H / 4) * 4 * W + 13);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start;
  logic [3:0] num_planes;
  band_t band;
  logic coef_req;
  logic [5:0] coef_row, coef_col;
  logic [MW-1:0] coef_mag;
  logic coef_sign;
  logic out_valid, out_ready, out_last, busy, done;
  logic [7:0] out_byte;
  pass_t out_pass;

  int   mag [H][W];
  bit   sg  [H][W];
  assign coef_mag  = MW'(mag[coef_row][coef_col]);
  assign coef_sign = sg[coef_row][coef_col];
  assign out_ready = 1'b1;

  ebc_top dut (.*);

  int checks = 0, failures = 0;
  byte unsigned exp_byte [4][$];
  bit   exp_last [4][$];
  int   stalls, nbytes;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  always_ff @(posedge clk) if (rst_n) begin
    if (dut.u_cf.coding && !dut.u_cf.code_fire) stalls++;
    if (out_valid) begin
      automatic int p = int'(out_pass);
      checks++;
      nbytes++;
      if (exp_byte[p].size() == 0) fail($sformatf("unexpected byte pass %0d", p));
      else begin
        automatic byte unsigned eb = exp_byte[p].pop_front();
        automatic bit el = exp_last[p].pop_front();
        if (eb != out_byte || el != out_last)
          fail($sformatf("pass %0d byte %02x last %0b, expected %02x last %0b",
                         p, out_byte, out_last, eb, el));
      end
    end
  end

  task automatic run_block(int b, int zero_pct);
    ebc_ref ref_m;
    mq_ref  mq [4];
    sym_t   q [4][$];
    int     cycles, limit;
    real    rate;
    ref_m = new(W, H, b);
    for (int p = 1; p <= 3; p++) mq[p] = new(p);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        automatic int m = ($urandom % (1 << NP)) >> ($urandom % (NP + 1));
        if (($urandom % 100) < zero_pct) m = 0;
        mag[r][c] = m;
        sg[r][c]  = $urandom % 2;
        ref_m.mag[r][c] = m;
        ref_m.sgn[r][c] = sg[r][c];
      end
    mag[0][0] = (1 << (NP - 1));
    ref_m.mag[0][0] = mag[0][0];
    ref_m.reset_state();
    for (int k = NP - 1; k >= 0; k--) begin
      for (int p = 1; p <= 3; p++) q[p].delete();
      ref_m.plane(k, q[1], q[2], q[3]);
      for (int p = 1; p <= 3; p++) begin
        automatic int n0 = mq[p].out.size();
        automatic int nf;
        foreach (q[p][i]) mq[p].encode(q[p][i].cx, q[p][i].d);
        if (q[p].size() > 0) begin
          nf = mq[p].flush();
          for (int i = n0; i < mq[p].out.size(); i++) begin
            exp_byte[p].push_back(mq[p].out[i]);
            exp_last[p].push_back(i == mq[p].out.size() - 1);
          end
        end
      end
    end
    @(negedge clk);
    num_planes = 4'(NP);
    band = band_t'(b);
    start = 1'b1;
    stalls = 0;
    nbytes = 0;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    limit = SCAN + stalls + 16 * NP;
    rate = real'(W * H) / real'(cycles);
    checks++;
    if (cycles > limit) fail($sformatf("block took %0d cycles, limit %0d", cycles, limit));
    checks++;
    if (zero_pct >= 50 && rate < 0.155) fail($sformatf("rate %.4f S/cycle below 0.155", rate));
    checks++;
    for (int p = 1; p <= 3; p++)
      if (exp_byte[p].size() != 0) begin
        fail($sformatf("pass %0d: %0d bytes never came", p, exp_byte[p].size()));
        exp_byte[p].delete(); exp_last[p].delete();
      end
    $display("band %0d, %0d%% zeros: %0d cycles (scan %0d, FIFO waits %0d), %0d bytes, %.4f S/cycle",
             b, zero_pct, cycles, SCAN, stalls, nbytes, rate);
  endtask

  initial begin
    start = 1'b0; num_planes = '0; band = BAND_LL;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 4; b++) run_block(b, 50);
    run_block(0, 0);
    run_block(3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
