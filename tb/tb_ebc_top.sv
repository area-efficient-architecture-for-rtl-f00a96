// tb_ebc_top: end-to-end test of the embedded block coder at its default
// size (64x64 code-block, 10 magnitude bit-planes).  Several code-blocks with
// different subbands, bit-plane counts and densities are coded.  A reference
// coder that runs the three passes one after another checks every
// context/decision pair entering the arithmetic encoder (in order within its
// pass), and a bit-serial MQ reference checks every output byte, its pass
// and the end-of-codeword marks.  The scan time of every bit-plane is
// checked against 16 stripes x 4 x 64 + 13 cycles plus the cycles the
// context formation waited for FIFO room.  The mechanisms of the design are
// counted and each must occur: FIFO-full stalls, four pairs in one cycle,
// run-length columns with and without a 1, output-buffer stalls, three bytes
// in one cycle, output back-pressure, 0xFF bytes and codeword flushes.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_ebc_top;
  import ebc_pkg::*;
  import ebc_ref_pkg::*;

  localparam int W = 64, H = 64, MW = 10;

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

  ebc_top dut (.*);

  int checks = 0, failures = 0;
  sym_t exp_cxd [4][$];
  byte unsigned exp_byte [4][$];
  bit   exp_last [4][$];
  int   ready_pct;

  // mechanism counters
  int n_fifo_stall, n_cxd4, n_rl_ok, n_rl_fail, n_ob_stall, n_3byte, n_bp, n_ff, n_flush;
  int n_pairs[4];
  int plane_cycles, plane_stalls, plane_fail;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  always_ff @(posedge clk) if (rst_n) begin
    // pairs entering the arithmetic encoder
    if (dut.u_ae.in_pop) begin
      automatic int p = int'(dut.f_out.pass);
      checks++;
      n_pairs[p]++;
      if (exp_cxd[p].size() == 0) fail($sformatf("unexpected pair pass %0d", p));
      else begin
        automatic sym_t e = exp_cxd[p].pop_front();
        if (e.cx != int'(dut.f_out.cx) || e.d != int'(dut.f_out.d))
          fail($sformatf("pass %0d pair cx=%0d d=%0d, expected cx=%0d d=%0d",
                         p, dut.f_out.cx, dut.f_out.d, e.cx, e.d));
      end
    end
    // output bytes
    if (out_valid && out_ready) begin
      automatic int p = int'(out_pass);
      checks++;
      if (out_byte == 8'hFF) n_ff++;
      if (out_last) n_flush++;
      if (exp_byte[p].size() == 0) fail($sformatf("unexpected byte pass %0d", p));
      else begin
        automatic byte unsigned eb = exp_byte[p].pop_front();
        automatic bit el = exp_last[p].pop_front();
        if (eb != out_byte || el != out_last)
          fail($sformatf("pass %0d byte %02x last %0b, expected %02x last %0b",
                         p, out_byte, out_last, eb, el));
      end
    end
    if (out_valid && !out_ready) n_bp++;
    // context formation
    if (dut.u_cf.coding && !dut.u_cf.code_fire) n_fifo_stall++;
    if (dut.u_cf.code_fire && dut.cf_count == 3'd4) n_cxd4++;
    if (dut.u_cf.code_fire && dut.cf_count != 0 && dut.cf_pass == PASS_CUP &&
        dut.cf_cxd[0][CX_W:1] == CX_RL) begin
      if (dut.cf_cxd[0][0]) n_rl_fail++; else n_rl_ok++;
    end
    if (dut.u_ae.v2 && !dut.u_ae.adv2) n_ob_stall++;
    if (dut.ae_nb == 2'd3) n_3byte++;
    // scan time of a bit-plane
    if (dut.u_cf.busy) begin
      plane_cycles++;
      if (dut.u_cf.coding && !dut.u_cf.code_fire) plane_stalls++;
    end else if (plane_cycles != 0) begin
      checks++;
      if (plane_cycles != (H / 4) * 4 * W + 13 + plane_stalls) begin
        plane_fail++;
        fail($sformatf("plane scan took %0d cycles, expected %0d", plane_cycles,
                       (H / 4) * 4 * W + 13 + plane_stalls));
      end
      plane_cycles = 0;
      plane_stalls = 0;
    end
  end

  always @(posedge clk) out_ready <= ($urandom % 100) < ready_pct;

  task automatic run_block(int np, int b, int density, int rdy);
    ebc_ref ref_m;
    mq_ref  mq [4];
    sym_t   q [4][$];
    int     cycles;
    ref_m = new(W, H, b);
    for (int p = 1; p <= 3; p++) mq[p] = new(p);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        automatic int u = $urandom % 100;
        automatic int m;
        if (np == 0 || u >= density) m = 0;
        else if (u < density / 2) m = $urandom % (1 << ((np < 3) ? np : 3));
        else m = $urandom % (1 << np);
        // a sparse region in the lower half leaves room for run-length columns
        if (r >= 40 && c >= 16 && ($urandom % 8) != 0) m = 0;
        mag[r][c] = m;
        sg[r][c]  = $urandom % 2;
        ref_m.mag[r][c] = m;
        ref_m.sgn[r][c] = sg[r][c];
      end
    if (np > 0) begin
      mag[3][7] = (1 << (np - 1));
      ref_m.mag[3][7] = mag[3][7];
    end
    ref_m.reset_state();
    for (int k = np - 1; k >= 0; k--) begin
      for (int p = 1; p <= 3; p++) q[p].delete();
      ref_m.plane(k, q[1], q[2], q[3]);
      for (int p = 1; p <= 3; p++) begin
        automatic int n0 = mq[p].out.size();
        automatic int nf;
        foreach (q[p][i]) begin
          exp_cxd[p].push_back(q[p][i]);
          mq[p].encode(q[p][i].cx, q[p][i].d);
        end
        if (q[p].size() > 0) begin
          nf = mq[p].flush();
          for (int i = n0; i < mq[p].out.size(); i++) begin
            exp_byte[p].push_back(mq[p].out[i]);
            exp_last[p].push_back(i == mq[p].out.size() - 1);
          end
        end
      end
    end
    ready_pct = rdy;
    @(negedge clk);
    num_planes = 4'(np);
    band = band_t'(b);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    for (int p = 1; p <= 3; p++)
      if (exp_cxd[p].size() != 0 || exp_byte[p].size() != 0) begin
        fail($sformatf("pass %0d: %0d pairs and %0d bytes never came", p,
                       exp_cxd[p].size(), exp_byte[p].size()));
        exp_cxd[p].delete(); exp_byte[p].delete(); exp_last[p].delete();
      end
    $display("block np=%0d band=%0d: %0d cycles", np, b, cycles);
  endtask

  initial begin
    start = 1'b0; num_planes = '0; band = BAND_LL; ready_pct = 100;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_block(10, 0, 60, 100);
    run_block(6, 1, 40, 60);
    run_block(3, 3, 25, 100);
    run_block(8, 2, 80, 35);
    run_block(1, 0, 10, 100);
    run_block(5, 3, 90, 4);
    run_block(0, 0, 0, 100);
    checks++;
    if (n_fifo_stall == 0) fail("no FIFO-full stall");
    checks++;
    if (n_cxd4 == 0) fail("no cycle with four pairs");
    checks++;
    if (n_rl_ok == 0 || n_rl_fail == 0) fail("run-length mode not exercised both ways");
    checks++;
    if (n_ob_stall == 0) fail("no output-buffer stall");
    checks++;
    if (n_3byte == 0) fail("no three-byte cycle");
    checks++;
    if (n_bp == 0 || n_ff == 0 || n_flush == 0) fail("no back-pressure, 0xFF byte or flush");
    checks++;
    if (n_pairs[1] == 0 || n_pairs[2] == 0 || n_pairs[3] == 0) fail("a pass never coded");
    $display("pairs p1=%0d p2=%0d p3=%0d fifo_stall=%0d four=%0d rl_ok=%0d rl_fail=%0d",
             n_pairs[1], n_pairs[2], n_pairs[3], n_fifo_stall, n_cxd4, n_rl_ok, n_rl_fail);
    $display("ob_stall=%0d three_bytes=%0d backpressure=%0d ff=%0d flushes=%0d",
             n_ob_stall, n_3byte, n_bp, n_ff, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
