// tb_context_formation: the context formation alone on a 16x12 code-block,
// all bit-planes of random blocks in every subband.  The FIFO room is
// random, so coding stalls.  Each plane's pairs are compared, in order within
// their pass, with the sequential three-pass reference; the scan time of a
// plane must be 3 stripes x 4 x 16 + 13 cycles plus the stall cycles.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_context_formation;
  import ebc_pkg::*;
  import ebc_ref_pkg::*;
  localparam int W = 16, H = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, coef_req, coef_sign;
  logic [3:0] plane;
  band_t band;
  logic [3:0] coef_row, coef_col;
  logic [9:0] coef_mag;
  logic [2:0] fifo_free, out_count;
  pass_t out_pass;
  logic [3:0][4:0] out_cxd;
  int mag [H][W];
  bit sg [H][W];
  assign coef_mag  = 10'(mag[coef_row][coef_col]);
  assign coef_sign = sg[coef_row][coef_col];
  context_formation #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0, stalls = 0, cycles = 0, nstall_total = 0;
  sym_t exp_q [4][$];

  always @(posedge clk) if (rst_n) begin
    if (busy) begin
      cycles++;
      if (dut.coding && !dut.code_fire) stalls++;
    end
    for (int i = 0; i < int'(out_count); i++) begin
      automatic int p = int'(out_pass);
      checks++;
      if (exp_q[p].size() == 0) begin
        failures++;
        $display("FAIL unexpected pair in pass %0d", p);
      end else begin
        automatic sym_t e = exp_q[p].pop_front();
        if (e.cx != int'(out_cxd[i][4:1]) || e.d != int'(out_cxd[i][0])) begin
          failures++;
          if (failures < 10) $display("FAIL pass %0d got %0d/%0d exp %0d/%0d", p,
                                      out_cxd[i][4:1], out_cxd[i][0], e.cx, e.d);
        end
      end
    end
  end
  always @(negedge clk) fifo_free = 3'($urandom % 5);

  initial begin
    ebc_ref rm;
    start = 0; plane = 0; band = BAND_LL;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 8; blk++) begin
      rm = new(W, H, blk % 4);
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          mag[r][c] = ($urandom % 100 < 30 + 8 * blk) ? $urandom % 64 : 0;
          sg[r][c] = 1'($urandom);
          rm.mag[r][c] = mag[r][c]; rm.sgn[r][c] = sg[r][c];
        end
      rm.reset_state();
      band = band_t'(blk % 4);
      for (int k = 5; k >= 0; k--) begin
        rm.plane(k, exp_q[1], exp_q[2], exp_q[3]);
        @(negedge clk);
        plane = 4'(k); start = 1;
        @(negedge clk);
        start = 0;
        cycles = 0; stalls = 0;
        while (busy) @(negedge clk);
        checks++;
        if (cycles != (H / 4) * 4 * W + 13 + stalls) begin
          failures++;
          $display("FAIL plane took %0d cycles with %0d stalls", cycles, stalls);
        end
        nstall_total += stalls;
        for (int p = 1; p <= 3; p++) begin
          checks++;
          if (exp_q[p].size() != 0) begin
            failures++;
            $display("FAIL %0d pairs of pass %0d missing", exp_q[p].size(), p);
            exp_q[p].delete();
          end
        end
      end
    end
    checks++;
    if (nstall_total == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
