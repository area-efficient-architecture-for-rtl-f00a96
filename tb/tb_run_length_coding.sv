// tb_run_length_coding: random pass, row, column bits and contexts; the
// expected pairs of each row are built from the run-length rules of the
// cleanup pass: one RL(0) for an all-zero run-length column, RL(1), two
// UNI bits and the sign at the first 1, normal coding below it.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_run_length_coding;
  import ebc_pkg::*;
  logic [1:0] row;
  pass_t pass;
  logic rl_col;
  logic [3:0] col_mu;
  logic [3:0] zc_cx, mr_cx, sc_cx;
  logic sc_d;
  logic [2:0] count;
  pass_t out_pass;
  logic [3:0][4:0] cxd;
  int checks = 0, failures = 0;
  run_length_coding dut (.*);
  initial begin
    for (int it = 0; it < 20000; it++) begin
      int n, f;
      logic [4:0] e [4];
      pass   = pass_t'(1 + $urandom % 3);
      row    = 2'($urandom);
      rl_col = 1'($urandom);
      col_mu = ($urandom % 3 == 0) ? 4'b0 : 4'($urandom);
      zc_cx  = 4'($urandom % 9); mr_cx = 4'($urandom % 3);
      sc_cx  = 4'(9 + $urandom % 5); sc_d = 1'($urandom);
      #1;
      n = 0;
      f = -1;
      for (int r = 3; r >= 0; r--) if (col_mu[r]) f = r;
      if (pass == PASS_MRP) begin
        e[0] = {mr_cx, col_mu[row]}; n = 1;
      end else if (pass == PASS_CUP && rl_col && f < 0) begin
        if (row == 0) begin e[0] = {4'd14, 1'b0}; n = 1; end
      end else if (pass == PASS_CUP && rl_col && int'(row) < f) begin
        n = 0;
      end else if (pass == PASS_CUP && rl_col && int'(row) == f) begin
        e[0] = {4'd14, 1'b1}; e[1] = {4'd15, 1'(f >> 1)}; e[2] = {4'd15, 1'(f)};
        e[3] = {sc_cx, sc_d}; n = 4;
      end else begin
        e[0] = {zc_cx, col_mu[row]}; n = 1;
        if (col_mu[row]) begin e[1] = {sc_cx, sc_d}; n = 2; end
      end
      checks++;
      if (int'(count) != n || out_pass != pass) failures++;
      else for (int i = 0; i < n; i++) if (cxd[i] !== e[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
