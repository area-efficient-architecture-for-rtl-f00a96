// tb_shift_reg_2d: random loads, shifts, pads and clears; the four columns
// and the staging column are tracked by a model that holds them as an
// ordered list, and compared every cycle.
// The expected values are worked out independently of the RTL; the stimulus
// and the checks are this testbench's own.
module tb_shift_reg_2d;
  import ebc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, shift, load, load_pad, s_full;
  logic [3:0] rho_xn;
  samp_t top_s, load_data;
  col_t xl, x0, xr, xn, s_col;
  logic [2:0] s_cnt;
  shift_reg_2d dut (.*);

  col_t m [4];          // xl, x0, xr, xn
  samp_t ms [4];
  int mcnt;
  int checks = 0, failures = 0, nshift = 0;

  initial begin
    clear = 0; shift = 0; load = 0; load_pad = 0; rho_xn = 0; top_s = '0; load_data = '0;
    for (int i = 0; i < 4; i++) begin m[i] = '0; ms[i] = '0; end
    mcnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      col_t sc;
      @(negedge clk);
      clear     = ($urandom % 200) == 0;
      shift     = (mcnt == 4) && ($urandom % 2);
      load      = ($urandom % 4) != 0;
      load_pad  = shift && ($urandom % 4) == 0;
      rho_xn    = 4'($urandom);
      top_s     = samp_t'($urandom);
      load_data = samp_t'($urandom);
      #1;
      sc = {ms[3], ms[2], ms[1], ms[0], top_s};
      checks++;
      if (xl !== m[0] || x0 !== m[1] || xr !== m[2] || xn !== m[3] || s_col !== sc ||
          s_full !== (mcnt == 4) || int'(s_cnt) != mcnt) begin
        failures++;
        if (failures < 10) $display("FAIL it %0d", it);
      end
      @(posedge clk);
      if (clear) begin
        for (int i = 0; i < 4; i++) begin m[i] = '0; ms[i] = '0; end
        mcnt = 0;
      end else if (shift) begin
        nshift++;
        m[0] = m[1]; m[1] = m[2]; m[2] = m[3];
        for (int r = 0; r < 4; r++) m[2][r+1].rho = rho_xn[r];
        m[3] = sc;
        for (int i = 0; i < 4; i++) ms[i] = '0;
        if (load_pad) mcnt = 4;
        else if (load) begin ms[0] = load_data; mcnt = 1; end
        else mcnt = 0;
      end else if (load && mcnt < 4) begin
        ms[mcnt] = load_data; mcnt++;
      end
    end
    checks++;
    if (nshift == 0) failures++;
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
